// safe_combiner: merges the outputs of K redundant fail-safe controllers.
//
// A fail-safe controller that suffers a fault drives its safe output value
// instead of a wrong one. Merging K = n+1 such controllers with one gate per
// output bit therefore tolerates n faults: with safe value 0 an OR gate still
// sees the 1 of any fault-free copy (COMB_OR), with safe value 1 an AND gate
// still sees its 0 (COMB_AND). Purely combinational.
module safe_combiner
  import rsc_pkg::*;
#(
  parameter int unsigned K    = 2,       // copies (n+1 for n faults)
  parameter int unsigned P    = 2,       // output bits per copy (assumed)
  parameter comb_mode_e  MODE = COMB_OR  // safe value 0 -> OR, 1 -> AND
) (
  input  logic [K-1:0][P-1:0] outs_in,
  output logic [P-1:0]        outs
);

  always_comb begin
    outs = (MODE == COMB_AND) ? '1 : '0;
    for (int unsigned k = 0; k < K; k++) begin
      if (MODE == COMB_AND) outs &= outs_in[k];
      else                  outs |= outs_in[k];
    end
  end

endmodule
