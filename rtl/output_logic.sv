// output_logic: programmable, state-decoded controller outputs.
//
// Each of the P output bits is one general BTS network over the present state
// whose 2**N leaf constants come from out_table[s][p]. Like the next-state
// logic, the hardware is the same for every output and every flow table; the
// outputs of each state, including the safe values required in fault states,
// are set only by the constants. Outputs are Moore outputs (functions of the
// present state only) and combinational from state; this form is a choice of
// this design, built from the same networks as the next-state logic.
module output_logic #(
  parameter int unsigned N = 4,  // state variables (Table 4: 4)
  parameter int unsigned P = 2   // output bits (assumed)
) (
  input  logic [N-1:0]             state,      // present state
  input  logic [(1<<N)-1:0][P-1:0] out_table,  // out_table[s] = outputs of S_s
  output logic [P-1:0]             outs
);

  for (genvar p = 0; p < P; p++) begin : g_out
    logic [(1<<N)-1:0] consts;
    always_comb begin
      for (int unsigned s = 0; s < (1 << N); s++) consts[s] = out_table[s][p];
    end
    bts_network #(.N(N)) u_bts (
      .consts (consts),
      .sel    (state),
      .y      (outs[p])
    );
  end

endmodule
