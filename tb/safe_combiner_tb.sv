// safe_combiner_tb: random check of the OR and AND output combiners.
//
// Three copies of two output bits: the OR form must give 1 where any copy
// gives 1, the AND form 0 where any copy gives 0. A case where one copy has
// fallen to the safe value while the others are right is checked explicitly.
module safe_combiner_tb;
  import rsc_pkg::*;
  localparam int K = 3, P = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0][P-1:0] ins;
  logic [P-1:0] o_or, o_and;

  safe_combiner #(.K(K), .P(P), .MODE(COMB_OR))  u_or  (.outs_in(ins), .outs(o_or));
  safe_combiner #(.K(K), .P(P), .MODE(COMB_AND)) u_and (.outs_in(ins), .outs(o_and));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // copy 1 failed safe (0 for OR, 1 for AND); the others agree on 2'b10
    ins = '{2'b10, 2'b00, 2'b10};
    #1 check(o_or == 2'b10, "OR masks a copy at the safe value 0");
    ins = '{2'b10, 2'b11, 2'b10};
    #1 check(o_and == 2'b10, "AND masks a copy at the safe value 1");
    for (int t = 0; t < 200; t++) begin
      logic [P-1:0] eo, ea;
      @(posedge clk);
      ins = (K*P)'($urandom);
      eo = '0; ea = '1;
      for (int k = 0; k < K; k++) begin
        for (int p = 0; p < P; p++) begin
          logic bit_v;
          bit_v = ins[k][p];
          eo[p] = eo[p] | bit_v;
          ea[p] = ea[p] & bit_v;
        end
      end
      #1;
      check(o_or == eo, $sformatf("OR %b -> %b", ins, o_or));
      check(o_and == ea, $sformatf("AND %b -> %b", ins, o_and));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
