// output_logic_tb: random check of the state-decoded outputs.
//
// For random output tables and every present state of a four-variable
// machine, the outputs must be the table entry of that state.
module output_logic_tb;
  localparam int N = 4, P = 2, NS = 1 << N;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]         state;
  logic [NS-1:0][P-1:0] out_table;
  logic [P-1:0]         outs;

  output_logic dut (.state(state), .out_table(out_table), .outs(outs));

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
    for (int t = 0; t < 50; t++) begin
      @(posedge clk);
      out_table = (NS*P)'($urandom);
      for (int s = 0; s < NS; s++) begin
        logic [P-1:0] exp;
        state = N'(s);
        #1;
        exp = out_table[s];
        check(outs === exp, $sformatf("state %0d got %b want %b", s, outs, exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
