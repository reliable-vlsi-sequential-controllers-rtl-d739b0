// state_variable_cell_tb: one state-variable circuit programmed for Y_3 of
// the six-state, three-input example.
//
// The constants are the last bit of each next-state code of the example
// (rows S_0..S_7, columns I_1 I_2 I_3; the unused rows S_6, S_7 hold 0). For
// every present state and input the combinational next-state value d must
// equal the last bit of the code the reference table gives, and q must take
// d at the following rising edge, exactly one clock later. Reset and init
// must load the reset value.
module state_variable_cell_tb;
  import rsc_tb_pkg::*;
  localparam int N = 3, M = 3, NS = 1 << N;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b1, init = 1'b0;
  logic [M-1:0] in_state = '0;
  logic [N-1:0] y = '0;
  logic [NS-1:0][M-1:0] consts;
  logic d, q;

  // Y_3 constants, row S_s = {I_3, I_2, I_1}
  localparam logic [2:0] Y3_ROWS [8] = '{3'b010, 3'b101, 3'b010, 3'b101,
                                         3'b010, 3'b101, 3'b000, 3'b000};

  state_variable_cell #(.N(N), .M(M), .RESET_VAL(1'b1)) dut (.*);

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
    for (int s = 0; s < NS; s++) consts[s] = Y3_ROWS[s];
    #1 rst_n = 1'b0;
    #1 check(q == 1'b1, "reset value");
    @(negedge clk) rst_n = 1'b1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int s = 0; s < NS; s++) begin
        for (int j = 0; j < M; j++) begin
          logic exp;
          @(negedge clk);
          y = N'(s);
          in_state = M'(1 << j);
          exp = (s < 6) ? 1'(T1_NEXT[s][j]) : 1'b0;   // code of A..F = index
          #1 check(d == exp, $sformatf("d for S%0d I%0d = %b want %b", s, j + 1, d, exp));
          @(posedge clk);
          #1 check(q == exp, $sformatf("q after S%0d I%0d = %b want %b", s, j + 1, q, exp));
        end
      end
    end
    // synchronous init overrides the next-state value
    @(negedge clk);
    y = 3'd0; in_state = 3'b010; init = 1'b1;  // d would be 1 ... and reset value is 1
    consts[0] = 3'b000;                         // make d = 0 so init must win
    @(posedge clk);
    #1 check(q == 1'b1, "init loads the reset value");
    @(negedge clk) init = 1'b0;
    @(posedge clk);
    #1 check(q == 1'b0, "released init loads d again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
