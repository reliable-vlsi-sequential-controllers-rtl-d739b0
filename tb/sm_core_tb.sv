// sm_core_tb: the three-variable, three-input example machine, end to end.
//
// The destination codes are the six-state example with the assignment
// A=000 .. F=101 and 0 in the two unused rows. A random input sequence is
// applied and the state compared every cycle with a letter-level model of the
// flow table: each state must appear exactly one clock after its input. A
// second core that resets into the unused state 110 must return to A on the
// next clock (safe operation). With cycle_test set, the transition of A under
// I_1 (the test constant's row and column) must land at distance one from C.
module sm_core_tb;
  import rsc_tb_pkg::*;
  localparam int N = 3, M = 3, NS = 1 << N;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b1, init = 1'b0, cycle_test = 1'b0;
  logic [M-1:0] in_state = '0;
  logic [NS-1:0][M-1:0][N-1:0] dest_codes;
  logic [N-1:0] next_state, state, next_state_u, state_u;

  sm_core #(.N(N), .M(M), .RESET_STATE(0), .TEST_STATE(0), .TEST_COL(0), .TEST_BIT(0)) dut (.*);

  sm_core #(.N(N), .M(M), .RESET_STATE(6)) dut_unused (
    .clk(clk), .rst_n(rst_n), .init(init), .in_state(in_state), .dest_codes(dest_codes),
    .cycle_test(1'b0), .next_state(next_state_u), .state(state_u));

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
    int letter;
    for (int s = 0; s < NS; s++)
      for (int j = 0; j < M; j++)
        dest_codes[s][j] = (s < 6) ? N'(T1_NEXT[s][j]) : '0;
    #1 rst_n = 1'b0;
    #1 check(state == 3'b000, "reset to A");
    check(state_u == 3'b110, "second core reset to unused state 110");
    @(negedge clk);
    rst_n = 1'b1;
    in_state = 3'b001;
    @(posedge clk);
    #1 check(state_u == 3'b000, "unused state 110 returns to A");
    letter = 2;  // A under I_1 -> C
    check(state == 3'(letter), $sformatf("A -I1-> C, got %b", state));
    for (int t = 0; t < 300; t++) begin
      int j;
      @(negedge clk);
      j = $urandom_range(M - 1);
      in_state = M'(1 << j);
      #1 check(next_state == 3'(T1_NEXT[letter][j]),
               $sformatf("next_state of %0d under I%0d = %b", letter, j + 1, next_state));
      @(posedge clk);
      letter = T1_NEXT[letter][j];
      #1 check(state == 3'(letter), $sformatf("state %b want %0d", state, letter));
    end
    // cycle test: go to A, then take I_1 with the test constant inverted
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    check(state == 3'b000, "init returns to A");
    in_state = 3'b001; cycle_test = 1'b1;
    @(posedge clk);
    #1 check(state == 3'b011, $sformatf("cycle test from A under I1 gives %b want 011", state));
    @(negedge clk) cycle_test = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
