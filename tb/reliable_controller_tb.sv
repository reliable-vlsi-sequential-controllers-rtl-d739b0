// reliable_controller_tb: one controller at its default size (four state
// variables, three inputs, two outputs) running three programs.
//
// 1. The six-state example flow table on a distance-two (even parity)
//    assignment: a random input sequence is checked every cycle against a
//    letter-level model (state one clock after its input, no fault flag,
//    programmed outputs).
// 2. Adaptive operation: state C is declared faulty and the spare code 0011
//    takes its role (every predecessor of C now goes to 0011, which has C's
//    next states and outputs). The same model must still hold with C mapped
//    to 0011, and code 1100 must never be entered again.
// 3. The seven-state fail-safe example: the cycle 1..7 runs, then the cycle
//    test inverts one constant so that state 1 goes to 1110 instead of 1111;
//    the fault flag must rise in that cycle with safe (zero) outputs and the
//    machine must go to S_0 and stay there.
// 4. Checker self-test: the fault states are programmed to cycle among
//    themselves; after the cycle test the machine must visit all eight
//    odd-parity states in order with the fault flag set in each.
// 5. Stuck-at-1 at the output of the next-state network of y_1, and then of
//    y_2, while the seven-state cycle is in state 6 (0110, next 0011): the
//    machine must go to 1011 (resp. 0111), flagged, then rest in 1000
//    (resp. 0100) with safe outputs.
// 6. Single-fault-tolerant program: two states 0101 and 1010 at distance
//    four; every code next to a state gets that state's row. The cycle test
//    turns A -> B into A -> 1011, a neighbour of B, which must still go on to
//    A exactly as B would.
// A second controller built with the BTS-form detector runs alongside and
// must agree with the first in state and fault flag every cycle.
module reliable_controller_tb;
  import rsc_pkg::*;
  import rsc_tb_pkg::*;
  localparam int N = 4, M = 3, P = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b1, init = 1'b0, cycle_test = 1'b0;
  logic [M-1:0] in_state = '0;
  logic dc_we = 1'b0, ow_we = 1'b0;
  logic [N-1:0] dc_state = '0, dc_code = '0, ow_state = '0;
  logic [1:0] dc_col = '0;
  logic [P-1:0] ow_data = '0;
  logic [N-1:0] state, next_state;
  logic fault;
  logic [P-1:0] outs;

  reliable_controller dut (.*);

  logic [N-1:0] state_b, next_state_b;
  logic fault_b;
  logic [P-1:0] outs_b;
  int n_compared = 0;

  reliable_controller #(.DET_MODE(DET_BTS)) dut_bts (
    .clk(clk), .rst_n(rst_n), .init(init), .in_state(in_state), .cycle_test(cycle_test),
    .dc_we(dc_we), .dc_state(dc_state), .dc_col(dc_col), .dc_code(dc_code),
    .ow_we(ow_we), .ow_state(ow_state), .ow_data(ow_data),
    .state(state_b), .next_state(next_state_b), .fault(fault_b), .outs(outs_b));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_code(input logic [3:0] s, input int c, input logic [3:0] code);
    @(negedge clk);
    dc_we = 1'b1; dc_state = s; dc_col = 2'(c); dc_code = code;
    @(posedge clk);
    #1 dc_we = 1'b0;
  endtask

  task automatic write_out(input logic [3:0] s, input logic [1:0] v);
    @(negedge clk);
    ow_we = 1'b1; ow_state = s; ow_data = v;
    @(posedge clk);
    #1 ow_we = 1'b0;
  endtask

  task automatic do_reset();
    @(negedge clk);
    #1 rst_n = 1'b0;
    #1 rst_n = 1'b1;
  endtask

  task automatic program_t4();
    for (int k = 0; k < 7; k++) begin
      write_code(T4_CODE[k], 0, T4_CODE[(k + 1) % 7]);
      write_code(T4_CODE[k], 1, T4_CODE[k]);
      write_code(T4_CODE[k], 2, T4_CODE[0]);
      write_out(T4_CODE[k], 2'((k % 3) + 1));
    end
  endtask

  function automatic logic [1:0] letter_out(input int l);
    return 2'((l % 3) + 1);
  endfunction

  function automatic logic [3:0] letter_code(input int l, input bit remapped);
    return (remapped && l == 2) ? D2_SPARE : D2_CODE[l];
  endfunction

  // random run of the six-state table, checked each cycle; starts and ends
  // at a falling clock edge
  task automatic run_t1(input int cycles, input bit remapped, output int spare_visits);
    int letter = 0;
    spare_visits = 0;
    for (int t = 0; t < cycles; t++) begin
      int j;
      j = $urandom_range(M - 1);
      in_state = M'(1 << j);
      @(posedge clk);
      letter = T1_NEXT[letter][j];
      #1;
      check(state == letter_code(letter, remapped),
            $sformatf("t=%0d state %b want %b", t, state, letter_code(letter, remapped)));
      check(!fault, "no fault flag in a specified state");
      check(outs == letter_out(letter), $sformatf("outs %b want %b", outs, letter_out(letter)));
      if (remapped) check(state != 4'b1100, "faulty state C is not entered");
      if (state == D2_SPARE) spare_visits++;
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the BTS-form detector must agree with the XOR form (the stuck-at runs
  // below force the first controller only and are excluded)
  bit compare_bts = 1'b0;   // enabled after the first reset
  always @(negedge clk) begin
    if (rst_n && compare_bts) begin
      check(state_b == state && fault_b == fault && outs_b == outs,
            $sformatf("BTS-detector copy %b/%b differs from %b/%b", state_b, fault_b, state, fault));
      n_compared++;
    end
  end

  initial begin
    int visits;
    logic [15:0] seen;
    // ---- 1. six-state table on a distance-two assignment
    do_reset();
    compare_bts = 1'b1;
    init = 1'b1;
    for (int l = 0; l < 6; l++) begin
      for (int c = 0; c < M; c++) write_code(D2_CODE[l], c, D2_CODE[T1_NEXT[l][c]]);
      write_out(D2_CODE[l], letter_out(l));
    end
    @(negedge clk) init = 1'b0;
    check(state == D2_CODE[0], "init holds state A");
    run_t1(200, 1'b0, visits);
    // ---- 2. adaptive remap of C onto the spare code
    @(negedge clk) init = 1'b1;
    for (int l = 0; l < 6; l++)
      for (int c = 0; c < M; c++)
        if (T1_NEXT[l][c] == 2) write_code(D2_CODE[l], c, D2_SPARE);
    for (int c = 0; c < M; c++) write_code(D2_SPARE, c, letter_code(T1_NEXT[2][c], 1'b1));
    write_out(D2_SPARE, letter_out(2));
    @(negedge clk) init = 1'b0;
    run_t1(200, 1'b1, visits);
    check(visits > 0, "spare state used after remapping");
    // ---- 3. fail-safe seven-state cycle
    do_reset();
    init = 1'b1;
    for (int k = 0; k < 7; k++) begin
      write_code(T4_CODE[k], 0, T4_CODE[(k + 1) % 7]);
      write_code(T4_CODE[k], 1, T4_CODE[k]);
      write_code(T4_CODE[k], 2, T4_CODE[0]);
      write_out(T4_CODE[k], 2'((k % 3) + 1));
    end
    @(negedge clk) init = 1'b0;
    in_state = 3'b001;
    for (int t = 1; t <= 14; t++) begin
      @(posedge clk);
      #1 check(state == T4_CODE[t % 7], $sformatf("cycle step %0d state %b", t, state));
      check(!fault && outs == 2'((t % 7) % 3 + 1), "fault-free cycle outputs");
    end
    @(negedge clk) cycle_test = 1'b1;          // state 1 (0101) under I_1
    @(posedge clk);
    #1 check(state == 4'b1110, $sformatf("single constant change gives %b want 1110", state));
    check(fault, "fault state flagged in the same cycle");
    check(outs == 2'b00, "safe outputs in the fault state");
    @(negedge clk) cycle_test = 1'b0;
    for (int t = 0; t < 6; t++) begin
      @(negedge clk) in_state = M'(1 << (t % M));
      @(posedge clk);
      #1 check(state == 4'b0000 && outs == 2'b00, $sformatf("held in S_0, state %b", state));
    end
    // ---- 4. checker self-test: fault states cycle among themselves
    do_reset();
    init = 1'b1;
    for (int k = 0; k < 7; k++) write_code(T4_CODE[k], 0, T4_CODE[(k + 1) % 7]);
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < M; c++) write_code(F5_CYCLE[i], c, F5_CYCLE[(i + 1) % 8]);
    @(negedge clk) init = 1'b0;
    in_state = 3'b001;
    cycle_test = 1'b1;
    @(posedge clk);
    #1 check(state == 4'b1110 && fault, "cycle test enters the fault cycle");
    @(negedge clk) cycle_test = 1'b0;
    seen = '0;
    for (int t = 1; t <= 8; t++) begin
      @(posedge clk);
      #1 check(state == F5_CYCLE[(5 + t) % 8], $sformatf("fault cycle step %0d state %b", t, state));
      check(fault, $sformatf("detector flags fault state %b", state));
      seen[state] = 1'b1;
    end
    check(popcount(32'(seen)) == 8, "all eight fault states visited");
    check(n_compared > 100, "BTS detector compared");

    // ---- 5. stuck-at-1 at the network outputs of y_1 and y_2 in state 6
    compare_bts = 1'b0;
    for (int v = 3; v >= 2; v--) begin
      logic [3:0] first, rest;
      first = 4'b0011 | (4'b1 << v);   // 1011 or 0111
      rest  = 4'b1 << v;               // 1000 or 0100
      do_reset();
      init = 1'b1;
      program_t4();
      @(negedge clk) init = 1'b0;
      in_state = 3'b001;
      repeat (5) @(posedge clk);       // states 2,3,4,5,6
      #1 check(state == 4'b0110, $sformatf("reached state 6, got %b", state));
      if (v == 3) force dut.u_core.g_var[3].u_cell.d = 1'b1;
      else        force dut.u_core.g_var[2].u_cell.d = 1'b1;
      @(posedge clk);
      #1 check(state == first && fault && outs == 2'b00,
               $sformatf("y%0d network stuck-at-1: state %b want %b", 4 - v, state, first));
      for (int t = 0; t < 4; t++) begin
        @(posedge clk);
        #1 check(state == rest && fault && outs == 2'b00,
                 $sformatf("y%0d network stuck-at-1: rests in %b want %b", 4 - v, state, rest));
      end
      if (v == 3) release dut.u_core.g_var[3].u_cell.d;
      else        release dut.u_core.g_var[2].u_cell.d;
    end

    // ---- 6. single-fault-tolerant (error-correcting) program
    do_reset();
    init = 1'b1;
    for (int c = 0; c < M; c++) begin
      logic [3:0] na, nb;
      na = (c == 0) ? 4'b1010 : 4'b0101;     // A: I_1 -> B, else stay
      nb = (c == 0) ? 4'b0101 : 4'b1010;     // B: I_1 -> A, else stay
      write_code(4'b0101, c, na);
      write_code(4'b1010, c, nb);
      for (int b = 0; b < 4; b++) begin
        write_code(4'b0101 ^ (4'b1 << b), c, na);
        write_code(4'b1010 ^ (4'b1 << b), c, nb);
      end
    end
    @(negedge clk) init = 1'b0;
    compare_bts = 1'b1;
    in_state = 3'b001;
    for (int t = 0; t < 3; t++) begin
      cycle_test = 1'b1;                      // A -> 1011 instead of 1010
      @(posedge clk);
      #1 check(state == 4'b1011 && fault, $sformatf("fault lands next to B: %b", state));
      @(negedge clk) cycle_test = 1'b0;
      @(posedge clk);
      #1 check(state == 4'b0101 && !fault, $sformatf("corrected: back in A, got %b", state));
      @(negedge clk);
    end
    in_state = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
