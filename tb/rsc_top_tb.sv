// rsc_top_tb: the fault-tolerant controller at its default size, end to end.
//
// Two copies (one fault tolerated) of a four-variable, three-input,
// two-output controller with the default parameters. The testbench programs
// both copies through the shared write ports and takes the design through
// every mechanism it has, counting each and failing on any that never
// happened:
//   transitions    the six-state example table on a distance-two assignment,
//                  random inputs, every state checked one clock after its
//                  input against a letter-level model, all three inputs used;
//   safe return    unused codes are programmed to go to A; the cycle test
//                  throws the machine into the unused code 1101, which is
//                  flagged and left for A on the next clock;
//   adaptive remap state C is moved onto the spare code 0011;
//   fail-safe      the seven-state example with all fault states going to
//                  S_0: a single constant change sends the machine to a
//                  fault state (flagged, safe outputs) and then to S_0;
//   checker test   fault states programmed to cycle: all eight odd-parity
//                  states visited with the fault flag set;
//   correction     single-fault-tolerant program: two states at distance
//                  four, every neighbour of a state programmed with that
//                  state's row; a fault that lands next to B goes on to A
//                  exactly as B would;
//   fault masking  the state flip-flop y_1 of copy 0 is forced stuck-at-1;
//                  that copy falls into safe fault states while the OR of
//                  the outputs still follows the fault-free copy.
module rsc_top_tb;
  import rsc_pkg::*;
  import rsc_tb_pkg::*;
  localparam int N = 4, M = 3, P = 2, K = 2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b1, init = 1'b0, cycle_test = 1'b0;
  logic [M-1:0] in_state = '0;
  logic dc_we = 1'b0, ow_we = 1'b0;
  logic [N-1:0] dc_state = '0, dc_code = '0, ow_state = '0;
  logic [1:0] dc_col = '0;
  logic [P-1:0] ow_data = '0;
  logic [P-1:0] outs;
  logic [K-1:0][N-1:0] copy_state;
  logic [K-1:0] copy_fault;
  logic [K-1:0][P-1:0] copy_outs;

  // mechanism counters
  int n_input [M];
  int n_safe_return = 0, n_spare = 0, n_fault_flag = 0, n_failsafe_s0 = 0;
  int n_checker = 0, n_masked = 0, n_cycle_test = 0, n_corrected = 0;

  rsc_top dut (.*);

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

  // both copies in the same state, with the given flag and outputs
  task automatic check_both(input logic [3:0] st, input logic flt, input logic [1:0] o, input string what);
    for (int c = 0; c < K; c++) begin
      check(copy_state[c] == st, $sformatf("%s: copy %0d state %b want %b", what, c, copy_state[c], st));
      check(copy_fault[c] == flt, $sformatf("%s: copy %0d fault %b", what, c, copy_fault[c]));
    end
    check(outs == o, $sformatf("%s: outs %b want %b", what, outs, o));
    if (flt) n_fault_flag++;
  endtask

  function automatic logic [1:0] letter_out(input int l);
    return 2'((l % 3) + 1);
  endfunction

  function automatic logic [3:0] letter_code(input int l, input bit remapped);
    return (remapped && l == 2) ? D2_SPARE : D2_CODE[l];
  endfunction

  function automatic bit is_d2(input logic [3:0] code);
    for (int l = 0; l < 6; l++) if (D2_CODE[l] == code) return 1'b1;
    return 1'b0;
  endfunction

  // random run of the six-state table; starts and ends at a falling edge
  task automatic run_t1(input int cycles, input bit remapped);
    int letter = 0;
    for (int t = 0; t < cycles; t++) begin
      int j;
      j = $urandom_range(M - 1);
      in_state = M'(1 << j);
      @(posedge clk);
      letter = T1_NEXT[letter][j];
      n_input[j]++;
      #1;
      check_both(letter_code(letter, remapped), 1'b0, letter_out(letter), $sformatf("table t=%0d", t));
      if (remapped) check(copy_state[0] != 4'b1100, "faulty state C is not entered");
      if (copy_state[0] == D2_SPARE) n_spare++;
      @(negedge clk);
    end
  endtask

  task automatic program_t4();
    for (int k = 0; k < 7; k++) begin
      write_code(T4_CODE[k], 0, T4_CODE[(k + 1) % 7]);
      write_code(T4_CODE[k], 1, T4_CODE[k]);
      write_code(T4_CODE[k], 2, T4_CODE[0]);
      write_out(T4_CODE[k], 2'((k % 3) + 1));
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    int step;
    for (int j = 0; j < M; j++) n_input[j] = 0;

    // ---- six-state table, unused codes programmed to return to A (safe)
    do_reset();
    init = 1'b1;
    for (int s = 0; s < 16; s++) begin
      for (int c = 0; c < M; c++) begin
        if (is_d2(4'(s))) begin
          for (int l = 0; l < 6; l++)
            if (D2_CODE[l] == 4'(s)) write_code(4'(s), c, D2_CODE[T1_NEXT[l][c]]);
        end else begin
          write_code(4'(s), c, D2_CODE[0]);
        end
      end
    end
    for (int l = 0; l < 6; l++) write_out(D2_CODE[l], letter_out(l));
    @(negedge clk) init = 1'b0;
    check_both(D2_CODE[0], 1'b0, letter_out(0), "after init");
    run_t1(300, 1'b0);

    // safe return: A (0101) under I_1 with the test constant inverted
    init = 1'b1;
    @(negedge clk) init = 1'b0;
    in_state = 3'b001; cycle_test = 1'b1;
    @(posedge clk);
    n_cycle_test++;
    #1 check_both(4'b1101, 1'b1, 2'b00, "cycle test into unused code");
    @(negedge clk) cycle_test = 1'b0;
    @(posedge clk);
    #1 check_both(D2_CODE[0], 1'b0, letter_out(0), "unused code returns to A");
    if (copy_state[0] == D2_CODE[0]) n_safe_return++;

    // ---- adaptive remap of C onto the spare code
    @(negedge clk) init = 1'b1;
    for (int l = 0; l < 6; l++)
      for (int c = 0; c < M; c++)
        if (T1_NEXT[l][c] == 2) write_code(D2_CODE[l], c, D2_SPARE);
    for (int c = 0; c < M; c++) write_code(D2_SPARE, c, letter_code(T1_NEXT[2][c], 1'b1));
    write_out(D2_SPARE, letter_out(2));
    @(negedge clk) init = 1'b0;
    run_t1(300, 1'b1);

    // ---- fail-safe seven-state cycle
    do_reset();
    init = 1'b1;
    program_t4();
    @(negedge clk) init = 1'b0;
    in_state = 3'b001;
    for (int t = 1; t <= 14; t++) begin
      @(posedge clk);
      #1 check_both(T4_CODE[t % 7], 1'b0, 2'((t % 7) % 3 + 1), $sformatf("cycle step %0d", t));
    end
    @(negedge clk) cycle_test = 1'b1;
    @(posedge clk);
    n_cycle_test++;
    #1 check_both(4'b1110, 1'b1, 2'b00, "single constant change");
    @(negedge clk) cycle_test = 1'b0;
    for (int t = 0; t < 6; t++) begin
      in_state = M'(1 << (t % M));
      @(posedge clk);
      #1 check_both(4'b0000, 1'b0, 2'b00, "held in S_0");
      if (copy_state[0] == 4'b0000) n_failsafe_s0++;
      @(negedge clk);
    end

    // ---- checker self-test: fault states cycle among themselves
    do_reset();
    init = 1'b1;
    for (int k = 0; k < 7; k++) write_code(T4_CODE[k], 0, T4_CODE[(k + 1) % 7]);
    for (int i = 0; i < 8; i++)
      for (int c = 0; c < M; c++) write_code(F5_CYCLE[i], c, F5_CYCLE[(i + 1) % 8]);
    @(negedge clk) init = 1'b0;
    in_state = 3'b001; cycle_test = 1'b1;
    @(posedge clk);
    n_cycle_test++;
    #1 check_both(4'b1110, 1'b1, 2'b00, "cycle test enters the fault cycle");
    @(negedge clk) cycle_test = 1'b0;
    seen = '0;
    for (int t = 1; t <= 16; t++) begin
      @(posedge clk);
      #1 check_both(F5_CYCLE[(5 + t) % 8], 1'b1, 2'b00, $sformatf("fault cycle step %0d", t));
      seen[copy_state[0]] = 1'b1;
    end
    n_checker = popcount(32'(seen));
    check(n_checker == 8, $sformatf("%0d of 8 fault states visited", n_checker));

    // ---- single-fault correction by programming neighbours alike
    do_reset();
    init = 1'b1;
    for (int c = 0; c < M; c++) begin
      logic [3:0] na, nb;
      na = (c == 0) ? 4'b1010 : 4'b0101;     // A = 0101: I_1 -> B, else stay
      nb = (c == 0) ? 4'b0101 : 4'b1010;     // B = 1010: I_1 -> A, else stay
      write_code(4'b0101, c, na);
      write_code(4'b1010, c, nb);
      for (int b = 0; b < 4; b++) begin
        write_code(4'b0101 ^ (4'b1 << b), c, na);
        write_code(4'b1010 ^ (4'b1 << b), c, nb);
      end
    end
    write_out(4'b0101, 2'b01);
    write_out(4'b1010, 2'b10);
    for (int b = 0; b < 4; b++) write_out(4'b1010 ^ (4'b1 << b), 2'b10);
    @(negedge clk) init = 1'b0;
    in_state = 3'b001;
    for (int t = 0; t < 3; t++) begin
      cycle_test = 1'b1;                      // A -> 1011 instead of 1010
      @(posedge clk);
      n_cycle_test++;
      #1 check_both(4'b1011, 1'b1, 2'b10, "fault lands next to B");
      @(negedge clk) cycle_test = 1'b0;
      @(posedge clk);
      #1 check_both(4'b0101, 1'b0, 2'b01, "corrected: on to A");
      if (copy_state[0] == 4'b0101) n_corrected++;
      @(negedge clk);
    end

    // ---- fault masking: y_1 of copy 0 stuck at 1 under the fail-safe program
    do_reset();
    init = 1'b1;
    program_t4();
    @(negedge clk) init = 1'b0;
    in_state = 3'b001;
    step = 0;
    for (int t = 1; t <= 21; t++) begin
      if (t == 8) force dut.g_copy[0].u_ctrl.u_core.g_var[3].u_cell.q = 1'b1;
      @(posedge clk);
      #1;
      step = t % 7;
      check(copy_state[1] == T4_CODE[step] && !copy_fault[1], $sformatf("fault-free copy step %0d", t));
      check(outs == 2'(step % 3 + 1), $sformatf("combined outputs at step %0d: %b", t, outs));
      if (t >= 8) begin
        // copy 0 reads 1101 (fault) then settles in 1000, a fault state with safe outputs
        check(copy_state[0][3] == 1'b1 && copy_fault[0] && copy_outs[0] == 2'b00,
              $sformatf("stuck copy state %b fault %b outs %b", copy_state[0], copy_fault[0], copy_outs[0]));
        if (copy_fault[0]) n_fault_flag++;
        if (copy_outs[0] != copy_outs[1] && outs == copy_outs[1]) n_masked++;
      end
      if (t >= 10) check(copy_state[0] == 4'b1000, "stuck copy stable in 1000");
    end
    release dut.g_copy[0].u_ctrl.u_core.g_var[3].u_cell.q;
    in_state = '0;

    // ---- every mechanism must have happened
    for (int j = 0; j < M; j++) check(n_input[j] > 0, $sformatf("input I_%0d used", j + 1));
    check(n_cycle_test == 6, "cycle test applied");
    check(n_corrected > 0, "single fault corrected by the program");
    check(n_safe_return > 0, "safe return from an unused code");
    check(n_spare > 0, "spare state used after adaptive remap");
    check(n_fault_flag > 0, "fault flag raised");
    check(n_failsafe_s0 > 0, "fail-safe entry into S_0");
    check(n_masked > 0, "faulty copy masked by the output gate");
    $display("mechanisms: I1=%0d I2=%0d I3=%0d cycle_test=%0d safe_return=%0d spare=%0d fault_flag=%0d s0=%0d checker_states=%0d corrected=%0d masked=%0d",
             n_input[0], n_input[1], n_input[2], n_cycle_test, n_safe_return, n_spare,
             n_fault_flag, n_failsafe_s0, n_checker, n_corrected, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
