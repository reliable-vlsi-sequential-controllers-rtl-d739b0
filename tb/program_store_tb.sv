// program_store_tb: reset and write check of the flow-table register.
//
// After reset every destination code and output word must be 0. Random
// writes through both ports are mirrored in a reference table and the whole
// register contents compared every cycle; a write to a column number beyond
// the last input must change nothing. Size: four state variables, three
// inputs, two outputs.
module program_store_tb;
  localparam int N = 4, M = 3, P = 2, NS = 1 << N;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0;
  logic dc_we = 1'b0, ow_we = 1'b0;
  logic [N-1:0] dc_state = '0, dc_code = '0, ow_state = '0;
  logic [1:0]   dc_col = '0;
  logic [P-1:0] ow_data = '0;
  logic [NS-1:0][M-1:0][N-1:0] dest_codes;
  logic [NS-1:0][P-1:0]        out_table;

  logic [N-1:0] ref_dc [NS][M];
  logic [P-1:0] ref_ow [NS];

  program_store #(.N(N), .M(M), .P(P)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic compare_all();
    for (int s = 0; s < NS; s++) begin
      for (int j = 0; j < M; j++)
        check(dest_codes[s][j] == ref_dc[s][j],
              $sformatf("code[%0d][%0d]=%b want %b", s, j, dest_codes[s][j], ref_dc[s][j]));
      check(out_table[s] == ref_ow[s], $sformatf("out[%0d]=%b want %b", s, out_table[s], ref_ow[s]));
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NS; s++) begin
      ref_ow[s] = '0;
      for (int j = 0; j < M; j++) ref_dc[s][j] = '0;
    end
    repeat (2) @(negedge clk);
    compare_all();
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      dc_we = 1'($urandom); dc_state = N'($urandom); dc_col = 2'($urandom); dc_code = N'($urandom);
      ow_we = 1'($urandom); ow_state = N'($urandom); ow_data = P'($urandom);
      @(posedge clk);
      if (dc_we && int'(dc_col) < M) ref_dc[dc_state][dc_col] = dc_code;
      if (ow_we) ref_ow[ow_state] = ow_data;
      @(negedge clk);
      dc_we = 1'b0; ow_we = 1'b0;
      compare_all();
    end
    // asynchronous reset clears everything again
    rst_n = 1'b0;
    #1;
    for (int s = 0; s < NS; s++) begin
      ref_ow[s] = '0;
      for (int j = 0; j < M; j++) ref_dc[s][j] = '0;
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
