// input_switch_matrix_tb: random check of the input-state selection.
//
// For random destination-code bits and every one-hot input state (and the
// idle all-zero input), each row must carry the bit of the active column, or
// 0 when no column is active. Size: three state variables, three inputs.
module input_switch_matrix_tb;
  localparam int N = 3, M = 3, NS = 1 << N;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M-1:0]         in_state;
  logic [NS-1:0][M-1:0] consts;
  logic [NS-1:0]        row_bits;

  input_switch_matrix #(.N(N), .M(M)) dut (.in_state(in_state), .consts(consts), .row_bits(row_bits));

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
    for (int t = 0; t < 100; t++) begin
      @(posedge clk);
      consts = (NS*M)'({$urandom, $urandom});
      for (int j = -1; j < M; j++) begin
        in_state = (j < 0) ? '0 : M'(1 << j);
        #1;
        for (int s = 0; s < NS; s++) begin
          logic exp;
          exp = (j < 0) ? 1'b0 : consts[s][j];
          check(row_bits[s] === exp,
                $sformatf("row %0d col %0d consts=%b got %b", s, j, consts[s], row_bits[s]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
