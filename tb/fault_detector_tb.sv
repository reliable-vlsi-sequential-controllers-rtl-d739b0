// fault_detector_tb: exhaustive check of both detector constructions.
//
// For every code of three, four and five state variables the detector must
// flag exactly the odd-parity (fault) states, in the exclusive-or and in the
// replicated-BTS construction alike.
module fault_detector_tb;
  import rsc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] s3; logic [3:0] s4; logic [4:0] s5;
  logic f3x, f3b, f4x, f4b, f5x;

  fault_detector #(.N(3), .MODE(DET_XOR)) d3x (.state(s3), .fault(f3x));
  fault_detector #(.N(3), .MODE(DET_BTS)) d3b (.state(s3), .fault(f3b));
  fault_detector #(.N(4), .MODE(DET_XOR)) d4x (.state(s4), .fault(f4x));
  fault_detector #(.N(4), .MODE(DET_BTS)) d4b (.state(s4), .fault(f4b));
  fault_detector                          d5x (.state(s5[3:0]), .fault(f5x));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic odd(input int unsigned v);
    int unsigned ones = 0;
    for (int b = 0; b < 8; b++) ones += v[b];
    return (ones % 2) == 1;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(posedge clk);
      s3 = 3'(v); s4 = 4'(v); s5 = 5'(v);
      #1;
      if (v < 8) begin
        check(f3x == odd(v), $sformatf("N=3 XOR state %b got %b", s3, f3x));
        check(f3b == odd(v), $sformatf("N=3 BTS state %b got %b", s3, f3b));
      end
      if (v < 16) begin
        check(f4x == odd(v), $sformatf("N=4 XOR state %b got %b", s4, f4x));
        check(f4b == odd(v), $sformatf("N=4 BTS state %b got %b", s4, f4b));
        check(f5x == odd(v), $sformatf("default state %b got %b", s4, f5x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
