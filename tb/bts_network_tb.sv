// bts_network_tb: exhaustive check of the general BTS network.
//
// For random constant patterns and every select value, the output of a
// three-variable network (the size of the general three-variable example) and
// of a four-variable network must equal the constant at the leaf whose index
// is the select value with x_1 as the most significant bit. A fixed pattern
// realising the majority function of three variables is also checked.
module bts_network_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  c3;  logic [2:0] s3;  logic y3;
  logic [15:0] c4;  logic [3:0] s4;  logic y4;

  bts_network #(.N(3)) dut3 (.consts(c3), .sel(s3), .y(y3));
  bts_network #(.N(4)) dut4 (.consts(c4), .sel(s4), .y(y4));

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
    // majority of x1,x2,x3: 1 where at least two of the select bits are 1
    c3 = 8'b1110_1000;
    for (int s = 0; s < 8; s++) begin
      s3 = 3'(s);
      #1;
      check(y3 == ((s[2] & s[1]) | (s[2] & s[0]) | (s[1] & s[0])),
            $sformatf("majority sel=%b y=%b", s3, y3));
    end
    for (int t = 0; t < 50; t++) begin
      @(posedge clk);
      c3 = 8'($urandom);
      c4 = 16'($urandom);
      for (int s = 0; s < 16; s++) begin
        s3 = 3'(s);
        s4 = 4'(s);
        #1;
        if (s < 8) check(y3 === c3[s], $sformatf("N=3 consts=%h sel=%0d y=%b", c3, s, y3));
        check(y4 === c4[s], $sformatf("N=4 consts=%h sel=%0d y=%b", c4, s, y4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
