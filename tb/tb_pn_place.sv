// tb_pn_place: checks that a place takes the token on its input at each
// rising clock edge and that reset empties it. Random input sequence; the
// expected value is the input of the previous cycle.
`timescale 1ns/1ps
module tb_pn_place;
  logic clk = 0, rst = 1, d = 0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pn_place dut (.clk, .rst, .d, .q);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_q;
    d = 1;
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset q=%b", q); end
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      d = 1'($urandom);
      exp_q = d;
      @(posedge clk); #1;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL n=%0d q=%b exp=%b", n, q, exp_q); end
    end
    d = 1; @(posedge clk); #1 rst = 1; @(posedge clk); #1;
    checks++; if (q !== 1'b0) begin failures++; $display("FAIL reset while d=1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
