// tb_pn_transfer_and: a token in X must appear in both Y1 and Y2 two clock
// edges later; random input sequence.
`timescale 1ns/1ps
module tb_pn_transfer_and;
  logic clk = 0, rst = 1, x = 0, y1, y2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pn_transfer_and dut (.clk, .rst, .x, .y1, .y2);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic h [2];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    h = '{1'b0, 1'b0};
    for (int n = 0; n < 400; n++) begin
      x = 1'($urandom);
      @(posedge clk); #1;
      // h[1] is the input of two edges back
      h[1] = h[0]; h[0] = x;
      checks++;
      if (n >= 1 && (y1 !== h[1] || y2 !== h[1])) begin
        failures++; $display("FAIL n=%0d y1=%b y2=%b exp=%b", n, y1, y2, h[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
