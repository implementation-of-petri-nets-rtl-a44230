// tb_pn_transfer_or: the token of X goes to Y1 when X1 is high and to Y2
// when X2 is high. Expected after an edge: y1 = (x applied before the
// previous edge) & (x1 applied before this edge),
// likewise y2 with x2.
`timescale 1ns/1ps
module tb_pn_transfer_or;
  logic clk = 0, rst = 1, x = 0, x1 = 0, x2 = 0, y1, y2;
  int checks = 0, failures = 0;
  int seen_y1_only = 0, seen_y2_only = 0;
  always #5 clk = ~clk;
  pn_transfer_or dut (.clk, .rst, .x, .x1, .x2, .y1, .y2);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic xa, xb, c1, c2;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    xa = 0; xb = 0; c1 = 0; c2 = 0;
    for (int n = 0; n < 400; n++) begin
      x = 1'($urandom); x1 = 1'($urandom); x2 = 1'($urandom);
      @(posedge clk); #1;
      // place X loaded at this edge: xa; transitions saw xb with c1/c2
      xb = xa; xa = x; c1 = x1; c2 = x2;
      checks++;
      if (n >= 1 && (y1 !== (xb & c1) || y2 !== (xb & c2))) begin
        failures++; $display("FAIL n=%0d y=%b%b exp=%b%b", n, y1, y2, xb & c1, xb & c2);
      end
      if (y1 && !y2) seen_y1_only++;
      if (y2 && !y1) seen_y2_only++;
    end
    checks++;
    if (seen_y1_only == 0 || seen_y2_only == 0) begin failures++; $display("FAIL a branch was never taken alone"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
