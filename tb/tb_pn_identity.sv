// tb_pn_identity: the place stays empty until the first token arrives, then
// keeps its token whatever the input does, until reset.
`timescale 1ns/1ps
module tb_pn_identity;
  logic clk = 0, rst = 1, x = 0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pn_identity dut (.clk, .rst, .x, .y);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(logic e, string what);
    checks++;
    if (y !== e) begin failures++; $display("FAIL %s y=%b exp=%b", what, y, e); end
  endtask

  initial begin
    logic held;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int round = 0; round < 3; round++) begin
      held = 0;
      x = 0;
      repeat (5) begin @(posedge clk); #1 expect_y(0, "empty"); end
      for (int n = 0; n < 100; n++) begin
        x = (n > 10) ? 1'($urandom) : 1'b0;
        @(posedge clk); #1;
        held = held | x;
        expect_y(held, "hold");
      end
      rst = 1; @(posedge clk); #1 expect_y(0, "reset"); rst = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
