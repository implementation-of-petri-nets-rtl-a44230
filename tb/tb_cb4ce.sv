// tb_cb4ce: random clock enable and asynchronous clear. A reference count
// is kept here; q, tc and ceo are compared after every edge, and the clear
// is applied between clock edges to check that it acts without a clock.
`timescale 1ns/1ps
module tb_cb4ce;
  logic clk = 0, ce = 0, clr = 1;
  logic [3:0] q;
  logic ceo, tc;
  int checks = 0, failures = 0, wraps = 0;
  always #5 clk = ~clk;
  cb4ce dut (.clk, .ce, .clr, .q, .ceo, .tc);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_q;
  task automatic compare(string what);
    checks++;
    if (q !== 4'(ref_q) || tc !== (ref_q == 15) || ceo !== ((ref_q == 15) && ce)) begin
      failures++;
      $display("FAIL %s q=%0d ref=%0d tc=%b ceo=%b ce=%b", what, q, ref_q, tc, ceo, ce);
    end
  endtask

  initial begin
    ref_q = 0;
    @(posedge clk); #1 compare("clr held");
    clr = 0;
    for (int n = 0; n < 1200; n++) begin
      ce = ($urandom % 8) != 0;
      #1 compare("comb");
      @(posedge clk);
      if (ce) begin
        if (ref_q == 15) wraps++;
        ref_q = (ref_q + 1) % 16;
      end
      #1 compare("count");
      if ($urandom % 97 == 0) begin
        #2 clr = 1; ref_q = 0;
        #1 compare("async clear");
        #1 clr = 0;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
