// tb_bcd_counter: decade counter against a reference: random enables,
// synchronous loads and an asynchronous clear between clock edges; q must
// stay in 0..9 and rco must be ent & (q == 9).
`timescale 1ns/1ps
module tb_bcd_counter;
  logic clk = 0, clr_n = 0, load_n = 1, enp = 0, ent = 0;
  logic [3:0] d = 0, q;
  logic rco;
  int checks = 0, failures = 0, wraps = 0;
  always #5 clk = ~clk;
  bcd_counter dut (.clk, .clr_n, .load_n, .enp, .ent, .d, .q, .rco);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_q;
  task automatic compare(string what);
    checks++;
    if (q !== 4'(ref_q) || rco !== (ent && ref_q == 9)) begin
      failures++;
      $display("FAIL %s q=%0d ref=%0d rco=%b", what, q, ref_q, rco);
    end
  endtask

  initial begin
    ref_q = 0;
    @(posedge clk); #1 compare("clear");
    clr_n = 1;
    for (int n = 0; n < 1500; n++) begin
      enp = ($urandom % 4) != 0;
      ent = ($urandom % 4) != 0;
      load_n = ($urandom % 29) != 0;
      d = 4'($urandom % 10);
      #1 compare("comb");
      @(posedge clk);
      if (!load_n) ref_q = d;
      else if (enp && ent) begin
        if (ref_q == 9) wraps++;
        ref_q = (ref_q == 9) ? 0 : ref_q + 1;
      end
      #1 compare("edge");
      if ($urandom % 101 == 0) begin
        #2 clr_n = 0; ref_q = 0;
        #1 compare("async clear");
        #1 clr_n = 1;
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
