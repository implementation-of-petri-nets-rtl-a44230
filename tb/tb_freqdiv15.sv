// tb_freqdiv15: feeds random in_tick pulses and checks that out_tick comes
// with exactly every 15th of them (and never without one); a clr restarts
// the count.
`timescale 1ns/1ps
module tb_freqdiv15;
  logic clk = 0, rst = 1, clr = 0, in_tick = 0, out_tick;
  int checks = 0, failures = 0, outs = 0;
  always #5 clk = ~clk;
  freqdiv15 dut (.clk, .rst, .clr, .in_tick, .out_tick);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen;  // in_tick pulses since the last output
    repeat (2) @(posedge clk);
    #1 rst = 0;
    seen = 0;
    for (int n = 0; n < 6000; n++) begin
      in_tick = ($urandom % 3) == 0;
      clr = ($urandom % 1500) == 0;
      #1;
      checks++;
      if (out_tick !== (in_tick && seen == 14)) begin
        failures++; $display("FAIL n=%0d out=%b in=%b seen=%0d", n, out_tick, in_tick, seen);
      end
      @(posedge clk);
      if (clr) begin
        if (in_tick && seen == 14) outs++;
        seen = 0;
      end else if (in_tick) begin
        if (seen == 14) begin seen = 0; outs++; end
        else seen++;
      end
      #1;
    end
    checks++;
    if (outs < 50) begin failures++; $display("FAIL only %0d outputs", outs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
