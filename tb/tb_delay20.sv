// tb_delay20: the timer against a cycle-level reference model written here
// (run flag plus a count of base ticks since the start). Checked every cycle:
// out2, busy and the BCD count. Scenarios: a run with base_tick every cycle
// (out2 must rise exactly PRESCALE*N cycles after the start edge and stay
// high PRESCALE cycles), a run stopped half way, a start attempted while
// stop is high, a second trigger edge during a run, and runs with a random
// time base. Default parameters (15 and 20).
`timescale 1ns/1ps
module tb_delay20;
  localparam int PRESCALE = 15, N = 20;
  logic clk = 0, rst = 1, base_tick = 0, in2 = 0, stop = 0;
  logic out2, busy;
  logic [7:0] count;
  int checks = 0, failures = 0;
  int completed = 0, stopped = 0;
  always #5 clk = ~clk;

  delay20 dut (.clk, .rst, .base_tick, .in2, .stop, .out2, .busy, .count);

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model
  logic r_run = 0, r_in2 = 0;
  int   r_ticks = 0;
  always @(posedge clk) begin
    if (rst) begin
      r_run <= 0; r_ticks <= 0; r_in2 <= 0;
    end else begin
      r_in2 <= in2;
      if (stop) begin
        if (r_run) stopped++;
        r_run <= 0; r_ticks <= 0;
      end else if (r_run && base_tick) begin
        if (r_ticks + 1 == PRESCALE * (N + 1)) begin
          r_run <= 0; r_ticks <= 0; completed++;
        end else r_ticks <= r_ticks + 1;
      end else if (!r_run && in2 && !r_in2) r_run <= 1;
    end
  end

  always @(negedge clk) if (!rst) begin
    int secs;
    secs = r_ticks / PRESCALE;
    checks++;
    if (out2 !== (r_run && r_ticks >= PRESCALE * N) || busy !== r_run ||
        count !== {4'(secs / 10), 4'(secs % 10)}) begin
      failures++;
      $display("FAIL t=%0t out2=%b busy=%b count=%h | run=%b ticks=%0d", $time, out2, busy, count, r_run, r_ticks);
    end
  end

  task automatic pulse_in2();
    @(negedge clk) in2 = 1;
    repeat (3) @(negedge clk);
    in2 = 0;
  endtask

  initial begin
    int t_rise, t_fall, t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0; base_tick = 1;
    // 1: exact timing with base_tick every cycle
    @(negedge clk) in2 = 1;
    @(posedge clk) t0 = 0;
    t_rise = -1; t_fall = -1;
    for (int c = 1; c < 400; c++) begin
      @(posedge clk); #1;
      if (out2 && t_rise < 0) t_rise = c;
      if (!out2 && t_rise >= 0 && t_fall < 0) t_fall = c;
    end
    in2 = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (t_rise != PRESCALE * N || t_fall - t_rise != PRESCALE) begin
      failures++; $display("FAIL timing rise=%0d width=%0d", t_rise, t_fall - t_rise);
    end
    // 2: stop half way
    pulse_in2();
    repeat (PRESCALE * 7) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    repeat (PRESCALE * 25) @(negedge clk);
    // 3: start edge while stop is high is ignored
    stop = 1; pulse_in2(); stop = 0;
    repeat (50) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL started while stopped"); end
    // 4: second trigger edge during a run does not restart it
    pulse_in2();
    repeat (PRESCALE * 10) @(negedge clk);
    pulse_in2();
    repeat (PRESCALE * 15) @(negedge clk);
    // 5: random time base
    for (int k = 0; k < 3; k++) begin
      pulse_in2();
      for (int c = 0; c < PRESCALE * (N + 2) * 3; c++) begin
        @(negedge clk) base_tick = ($urandom % 3) == 0;
      end
    end
    base_tick = 1;
    repeat (PRESCALE * (N + 2)) @(negedge clk);
    checks++;
    if (completed < 5 || stopped < 1) begin
      failures++; $display("FAIL completed=%0d stopped=%0d", completed, stopped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
