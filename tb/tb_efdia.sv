// tb_efdia: the three failure scenarios of the EFDIA at default parameters
// (timers of 20 s on a 15-tick second; f15_tick every cycle, so 1 s = 15
// cycles and a timer run = 300 cycles).
//  1. TI-1S low, PIA pressed 7 s after the warning: no failure, the
//     maintenance counter counts once after the 20 s maintenance time, the
//     error flag PIE is set and IRE logs the error.
//  2. TI-1S high before SIN: PIB2 inhibits PIE; IRW logs a warning of the
//     next-lower subsystem, IRR logs R, PIA starts maintenance, no failure.
//  3. TI-1S low, no PIA: PI and ASFM rise exactly 2 + 300 cycles after SIN
//     for one second (15 cycles), the failure counter counts once.
// Between scenarios the counters are cleared through their clear pins.
`timescale 1ns/1ps
module tb_efdia;
  import pn_pkg::*;
  localparam int PRESCALE = 15, N = 20;
  logic clk = 0, rst = 1, f15_tick = 1;
  efdia_in_t  i;
  efdia_out_t o;
  int checks = 0, failures = 0;
  int pi_rises = 0;
  logic pi_q = 0;
  always #5 clk = ~clk;

  efdia dut (.clk, .rst, .f15_tick, .i, .o);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    pi_q <= o.pi;
    if (o.pi && !pi_q) pi_rises++;
    if (!rst && o.asfm !== o.pi) begin failures++; $display("FAIL asfm != pi"); end
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // Holds one input pin high for a number of cycles.
  task automatic press(string pin, int cycles);
    @(negedge clk) drive(pin, 1'b1);
    repeat (cycles) @(negedge clk);
    drive(pin, 1'b0);
  endtask

  task automatic drive(string pin, logic v);
    case (pin)
      "pia": i.pia = v;
      "irw": i.irw = v;
      "irr": i.irr = v;
      "ire": i.ire = v;
      default: $fatal(1, "unknown pin %s", pin);
    endcase
  endtask

  task automatic clear_counters();
    @(negedge clk) {i.cpi_1w, i.cpir, i.cpim, i.cpil, i.cpif} = '1;
    #1 check({o.pwq, o.prq, o.plq, o.pmq, o.pfq} == '0, "counters clear without a clock");
    @(negedge clk) {i.cpi_1w, i.cpir, i.cpim, i.cpil, i.cpif} = '0;
  endtask

  task automatic counters(logic [3:0] w, r, l, m, f, string what);
    check(o.pwq == w && o.prq == r && o.plq == l && o.pmq == m && o.pfq == f,
          $sformatf("%s: counters W R L M F = %0d %0d %0d %0d %0d", what, o.pwq, o.prq, o.plq, o.pmq, o.pfq));
  endtask

  initial begin
    int t, rises0;
    i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    counters(0, 0, 0, 0, 0, "after reset");

    // ---------------- scenario 1 ----------------
    @(negedge clk) i.sin = 1;
    repeat (2) @(negedge clk);
    check(o.pib1 && o.iws && o.pit && o.nhpb2 && !o.pib2, "S1 places marked by SIN");
    check(o.pie, "S1 PIE set (error in subsystem i)");
    repeat (PRESCALE * 7) @(negedge clk);
    check(dut.u_h4.busy, "S1 H4 counting before PIA");
    press("pia", 4);
    check(!dut.u_h4.busy && dut.u_h3.busy, "S1 PIA stopped H4 and started H3");
    t = 0;
    while (o.pmq == 0 && t < 400) begin @(negedge clk); t++; end
    check(t >= PRESCALE * N - 5 && t <= PRESCALE * N + 5, $sformatf("S1 maintenance logged after %0d cycles", t));
    repeat (PRESCALE * 2) @(negedge clk);
    press("ire", 2);
    @(negedge clk);
    counters(0, 0, 1, 1, 0, "S1 end");
    check(pi_rises == 0, "S1 no failure");
    @(negedge clk) i.sin = 0;
    repeat (3) @(negedge clk);
    check(!o.pib1 && !o.iws && !o.pit && !o.nhpb2 && !o.pie, "S1 places empty after SIN falls");
    repeat (PRESCALE * 25) @(negedge clk);
    check(pi_rises == 0 && o.pmq == 1, "S1 H4 did not restart");
    clear_counters();

    // ---------------- scenario 2 ----------------
    @(negedge clk) i.ti_1s = 1;
    repeat (3) @(negedge clk) i.sin = 1;
    repeat (3) @(negedge clk);
    check(o.pib2 && o.pib1 && o.iws && o.pit && o.nhpb2, "S2 places marked");
    check(!o.pie, "S2 PIE inhibited by PIB2");
    repeat (PRESCALE * 9) @(negedge clk);
    press("irw", 2);
    press("pia", 4);
    t = 0;
    while (o.pmq == 0 && t < 400) begin @(negedge clk); t++; end
    check(t >= PRESCALE * N - 5 && t <= PRESCALE * N + 5, $sformatf("S2 maintenance logged after %0d cycles", t));
    press("irr", 2);
    press("ire", 2);
    @(negedge clk);
    counters(1, 1, 0, 1, 0, "S2 end");
    check(!o.pie && pi_rises == 0, "S2 no error flag, no failure");
    @(negedge clk) i.sin = 0;
    repeat (PRESCALE * 3) @(negedge clk) i.ti_1s = 0;
    repeat (3) @(negedge clk);
    check(!o.pib2 && !o.pib1, "S2 places empty");
    clear_counters();

    // ---------------- scenario 3 ----------------
    rises0 = pi_rises;
    @(negedge clk) i.sin = 1;
    @(posedge clk);
    t = 0;
    while (!o.pi && t < 400) begin @(posedge clk); #1 t++; end
    check(t == 2 + PRESCALE * N, $sformatf("S3 PI rose %0d cycles after SIN was sampled", t));
    check(o.pie, "S3 PIE set");
    t = 0;
    while (o.pi && t < 100) begin @(posedge clk); #1 t++; end
    check(t == PRESCALE, $sformatf("S3 PI high for %0d cycles", t));
    press("ire", 2);
    @(negedge clk);
    counters(0, 0, 1, 0, 1, "S3 end");
    check(pi_rises == rises0 + 1, "S3 exactly one failure");
    @(negedge clk) i.sin = 0;
    repeat (5) @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
