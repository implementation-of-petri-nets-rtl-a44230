// tb_pn_fpga_top: end-to-end test of the whole design at its default
// parameters (no parameter overrides), driven only through the top's pins.
//
// EFDIA part: the three failure scenarios through the board switches and
// pushbuttons (TI-1S low with maintenance in time, TI-1S high with
// maintenance, TI-1S low without maintenance), then clearing every counter.
// Expected LED and display states are worked out here. Macro-library part:
// random inputs on every relation and on TRANSFER AND / TRANSFER OR /
// IDENTITY, checked cycle by cycle against truth tables written here.
// Each mechanism the design has is counted and must occur at least once:
// warning, failure by lead-time expiry, lead-time timer stopped by
// maintenance, maintenance completed, error flag inhibited by a next-lower
// cause, each of the five counters counting and being cleared, and every
// macro output both 0 and 1.
`timescale 1ns/1ps
module tb_pn_fpga_top;
  import pn_pkg::*;
  localparam int PRESCALE = 15, N = 20, NR = 10;
  logic clk = 0, rst = 1, f15_tick = 1;
  logic [7:0] sw3 = '0;
  logic sw4_n = 1, sw5_n = 1, cpif = 0;
  logic [7:0] led_n;
  logic [6:0] u7_seg_n, u8_seg_n;
  logic [5:0] aux_q;
  logic [NR-1:0] lib_x1 = '0, lib_x2 = '0, lib_y;
  logic ta_x = 0, ta_y1, ta_y2, to_x = 0, to_x1 = 0, to_x2 = 0, to_y1, to_y2, id_x = 0, id_y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pn_fpga_top dut (.*);

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // ---------------- mechanism counters ----------------
  typedef enum int { M_WARNING, M_FAILURE, M_H4_STOPPED, M_MAINT_DONE, M_INHIBIT,
                     M_CNT_W, M_CNT_R, M_CNT_L, M_CNT_M, M_CNT_F, M_CLEAR, M_LIB, M_NUM } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"warning", "failure", "H4 stopped by PIA", "maintenance done",
                               "PIE inhibited", "W count", "R count", "L count", "M count",
                               "F count", "counter clear", "library outputs 0 and 1"};

  // decoded board outputs (LEDs D9..D16 and segments are active low)
  logic pi_led, asfm_led, iws_led, pie_led, pib2_led;
  logic [1:0] w_lo, r_lo, m_lo;
  logic       l0, f0;
  always_comb begin
    pi_led = ~led_n[0]; asfm_led = ~led_n[1]; iws_led = ~led_n[2];
    pib2_led = ~led_n[6]; pie_led = ~led_n[7];
    w_lo = ~u7_seg_n[1:0];              // b, a
    r_lo = ~{u7_seg_n[2], u7_seg_n[6]}; // c, g
    l0   = ~u7_seg_n[3];                // d
    m_lo = ~u8_seg_n[1:0];              // b, a
    f0   = ~u8_seg_n[6];                // g
  end

  logic pi_q = 0, iws_q = 0, h4_busy_q = 0;
  logic [1:0] w_q = 0, r_q = 0, m_q = 0;
  logic l_q = 0, f_q = 0;
  always @(posedge clk) if (!rst) begin
    if (iws_led && !iws_q) mech[M_WARNING]++;
    if (pi_led && !pi_q) mech[M_FAILURE]++;
    if (w_lo != w_q && w_lo != 0) mech[M_CNT_W]++;
    if (r_lo != r_q && r_lo != 0) mech[M_CNT_R]++;
    if (l0 && !l_q) mech[M_CNT_L]++;
    if (m_lo != m_q && m_lo != 0) begin mech[M_CNT_M]++; mech[M_MAINT_DONE]++; end
    if (f0 && !f_q) mech[M_CNT_F]++;
    // H4 ends without reaching its output: stopped (internal probe)
    if (h4_busy_q && !dut.u_board.u_efdia.u_h4.busy && !dut.u_board.u_efdia.u_h4.out2) mech[M_H4_STOPPED]++;
    if (iws_led && !iws_q && pib2_led) begin
      if (!pie_led) mech[M_INHIBIT]++;
    end
    pi_q <= pi_led; iws_q <= iws_led; w_q <= w_lo; r_q <= r_lo; m_q <= m_lo; l_q <= l0; f_q <= f0;
    h4_busy_q <= dut.u_board.u_efdia.u_h4.busy;
    check(pi_led == asfm_led, "ASFM LED follows PI LED");
  end

  // ---------------- macro library checking ----------------
  function automatic logic rel_model(int k, logic a, logic b);
    logic [3:0] tt [NR] = '{4'b1100, 4'b1000, 4'b1110, 4'b0011, 4'b0010,
                            4'b1011, 4'b0111, 4'b0001, 4'b0110, 4'b1001};
    return tt[k][{a, b}];
  endfunction

  logic [NR-1:0] x1_d1 = 0, x1_d2 = 0, x2_d1 = 0, x2_d2 = 0, seen0 = 0, seen1 = 0;
  logic ta_d1 = 0, ta_d2 = 0, to_d1 = 0, to_d2 = 0, id_ref = 0;
  logic lib_on = 0;
  int to_b1 = 0, to_b2 = 0;
  always @(posedge clk) if (lib_on) begin
    x1_d2 <= x1_d1; x1_d1 <= lib_x1; x2_d2 <= x2_d1; x2_d1 <= lib_x2;
    ta_d2 <= ta_d1; ta_d1 <= ta_x; to_d2 <= to_d1; to_d1 <= to_x;
    id_ref <= id_ref | id_x;
    lib_x1 <= NR'($urandom); lib_x2 <= NR'($urandom);
    ta_x <= 1'($urandom); to_x <= 1'($urandom); to_x1 <= 1'($urandom); to_x2 <= 1'($urandom);
    id_x <= ($urandom % 200) == 0;
  end
  always @(negedge clk) if (lib_on) begin
    for (int k = 0; k < NR; k++) begin
      check(lib_y[k] == rel_model(k, x1_d2[k], x2_d2[k]), $sformatf("relation %0d", k));
      if (lib_y[k]) seen1[k] = 1; else seen0[k] = 1;
    end
    check(ta_y1 == ta_d2 && ta_y2 == ta_d2, "TRANSFER AND");
    check(id_y == id_ref, "IDENTITY");
    if (to_y1) to_b1++;
    if (to_y2) to_b2++;
  end
  // TRANSFER OR: sampled at the edge, y = x(two edges back) & cond(one edge back)
  logic to_c1 = 0, to_c2 = 0;
  always @(posedge clk) if (lib_on) begin to_c1 <= to_x1; to_c2 <= to_x2; end
  always @(negedge clk) if (lib_on) check(to_y1 == (to_d2 & to_c1) && to_y2 == (to_d2 & to_c2), "TRANSFER OR");

  // ---------------- EFDIA scenario helpers ----------------
  task automatic tap_sw(int n);
    @(negedge clk) sw3[n] = 1;
    repeat (2) @(negedge clk);
    sw3[n] = 0;
    repeat (2) @(negedge clk);
  endtask
  task automatic tap_ire();
    @(negedge clk) sw4_n = 0; repeat (2) @(negedge clk); sw4_n = 1; repeat (2) @(negedge clk);
  endtask
  task automatic tap_pia();
    @(negedge clk) sw5_n = 0; repeat (4) @(negedge clk); sw5_n = 1;
  endtask
  task automatic wait_m(int target, output int t);
    t = 0;
    while (m_lo != 2'(target) && t < 500) begin @(negedge clk); t++; end
  endtask

  initial begin
    int t;
    for (int k = 0; k < M_NUM; k++) mech[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk) lib_on = 1;

    // Scenario 1: TI-1S low, PIA 7 s after the warning
    @(negedge clk) sw3[2] = 1;
    repeat (PRESCALE * 7) @(negedge clk);
    check(iws_led && pie_led && !pib2_led, "S1 warning with error flag");
    tap_pia();
    wait_m(1, t);
    check(t > PRESCALE * N - 10 && t < PRESCALE * N + 10, $sformatf("S1 maintenance time %0d", t));
    tap_ire();
    check(l0, "S1 error logged");
    @(negedge clk) sw3[2] = 0;
    repeat (PRESCALE * 25) @(negedge clk);
    check(mech[M_FAILURE] == 0, "S1 no failure");

    // Scenario 2: TI-1S high, then SIN; IRW, PIA, IRR
    @(negedge clk) sw3[1] = 1;
    repeat (3) @(negedge clk) sw3[2] = 1;
    repeat (PRESCALE * 5) @(negedge clk);
    check(!pie_led && pib2_led, "S2 error flag inhibited");
    tap_sw(3);
    tap_pia();
    wait_m(2, t);
    check(t > PRESCALE * N - 10 && t < PRESCALE * N + 10, $sformatf("S2 maintenance time %0d", t));
    tap_sw(4);
    check(w_lo == 1 && r_lo == 1, "S2 W and R logged");
    @(negedge clk) sw3[2] = 0;
    repeat (PRESCALE * 3) @(negedge clk) sw3[1] = 0;
    check(mech[M_FAILURE] == 0, "S2 no failure");

    // Scenario 3: TI-1S low, no maintenance
    @(negedge clk) sw3[2] = 1;
    t = 0;
    while (!pi_led && t < 500) begin @(negedge clk); t++; end
    check(t >= PRESCALE * N && t <= PRESCALE * N + 3, $sformatf("S3 failure after %0d cycles", t));
    repeat (PRESCALE + 2) @(negedge clk);
    check(!pi_led && f0, "S3 failure pulse ended and logged");
    tap_ire();
    @(negedge clk) sw3[2] = 0;
    repeat (3) @(negedge clk);

    // clear every counter
    @(negedge clk) begin sw3[0] = 1; sw3[5] = 1; sw3[6] = 1; sw3[7] = 1; cpif = 1; end
    @(negedge clk) begin sw3[0] = 0; sw3[5] = 0; sw3[6] = 0; sw3[7] = 0; cpif = 0; end
    @(negedge clk);
    if (u7_seg_n == 7'h7F && u8_seg_n == 7'h7F && aux_q == 0) mech[M_CLEAR]++;
    check(u7_seg_n == 7'h7F && u8_seg_n == 7'h7F && aux_q == 0, "all counters cleared");

    lib_on = 0;
    if (seen0 == '1 && seen1 == '1 && to_b1 > 0 && to_b2 > 0 && id_y) mech[M_LIB]++;
    for (int k = 0; k < M_NUM; k++) begin
      $display("mechanism %-24s occurred %0d times", mech_name[k], mech[k]);
      check(mech[k] > 0, $sformatf("mechanism %s never happened", mech_name[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
