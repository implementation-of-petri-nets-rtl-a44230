// tb_efdia_board: checks the board wiring of the EFDIA. Events are
// produced through the switches and pushbuttons; the tb keeps its own count of each logged event and
// checks that LEDs D9..D16 and the segments of U7 and U8 show the expected
// signals and counter bits, active low, and aux_q the remaining bits.
// Default parameters: 20 s timers on a 15-tick second, f15_tick every cycle.
`timescale 1ns/1ps
module tb_efdia_board;
  localparam int PRESCALE = 15, N = 20;
  logic clk = 0, rst = 1, f15_tick = 1;
  logic [7:0] sw3 = '0;
  logic sw4_n = 1, sw5_n = 1, cpif = 0;
  logic [7:0] led_n;
  logic [6:0] u7_seg_n, u8_seg_n;
  logic [5:0] aux_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  efdia_board dut (
    .clk, .rst, .f15_tick, .sw3, .sw4_n, .sw5_n, .cpif,
    .led_n, .u7_seg_n, .u8_seg_n, .aux_q
  );

  // switch numbers (SW3-n is bit n-1)
  localparam int CPI_1W = 0, TI_1S = 1, SIN = 2, IRW = 3, IRR = 4, CPIL = 5, CPIR = 6, CPIM = 7;
  // LED numbers (D9 is bit 0)
  localparam int D_PI = 0, D_ASFM = 1, D_IWS = 2, D_PIT = 3, D_PIB1 = 4, D_NHPB2 = 5, D_PIB2 = 6, D_PIE = 7;

  int w = 0, r = 0, l = 0, m = 0, f = 0;  // expected counter values

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic check_displays(string what);
    logic [6:0] e7, e8;
    logic [5:0] ea;
    // segments a..g
    e7 = {1'(r >> 0), 1'(l >> 2), 1'(l >> 1), 1'(l >> 0), 1'(r >> 1), 1'(w >> 1), 1'(w >> 0)};
    e8 = {1'(f >> 0), 1'(m >> 2), 1'(f >> 2), 1'(f >> 3), 1'(f >> 1), 1'(m >> 1), 1'(m >> 0)};
    ea = {1'(m >> 3), 1'(l >> 3), 1'(r >> 3), 1'(r >> 2), 1'(w >> 3), 1'(w >> 2)};
    check(u7_seg_n == ~e7 && u8_seg_n == ~e8 && aux_q == ea,
          $sformatf("%s: U7=%b U8=%b aux=%b (W R L M F = %0d %0d %0d %0d %0d)", what, u7_seg_n, u8_seg_n, aux_q, w, r, l, m, f));
  endtask

  task automatic tap_sw(int n);
    @(negedge clk) sw3[n] = 1;
    repeat (2) @(negedge clk);
    sw3[n] = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic tap_ire();
    @(negedge clk) sw4_n = 0;
    repeat (2) @(negedge clk);
    sw4_n = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic tap_pia();
    @(negedge clk) sw5_n = 0;
    repeat (4) @(negedge clk);
    sw5_n = 1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk);
    check(led_n == 8'hFF, "all LEDs dark after reset");
    check_displays("reset");

    // warning without next-lower cause: IWS, PIT, PIB1, NHPB2, PIE lit
    @(negedge clk) sw3[SIN] = 1;
    repeat (3) @(negedge clk);
    check(led_n == ~(8'(1) << D_IWS | 8'(1) << D_PIT | 8'(1) << D_PIB1 | 8'(1) << D_NHPB2 | 8'(1) << D_PIE),
          $sformatf("warning LEDs %b", led_n));
    // IRR and IRE several times
    for (int k = 0; k < 5; k++) begin tap_sw(IRR); r++; tap_ire(); l++; check_displays("R/L log"); end
    // let H4 run out: failure lights PI and ASFM for one second
    begin
      int t;
      t = 0;
      while (led_n[D_PI] && t < 400) begin @(negedge clk); t++; end
      check(!led_n[D_PI] && !led_n[D_ASFM], "PI and ASFM lit on failure");
      f++;
    end
    repeat (PRESCALE * 2) @(negedge clk);
    check_displays("failure logged");
    @(negedge clk) sw3[SIN] = 0;
    repeat (3) @(negedge clk);
    check(led_n == 8'hFF, "LEDs dark after SIN off");

    // more failures to exercise all F bits, then maintenance to exercise M
    for (int k = 0; k < 9; k++) begin
      @(negedge clk) sw3[SIN] = 1;
      repeat (PRESCALE * (N + 2) + 4) @(negedge clk);
      f++;
      @(negedge clk) sw3[SIN] = 0;
      repeat (3) @(negedge clk);
      check_displays("failure log");
    end
    for (int k = 0; k < 6; k++) begin
      @(negedge clk) sw3[SIN] = 1;
      repeat (3) @(negedge clk);
      tap_pia();
      repeat (PRESCALE * (N + 2) + 4) @(negedge clk);
      m++;
      @(negedge clk) sw3[SIN] = 0;
      repeat (3) @(negedge clk);
      check_displays("maintenance log");
    end

    // next-lower warning: PIB2 lit, IRW counts W
    @(negedge clk) sw3[TI_1S] = 1;
    repeat (2) @(negedge clk);
    check(led_n == ~(8'(1) << D_PIB2), "PIB2 LED");
    for (int k = 0; k < 6; k++) begin tap_sw(IRW); w++; check_displays("W log"); end
    @(negedge clk) sw3[TI_1S] = 0;

    // clears
    tap_sw(CPI_1W); w = 0; check_displays("CPI-1W clear");
    tap_sw(CPIR);   r = 0; check_displays("CPIR clear");
    tap_sw(CPIL);   l = 0; check_displays("CPIL clear");
    tap_sw(CPIM);   m = 0; check_displays("CPIM clear");
    @(negedge clk) cpif = 1; @(negedge clk) cpif = 0; f = 0;
    @(negedge clk) check_displays("CPIF clear");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
