// tb_pn_relation: checks every basic logic relation. One pn_relation per
// relation is driven with the same random inputs; each output must equal the
// relation's truth table (written out here independently of the design)
// applied to the inputs of two cycles earlier.
`timescale 1ns/1ps
module tb_pn_relation;
  import pn_pkg::*;
  localparam int NR = 10;
  logic clk = 0, rst = 1, x1 = 0, x2 = 0;
  logic [NR-1:0] y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  for (genvar k = 0; k < NR; k++) begin : g
    pn_relation #(.REL(pn_relation_e'(k))) dut (.clk, .rst, .x1, .x2, .y(y[k]));
  end

  // Truth tables, index {x1,x2}: 00,01,10,11 -> bit 0..3
  function automatic logic model(int k, logic a, logic b);
    logic [3:0] tt [NR] = '{4'b1100, 4'b1000, 4'b1110, 4'b0011, 4'b0010,
                            4'b1011, 4'b0111, 4'b0001, 4'b0110, 4'b1001};
    return tt[k][{a, b}];
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a1, a2, b1, b2;  // inputs one and two cycles back
    repeat (3) @(posedge clk);
    #1 for (int k = 0; k < NR; k++) begin
      checks++;
      if (y[k] !== 1'b0) begin failures++; $display("FAIL reset rel %0d", k); end
    end
    rst = 0;
    a1 = 0; a2 = 0; b1 = 0; b2 = 0;
    for (int n = 0; n < 400; n++) begin
      x1 = 1'($urandom); x2 = 1'($urandom);
      @(posedge clk); #1;
      b1 = a1; b2 = a2; a1 = x1; a2 = x2;
      if (n >= 2)
        for (int k = 0; k < NR; k++) begin
          checks++;
          if (y[k] !== model(k, b1, b2)) begin
            failures++;
            $display("FAIL n=%0d rel=%0d x=%b%b y=%b", n, k, b1, b2, y[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
