// Testbench for clk_ctrl: measures the periods of clk27 and clk13 (2 and 4
// input periods), the quarter-period phase of the _q clocks, and checks
// that a gated clock stops without glitches when its enable falls and has
// the source clock's period while enabled.
`include "tb/tb_common.svh"
module tb_clk_ctrl;
  logic clk, clk_main, rst_n, clk27, clk27_q, clk13, clk13_q;
  logic [6:0] en, gclk;
  int checks = 0, failures = 0;
  clk_ctrl dut (.*);
  assign clk_main = clk;   // 10 time-unit input period
  `TB_CLOCK_WATCHDOG(5000)
  realtime r27 [$], r27q [$], r13 [$], r13q [$], rg [7][$];
  always @(posedge clk27) r27.push_back($realtime);
  always @(posedge clk27_q) r27q.push_back($realtime);
  always @(posedge clk13) r13.push_back($realtime);
  always @(posedge clk13_q) r13q.push_back($realtime);
  for (genvar g = 0; g < 7; g++) begin : g_m
    always @(posedge gclk[g]) rg[g].push_back($realtime);
    realtime hi_t;
    always @(posedge gclk[g]) hi_t = $realtime;
    always @(negedge gclk[g]) if (rst_n && $realtime - hi_t < 9.0) begin
      failures++; $display("FAIL: glitch on gated clock %0d at %0t", g, $realtime);
    end
  end
  initial begin
    int n;
    rst_n = 0; en = '1;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (40) @(posedge clk);
    `TB_CHECK(r27[$] - r27[$-1] == 20.0, "clk27 = main/2")
    `TB_CHECK(r13[$] - r13[$-1] == 40.0, "clk13 = main/4")
    `TB_CHECK(r27q[$] - r27[$] == 5.0 || r27q[$] - r27[$] == -15.0, "clk27_q a quarter period later")
    `TB_CHECK(r13q[$] - r13[$] == 10.0 || r13q[$] - r13[$] == -30.0, "clk13_q a quarter period later")
    for (int g = 0; g < 7; g++)
      `TB_CHECK(rg[g][$] - rg[g][$-1] == (dut.SLOW[g] ? 40.0 : 20.0), $sformatf("gated clock %0d period", g))
    #3; en = 7'b0101010;   // change enables at an awkward time
    repeat (5) @(posedge clk);
    for (int g = 0; g < 7; g++) rg[g].delete();
    repeat (40) @(posedge clk);
    for (int g = 0; g < 7; g++)
      `TB_CHECK((rg[g].size() > 0) == en[g], $sformatf("gated clock %0d enable", g))
    #7; en = '1;
    repeat (20) @(posedge clk);
    `TB_FINISH
  end
endmodule
