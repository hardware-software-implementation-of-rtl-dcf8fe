// Testbench for vim: two frames of a small 4:2:2 image (Cb Y Cr Y bytes per
// line, random gaps) are captured; words {Y,C} are read back and compared;
// the frame interrupt and the line and frame counters are checked.
`include "tb/tb_common.svh"
module tb_vim;
  import mova_pkg::*;
  logic clk, rst_n, vsync, href, pix_valid, frame_irq;
  logic [7:0] pix;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0, irqs = 0;
  vim #(.BUF_DEPTH(256)) dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_SLAVE_TASKS
  always @(posedge clk) if (frame_irq) irqs++;
  logic [15:0] q[$];
  initial begin
    logic [15:0] d;
    s_req = '0; vsync = 0; href = 0; pix_valid = 0; pix = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      @(negedge clk); vsync = 1; repeat (4) @(negedge clk); vsync = 0;
      for (int l = 0; l < 4; l++) begin
        @(negedge clk); href = 1;
        for (int p = 0; p < 16; p++) begin
          automatic logic [7:0] c = 8'($urandom), y = 8'($urandom);
          pix_valid = 1; pix = c; @(negedge clk);
          pix_valid = 0; if ($urandom % 2) @(negedge clk);
          pix_valid = 1; pix = y; @(negedge clk); pix_valid = 0;
          q.push_back({y, c});
        end
        href = 0; repeat (3) @(negedge clk);
      end
      br(2, d); `TB_CHECK(d == 4, $sformatf("line count %0d", d))
      br(1, d); `TB_CHECK(d == 64, $sformatf("level %0d", d))
      for (int i = 0; i < 64; i++) begin
        automatic logic [15:0] e = q.pop_front();
        br(0, d); `TB_CHECK(d == e, $sformatf("word %0d: %h vs %h", i, d, e))
      end
    end
    br(3, d); `TB_CHECK(d == 2, "frame count")
    `TB_CHECK(irqs == 2, $sformatf("frame interrupts %0d", irqs))
    br(4, d); `TB_CHECK(d == 0, "no overflow")
    `TB_FINISH
  end
endmodule
