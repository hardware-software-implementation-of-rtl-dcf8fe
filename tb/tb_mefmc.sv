// Testbench for mefmc: the reference window holds a copy of the current
// macroblock at a known half-pel offset (made by upsampling a random image
// at double resolution), and the fine search must find that vector.  The
// prediction and block SADs are compared with a testbench model, the cycle
// count with the stage budget, and MC-only mode with a vector taken from
// the bypass port.
`include "tb/tb_common.svh"
module tb_mefmc;
  import mova_pkg::*;
  logic clk, rst_n, start, busy, done;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  logic signed [7:0] byp_mv_x, byp_mv_y;
  logic [7:0] pred_addr, pred_data;
  logic [15:0] blk_sad [4];
  int checks = 0, failures = 0;
  mefmc dut (.*);
  `TB_CLOCK_WATCHDOG(60000)
  `TB_SLAVE_TASKS

  logic [7:0] rf [400];
  logic [7:0] cur [256];
  logic [15:0] v;

  function automatic int smp(int y2, int x2);
    int ya = y2 >> 1, xa = x2 >> 1;
    int a = rf[ya*20+xa];
    if ((x2 & 1) && (y2 & 1)) return (a + rf[ya*20+xa+1] + rf[(ya+1)*20+xa] + rf[(ya+1)*20+xa+1] + 2) >> 2;
    if (x2 & 1) return (a + rf[ya*20+xa+1] + 1) >> 1;
    if (y2 & 1) return (a + rf[(ya+1)*20+xa] + 1) >> 1;
    return a;
  endfunction
  task automatic run();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    s_req = '0; start = 0; rst_n = 0; pred_addr = 0; byp_mv_x = 0; byp_mv_y = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int hx, hy, cyc, cx, cy;
      // smooth random reference
      for (int i = 0; i < 400; i++) rf[i] = 8'(((i % 20) * 7 + (i / 20) * 5 + $urandom_range(0, 120)) & 8'hFF);
      hx = $urandom_range(1, 7); hy = $urandom_range(1, 7);     // half-pel window offset
      for (int i = 0; i < 256; i++) cur[i] = 8'(smp(hy + 2*(i/16), hx + 2*(i%16)));
      for (int i = 0; i < 256; i++) bw(12'(i), 16'(cur[i]));
      for (int i = 0; i < 400; i++) bw(12'(256 + i), 16'(rf[i]));
      cx = $urandom_range(0, 6) - 3; cy = $urandom_range(0, 6) - 3;
      bw(12'h300, 16'(cx)); bw(12'h301, 16'(cy)); bw(12'h302, 0);
      run();
      br(12'h310, v); `TB_CHECK($signed(v[7:0]) == 2*cx + hx - 4, "half-pel mv_x")
      br(12'h311, v); `TB_CHECK($signed(v[7:0]) == 2*cy + hy - 4, "half-pel mv_y")
      br(12'h312, v); `TB_CHECK(v == 0, "exact match SAD 0")
      br(12'h317, v); cyc = int'(v);
      `TB_CHECK(cyc == 1 + 768*2 + 256 + 1, "cycle count 1794")
      `TB_CHECK(cyc < 4500, "within 4,500-cycle stage")
      for (int i = 0; i < 256; i += 17) begin
        @(negedge clk); pred_addr = 8'(i); #1;
        `TB_CHECK(pred_data == cur[i], "prediction pixel")
      end
    end
    // MC-only with bypass vector: prediction must match the model, block SADs too
    begin
      int mx = 3, my = -1, cx = 1, cy = 0, s [4];
      bw(12'h300, 16'(cx)); bw(12'h301, 16'(cy)); bw(12'h302, 16'h3);
      byp_mv_x = 8'(mx); byp_mv_y = 8'(my);
      for (int i = 0; i < 256; i++) cur[i] = 8'($urandom_range(0, 255));
      for (int i = 0; i < 256; i++) bw(12'(i), 16'(cur[i]));
      run();
      s = '{0, 0, 0, 0};
      for (int i = 0; i < 256; i++) begin
        automatic int p;
        automatic int y2 = (my - 2*cy + 4) + 2*(i/16), x2 = (mx - 2*cx + 4) + 2*(i%16);
        p = smp(y2, x2);
        s[((i/16) >= 8 ? 2 : 0) + ((i%16) >= 8 ? 1 : 0)] += (cur[i] > p) ? cur[i] - p : p - cur[i];
        if (i % 13 == 0) begin
          @(negedge clk); pred_addr = 8'(i); #1;
          `TB_CHECK(int'(pred_data) == p, "MC prediction pixel")
        end
      end
      for (int b = 0; b < 4; b++) `TB_CHECK(int'(blk_sad[b]) == s[b], "block SAD")
      br(12'h310, v); `TB_CHECK($signed(v[7:0]) == mx, "bypass vector used")
      br(12'h317, v); `TB_CHECK(int'(v) == 258, "MC-only cycles")
    end
    `TB_FINISH
  end
endmodule
