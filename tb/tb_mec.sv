// Testbench for mec: random current/reference data with the current block
// planted (with small noise) at a known offset; the result is compared with
// a brute-force search in the testbench.  Also checks the search cycle
// count against the 4,500-cycle stage budget, the ME-skip path and the
// intra decision on a flat-reference case.
`include "tb/tb_common.svh"
module tb_mec;
  import mova_pkg::*;
  logic clk, rst_n, start, busy, done;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  mec dut (.*);
  `TB_CLOCK_WATCHDOG(40000)
  `TB_SLAVE_TASKS

  logic [7:0] cur [64];
  logic [7:0] rf [484];
  logic [15:0] v;

  task automatic load();
    for (int i = 0; i < 64; i++) bw(12'(i), 16'(cur[i]));
    for (int i = 0; i < 484; i++) bw(12'(256 + i), 16'(rf[i]));
  endtask
  task automatic run();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
  endtask
  function automatic int sad(int dx, int dy);
    int s = 0;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      automatic int a = cur[r*8+c], b = rf[(dy+r)*22 + dx + c];
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction

  initial begin
    s_req = '0; start = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3; t++) begin
      int ex, ey, bs, bx, by, cyc;
      for (int i = 0; i < 484; i++) rf[i] = 8'($urandom_range(0, 255));
      ex = $urandom_range(0, 14); ey = $urandom_range(0, 14);
      for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
        cur[r*8+c] = 8'(int'(rf[(ey+r)*22+ex+c]) ^ $urandom_range(0, 3));
      load();
      bw(12'h405, 0);
      run();
      bs = 1 << 30; bx = 0; by = 0;
      for (int dy = 0; dy < 15; dy++) for (int dx = 0; dx < 15; dx++) begin
        automatic int s = sad(dx, dy);
        if (s < bs) begin bs = s; bx = dx; by = dy; end
      end
      br(12'h410, v); `TB_CHECK($signed(v) == 2*(bx-7), "mv_x")
      br(12'h411, v); `TB_CHECK($signed(v) == 2*(by-7), "mv_y")
      br(12'h412, v); `TB_CHECK(int'(v) == bs, "min SAD")
      br(12'h413, v); `TB_CHECK(v[1:0] == 2'b00, "inter, no skip")
      br(12'h414, v); cyc = int'(v);
      `TB_CHECK(cyc == 1 + 225*8 + 16 + 1, "search cycles (1818)")
      `TB_CHECK(cyc < 4500, "within the 4,500-cycle encoder stage")
    end
    // ME skip: predicted vector (+4,-2) has a small SAD; neighbours larger
    begin
      int ps;
      bw(12'h400, 16'(4)); bw(12'h401, 16'hFFFE);
      ps = sad(7 + 2, 7 - 1);
      bw(12'h402, 16'(ps)); bw(12'h403, 0); bw(12'h404, 0); bw(12'h405, 1);
      run();
      br(12'h413, v); `TB_CHECK(v[0] == 1'b1, "skip taken when pred SAD <= max neighbour")
      br(12'h410, v); `TB_CHECK($signed(v) == 4, "skip keeps predicted mv_x")
      br(12'h412, v); `TB_CHECK(int'(v) == ps, "skip SAD")
      br(12'h414, v); `TB_CHECK(int'(v) < 40, "skip is fast")
      bw(12'h402, 16'(ps - 1));
      run();
      br(12'h413, v); `TB_CHECK(v[0] == 1'b0, "no skip when pred SAD > max neighbour")
      bw(12'h405, 0);
    end
    // intra decision: flat current block, noisy reference
    for (int i = 0; i < 64; i++) cur[i] = 8'd128;
    for (int i = 0; i < 484; i++) rf[i] = (i % 2) ? 8'd0 : 8'd255;
    load(); run();
    br(12'h413, v); `TB_CHECK(v[1] == 1'b1, "intra chosen for flat block vs noisy reference")
    `TB_FINISH
  end
endmodule
