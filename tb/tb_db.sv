// Testbench for db: blocky macroblocks (each 8x8 block flat at its own
// level plus small noise) are filtered and compared pixel by pixel with a
// model of the edge filter written here; a strong edge (a real image edge)
// must pass unchanged; the left-edge context of the previous macroblock is
// used only when enabled.
`include "tb/tb_common.svh"
module tb_db;
  import mova_pkg::*;
  logic clk, rst_n, start, busy, done;
  logic [7:0] src_addr, src_data;
  logic [15:0] nfilt;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  db dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_SLAVE_TASKS

  int mb [256], m [256], lft [16][2];
  assign src_data = 8'(mb[src_addr]);
  logic [15:0] v;

  function automatic int iabs(int x); return x < 0 ? -x : x; endfunction
  function automatic int clip(int x); return x < 0 ? 0 : (x > 255 ? 255 : x); endfunction
  // filter one segment; returns 1 when changed
  task automatic seg(int qp, int p1, ref int p0, ref int q0, input int q1, output bit ch);
    int d;
    ch = 0;
    d = (4 * (q0 - p0) + (p1 - q1) + 4) >>> 3;
    if (d > qp) d = qp;
    if (d < -qp) d = -qp;
    if (iabs(p0 - q0) < 2*qp && iabs(p1 - p0) < qp && iabs(q1 - q0) < qp && d != 0) begin
      p0 = clip(p0 + d); q0 = clip(q0 - d); ch = 1;
    end
  endtask
  task automatic model(int qp, bit lv, output int n);
    bit ch;
    n = 0;
    for (int i = 0; i < 256; i++) m[i] = mb[i];
    for (int r = 0; r < 16; r++) begin
      automatic int pp = lft[r][1];
      if (lv) begin seg(qp, lft[r][0], pp, m[r*16], m[r*16+1], ch); n += ch; end
    end
    for (int r = 0; r < 16; r++) begin seg(qp, m[r*16+6], m[r*16+7], m[r*16+8], m[r*16+9], ch); n += ch; end
    for (int c = 0; c < 16; c++) begin seg(qp, m[6*16+c], m[7*16+c], m[8*16+c], m[9*16+c], ch); n += ch; end
  endtask
  task automatic run();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    s_req = '0; start = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 16; r++) begin lft[r][0] = 0; lft[r][1] = 0; end
    for (int t = 0; t < 4; t++) begin
      automatic int qp = 8 + 2 * t, n, ok = 1;
      automatic int lvl [4];
      automatic bit lv = (t > 0);
      for (int b = 0; b < 4; b++) lvl[b] = 100 + $urandom_range(0, 20);
      if (t == 3) lvl[1] = 240;                       // strong edge
      for (int i = 0; i < 256; i++)
        mb[i] = lvl[(i / 128) * 2 + ((i % 16) / 8)] + $urandom_range(0, 2);
      bw(12'h100, 16'(qp)); bw(12'h101, 16'(lv));
      model(qp, lv, n);
      run();
      for (int i = 0; i < 256; i++) begin
        br(12'(i), v);
        if (int'(v) != m[i]) ok = 0;
      end
      `TB_CHECK(ok == 1, $sformatf("filtered MB %0d matches model", t))
      `TB_CHECK(int'(nfilt) == n, "number of filtered segments")
      `TB_CHECK(n > 0, "blocky MB was filtered")
      if (t == 3) begin
        br(12'(7), v); `TB_CHECK(int'(v) == mb[7], "strong edge kept (p side)")
        br(12'(8), v); `TB_CHECK(int'(v) == mb[8], "strong edge kept (q side)")
      end
      for (int r = 0; r < 16; r++) begin lft[r][0] = m[r*16+14]; lft[r][1] = m[r*16+15]; end
    end
    `TB_FINISH
  end
endmodule
