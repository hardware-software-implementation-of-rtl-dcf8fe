// Testbench for dmac: 2-D block moves (random sizes and strides) between
// regions of a memory model on its master port, first with the bus always
// granted (checks 2 cycles per word: one read, one write) and then with
// random grant loss and random wait states.  Checks the moved rectangle,
// that nothing outside it is written, done/busy status and the interrupt.
`include "tb/tb_common.svh"
module tb_dmac;
  import mova_pkg::*;
  logic clk, rst_n, start, m_gnt, irq;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  mst_req_t m_req;
  mst_rsp_t m_rsp;
  int checks = 0, failures = 0, irqs = 0, writes = 0;
  bit noisy = 0;
  dmac dut (.*);
  `TB_CLOCK_WATCHDOG(200000)
  `TB_SLAVE_TASKS
  logic [15:0] mem [int];
  function automatic logic [15:0] rd(int a); return mem.exists(a) ? mem[a] : 16'(a * 7 + 3); endfunction
  always @(negedge clk) begin
    m_gnt = noisy ? ($urandom % 4 != 0) : 1'b1;
    m_rsp.stall = noisy ? ($urandom % 3 == 0) : 1'b0;
  end
  always_comb m_rsp.rdata = rd(int'(m_req.addr));
  always @(posedge clk) begin
    if (irq) irqs++;
    if (m_req.req && m_gnt && !m_rsp.stall && m_req.wr) begin mem[int'(m_req.addr)] = m_req.wdata; writes++; end
  end
  task automatic move(int src, int dst, int w, int h, int ss, int ds);
    logic [15:0] d;
    logic [15:0] exp [int];
    int t0, w0 = writes, i0 = irqs;
    for (int y = 0; y < h; y++) for (int x = 0; x < w; x++) exp[dst + y * ds + x] = rd(src + y * ss + x);
    bw(0, 16'(src)); bw(1, 16'(src >> 16)); bw(2, 16'(dst)); bw(3, 16'(dst >> 16));
    bw(4, 16'(w)); bw(5, 16'(h)); bw(6, 16'(ss)); bw(7, 16'(ds));
    bw(8, 1); t0 = $time;
    br(8, d); `TB_CHECK(d[0] == 1, "busy")
    do br(8, d); while (d[0]);
    `TB_CHECK(d[1] == 1, "done")
    if (!noisy) `TB_CHECK(($time - t0) / 10 <= 2 * w * h + 3 && ($time - t0) / 10 >= 2 * w * h,
                          $sformatf("%0d cycles for %0d words", ($time - t0) / 10, w * h))
    `TB_CHECK(writes - w0 == w * h, "exactly the rectangle is written")
    `TB_CHECK(irqs == i0 + 1, "one interrupt")
    foreach (exp[k]) `TB_CHECK(mem[k] == exp[k], $sformatf("word at %h", k))
  endtask
  initial begin
    s_req = '0; start = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    move(24'h000100, 24'h800000, 16, 16, 176, 16);   // block from a QCIF-wide frame
    move(24'h012345, 24'h020000, 3, 5, 40, 8);
    noisy = 1;
    for (int i = 0; i < 6; i++)
      move(i * 24'h1000, 24'h400000 + i * 24'h2000, 1 + $urandom % 12, 1 + $urandom % 12, 32, 20);
    `TB_FINISH
  end
endmodule
