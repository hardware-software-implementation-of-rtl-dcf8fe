// End-to-end testbench for mova_top at its default parameters (full-size
// 8 KB program download, 2,700-cycle SDRAM power-up wait).
//
// The embedded controller is replaced by a bus-functional model driving
// the cpu_* memory port; the ROM and the SDRAM are behavioural models.  The
// sequence follows one macroblock through the chip the way the scheduler
// software would:
//   download from ROM -> SRAM; SDRAM frame writes (page hits and misses);
//   2-D DMA of a search window SDRAM -> MEC while the controller keeps
//   using its SRAM; coarse ME finds a planted vector; ME skip; MVMVD
//   decodes a vector that drives MEFMC motion compensation directly;
//   DCTQ encode -> VLC -> SP bit-stream out; REC (inter and skip) and DB;
//   the produced stream is fed back through the VLD into the DCTQ and the
//   decoded residual must equal the encoder's reconstructed residual;
//   DCTQ skip; ISC, VIM (frame interrupt), VOM (RGB/YUV out), host port,
//   timer interrupt waking a paused controller, remap, bus monitor and
//   test mode, clock generation and gating, sleep and wake-up, software reset.
// Each mechanism has a counter; one that never happened is a failure.
`include "tb/tb_common.svh"
module tb_mova_top;
  import mova_pkg::*;
  logic clk, clk_main, npor;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic cpu_nmreq, cpu_nrw, cpu_wait, cpu_rst_n, cpu_irq, cpu_pause, remap, wake;
  logic [1:0] cpu_mas;
  logic [15:0] rom_addr;
  logic rom_oe_n;
  logic [7:0] rom_data;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_ba, sd_dq_oe;
  logic [10:0] sd_a;
  logic [1:0] sd_dqm;
  logic [15:0] sd_dq_out, sd_dq_in;
  logic test_mode;
  mst_req_t tst_req;
  mst_rsp_t tst_rsp;
  logic mon_strobe, mon_wr;
  logic [23:0] mon_addr;
  logic [15:0] mon_data;
  logic strm_valid, so_valid, so_ready;
  logic [7:0] strm_data, so_data;
  logic vsync, href, pix_valid, vo_valid, vo_ready;
  logic [7:0] pix;
  logic [23:0] vo_data;
  logic h_moto, h_cs_n, h_rd_n, h_wr_n, h_a, h_doe, scl, sda_in, sda_oe, ext_irq;
  logic [7:0] h_din, h_dout;
  logic clk27, clk27_q, clk13, clk13_q, dma_irq, isc_overflow;
  logic [6:0] gclk;
  logic [15:0] sdram_row_opens;
  int checks = 0, failures = 0;

  mova_top dut (.*);
  sdram_model #(.CL(2), .T_RCD(2), .T_RP(2), .INIT_CYC(2700), .MAX_REF_GAP(500)) u_sd (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dqm(sd_dqm), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in));
  function automatic logic [7:0] rom_f(logic [15:0] a); return 8'(a * 13 + (a >> 8) + 5); endfunction
  assign rom_data = rom_oe_n ? 8'h00 : rom_f(rom_addr);
  initial begin clk_main = 0; forever #2.5 clk_main = ~clk_main; end
  `TB_CLOCK_WATCHDOG(600000)

  // ---------------- mechanism counters ----------------
  typedef enum int {
    K_DOWNLOAD, K_SRAM, K_SDRAM_HIT, K_SDRAM_MISS, K_SDRAM_REFRESH, K_DMA_2D, K_DMA_IRQ,
    K_SRAM_DURING_DMA, K_MEC_SEARCH, K_ME_SKIP, K_MVMVD_BYPASS_MC, K_DCTQ_ENC, K_VLC_SP,
    K_REC_INTER, K_REC_SKIP, K_DEBLOCK, K_VLD_DCTQ_DEC, K_DCTQ_SKIP, K_ISC, K_VIM_FRAME,
    K_VOM, K_HOST, K_TIMER_IRQ, K_PAUSE_WAKE, K_REMAP, K_BUS_MONITOR, K_TEST_MODE,
    K_CLOCKS, K_CLOCK_GATING, K_SLEEP_WAKE, K_SOFT_RESET, K_NUM
  } mech_e;
  int mech [K_NUM];
  task automatic hit(mech_e k); mech[k]++; endtask

  // ---------------- controller bus-functional model ----------------
  task automatic cpu_acc(input logic w, input logic [31:0] a, input logic [1:0] s,
                         input logic [31:0] d, output logic [31:0] q);
    @(negedge clk); cpu_nmreq = 0; cpu_nrw = w; cpu_addr = a; cpu_mas = s; cpu_wdata = d;
    #1; while (cpu_wait) begin @(negedge clk); #1; end
    q = cpu_rdata;
    @(negedge clk); cpu_nmreq = 1; cpu_nrw = 0;
  endtask
  task automatic bw(input logic [23:0] a, input logic [15:0] d);
    logic [31:0] q; cpu_acc(1, 32'h4000_0000 + {a, 1'b0}, 1, {2{d}}, q);
  endtask
  task automatic br(input logic [23:0] a, output logic [15:0] d);
    logic [31:0] q; cpu_acc(0, 32'h4000_0000 + {a, 1'b0}, 1, 0, q); d = q[15:0];
  endtask
  function automatic logic [23:0] S(slave_e k, int r); return 24'h100000 | (24'(k) << 12) | 24'(r); endfunction
  function automatic logic [23:0] P(apb_slave_e p, int r); return S(S_APB, (int'(p) << 8) | r); endfunction
  task automatic run(module_e m);
    logic [15:0] d;
    $display("[%0t] run %s", $time, m.name());
    bw(S(S_CMD, 0), 16'(1 << m));
    do br(S(S_CMD, 3), d); while (!d[m]);
    bw(S(S_CMD, 3), 16'(1 << m));
  endtask

  // ---------------- pin monitors ----------------
  byte unsigned so_q [$];
  int n_dma_irq = 0, n_mon = 0, n_gclk0 = 0, n_c27 = 0, n_vo = 0;
  always @(posedge clk) begin
    if (so_valid && so_ready) so_q.push_back(so_data);
    if (dma_irq) n_dma_irq++;
    if (mon_strobe) n_mon++;
    if (vo_valid && vo_ready) n_vo++;
  end
  always @(posedge gclk[0]) n_gclk0++;
  always @(posedge clk27) n_c27++;

  logic [7:0] win [22*22];
  logic [7:0] mref [20*20];
  logic [7:0] pred [256];
  logic [7:0] recon [256];
  logic signed [15:0] enc_res [64];

  initial begin
    logic [15:0] d;
    logic [31:0] q;
    int t0, opens0, ok;
    npor = 0; cpu_nmreq = 1; cpu_nrw = 0; cpu_addr = 0; cpu_mas = 2; cpu_wdata = 0;
    test_mode = 0; tst_req = '0; strm_valid = 0; strm_data = 0; so_ready = 1;
    vsync = 0; href = 0; pix_valid = 0; pix = 0; vo_ready = 0;
    h_moto = 0; h_cs_n = 1; h_rd_n = 1; h_wr_n = 1; h_a = 0; h_din = 0; scl = 1; sda_in = 1; ext_irq = 0; wake = 0;
    for (int k = 0; k < K_NUM; k++) mech[k] = 0;
    repeat (5) @(posedge clk); npor = 1;

    // ---- program download (8 KB at ROM_WAIT+1 cycles per byte) ----
    t0 = $time;
    @(posedge cpu_rst_n);
    so_q.delete(); n_dma_irq = 0; n_mon = 0; n_vo = 0;
    `TB_CHECK(($time - t0) / 10 >= 8192 * 4 && ($time - t0) / 10 <= 8192 * 4 + 10,
              $sformatf("download took %0d cycles", ($time - t0) / 10))
    ok = 1;
    for (int a = 0; a < 8192; a += 508) begin
      automatic int wa = a & ~3;
      cpu_acc(0, 32'(wa), 2, 0, q);
      if (q != {rom_f(wa + 3), rom_f(wa + 2), rom_f(wa + 1), rom_f(wa)}) ok = 0;
    end
    `TB_CHECK(ok, "SRAM holds the ROM image")
    if (ok) hit(K_DOWNLOAD);
    cpu_acc(1, 32'h1F00, 2, 32'h89ABCDEF, q); cpu_acc(1, 32'h1F02, 0, {4{8'h55}}, q);
    cpu_acc(0, 32'h1F00, 2, 0, q);
    `TB_CHECK(q == 32'h8955CDEF, "controller SRAM read/write"); if (q == 32'h8955CDEF) hit(K_SRAM);

    // ---- remap ----
    `TB_CHECK(!remap, "remap low after reset")
    bw(P(P_RPC, 0), 0); `TB_CHECK(remap, "remap set"); if (remap) hit(K_REMAP);

    // ---- SDRAM: search window, one SDRAM row per line ----
    opens0 = sdram_row_opens;
    for (int i = 0; i < 22 * 22; i++) begin
      win[i] = 8'($urandom);
      bw(24'h001000 + 24'((i / 22) * 256 + i % 22), 16'(win[i]));
    end
    `TB_CHECK(sdram_row_opens - opens0 >= 22 && sdram_row_opens - opens0 < 22 * 22,
              $sformatf("row opens %0d for 22 lines", sdram_row_opens - opens0))
    if (sdram_row_opens - opens0 >= 22) hit(K_SDRAM_MISS);
    if (sdram_row_opens - opens0 < 22 * 22) hit(K_SDRAM_HIT);
    br(24'h001000 + 24'(5 * 256 + 7), d); `TB_CHECK(d == 16'(win[5 * 22 + 7]), "SDRAM read back")
    `TB_CHECK(u_sd.n_ref > 0, "SDRAM refreshed"); if (u_sd.n_ref > 0) hit(K_SDRAM_REFRESH);

    // ---- 2-D DMA SDRAM -> MEC reference window ----
    bw(S(S_DMAC, 0), 16'h1000); bw(S(S_DMAC, 1), 0);
    bw(S(S_DMAC, 2), 16'(S(S_MEC, 12'h100))); bw(S(S_DMAC, 3), 16'(S(S_MEC, 12'h100) >> 16));
    bw(S(S_DMAC, 4), 22); bw(S(S_DMAC, 5), 22); bw(S(S_DMAC, 6), 256); bw(S(S_DMAC, 7), 22);
    bw(S(S_DMAC, 8), 1);
    // the controller keeps running from its SRAM while the DMA owns the bus
    t0 = $time;
    for (int i = 0; i < 20; i++) cpu_acc(0, 32'(i * 4), 2, 0, q);
    `TB_CHECK(($time - t0) / 10 <= 20 * 4, "SRAM accesses not held up by the DMA")
    `TB_CHECK(dut.dma_req.req, "DMA still moving data meanwhile")
    if (($time - t0) / 10 <= 20 * 4 && dut.dma_req.req) hit(K_SRAM_DURING_DMA);
    do br(S(S_DMAC, 8), d); while (d[0]);
    `TB_CHECK(d[1] && n_dma_irq == 1, $sformatf("DMA done %0d and interrupt %0d", d[1], n_dma_irq)); if (n_dma_irq == 1) hit(K_DMA_IRQ);

    // ---- coarse ME: current block planted at subsampled offset (10,4) ----
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++)
      bw(S(S_MEC, r * 8 + c), 16'(win[(4 + r) * 22 + 10 + c]));
    bw(S(S_MEC, 12'h405), 0);
    run(M_MEC);
    begin
      logic [15:0] mx, my, sad, cyc;
      br(S(S_MEC, 12'h410), mx); br(S(S_MEC, 12'h411), my); br(S(S_MEC, 12'h412), sad);
      br(S(S_MEC, 12'h414), cyc);
      `TB_CHECK($signed(mx) == 6 && $signed(my) == -6 && sad == 0,
                $sformatf("coarse vector (%0d,%0d) sad %0d", $signed(mx), $signed(my), sad))
      if ($signed(mx) == 6 && $signed(my) == -6 && sad == 0) begin hit(K_DMA_2D); hit(K_MEC_SEARCH); end
      `TB_CHECK(cyc <= 4500, $sformatf("coarse search %0d cycles within the 4,500-cycle stage", cyc))
    end
    // ME skip at the predicted vector
    bw(S(S_MEC, 12'h400), 16'(6)); bw(S(S_MEC, 12'h401), 16'(-6));
    bw(S(S_MEC, 12'h402), 100); bw(S(S_MEC, 12'h403), 50); bw(S(S_MEC, 12'h404), 70);
    bw(S(S_MEC, 12'h405), 1);
    run(M_MEC);
    br(S(S_MEC, 12'h413), d); `TB_CHECK(d[0], "ME skip taken")
    begin
      logic [15:0] cyc; br(S(S_MEC, 12'h414), cyc);
      `TB_CHECK(cyc < 50, $sformatf("skip took %0d cycles", cyc))
      if (d[0] && cyc < 50) hit(K_ME_SKIP);
    end

    // ---- MVMVD decode -> MEFMC motion compensation (bypass) ----
    for (int i = 0; i < 400; i++) begin mref[i] = 8'($urandom); bw(S(S_MEFMC, 12'h100 + i), 16'(mref[i])); end
    bw(S(S_MEFMC, 12'h300), 0); bw(S(S_MEFMC, 12'h301), 0); bw(S(S_MEFMC, 12'h302), 3);
    bw(S(S_MVMVD, 0), 16'(2)); bw(S(S_MVMVD, 1), 16'(0));
    bw(S(S_MVMVD, 2), 16'(4)); bw(S(S_MVMVD, 3), 16'(-2));
    bw(S(S_MVMVD, 4), 16'(0)); bw(S(S_MVMVD, 5), 16'(2));
    bw(S(S_MVMVD, 6), 16'(0)); bw(S(S_MVMVD, 7), 16'(-2));
    bw(S(S_MVMVD, 8), 1);
    run(M_MVMVD);
    br(S(S_MVMVD, 12'h014), d); `TB_CHECK($signed(d) == 2, "decoded mv_x")
    br(S(S_MVMVD, 12'h015), d); `TB_CHECK($signed(d) == -2, "decoded mv_y")
    run(M_MEFMC);
    ok = 1;
    for (int i = 0; i < 256; i++) begin
      pred[i] = mref[(i / 16 + 1) * 20 + i % 16 + 3];
      br(S(S_MEFMC, 12'h400 + i), d);
      if (d[7:0] != pred[i]) ok = 0;
    end
    `TB_CHECK(ok, "prediction at the MVMVD vector"); if (ok) hit(K_MVMVD_BYPASS_MC);

    // ---- DCTQ encode of block 0 (inter, QP 4) ----
    bw(S(S_DCTQ, 12'h100), 4); bw(S(S_DCTQ, 12'h101), 0);
    for (int i = 0; i < 64; i++) bw(S(S_DCTQ, i), 16'($signed(8'($urandom_range(0, 120)) - 60)));
    run(M_DCTQ);
    br(S(S_DCTQ, 12'h103), d); `TB_CHECK(d[0], "block coded")
    for (int i = 0; i < 64; i++) begin br(S(S_DCTQ, 12'h080 + i), d); enc_res[i] = $signed(d); end
    br(S(S_DCTQ, 12'h104), d); `TB_CHECK(d <= 4500 / 4, $sformatf("DCTQ block %0d cycles", d))
    if (d <= 4500 / 4) hit(K_DCTQ_ENC);

    // ---- VLC -> SP: texture bits out, then byte-align ----
    bw(S(S_CMD, 5), 0);
    run(M_VLC);
    begin
      logic [15:0] lo, hi;
      bw(P(P_SP, 5), 0);
      repeat (200) @(posedge clk);
      br(P(P_VLC, 2), lo); br(P(P_VLC, 3), hi);
      `TB_CHECK(so_q.size() > 0 && so_q.size() == ({hi[7:0], lo[7:0]} + 8) / 8,
                $sformatf("%0d stream bytes for %0d texture bits", so_q.size(), {hi[7:0], lo[7:0]}))
      if (so_q.size() > 0) hit(K_VLC_SP);
    end

    // ---- REC inter, block 0 ----
    bw(S(S_REC, 12'h200), 0); bw(S(S_REC, 12'h201), 0);
    run(M_REC);
    ok = 1;
    for (int r = 0; r < 8; r++) for (int c = 0; c < 8; c++) begin
      automatic int v = int'(pred[r * 16 + c]) + enc_res[r * 8 + c];
      v = v < 0 ? 0 : (v > 255 ? 255 : v);
      br(S(S_REC, r * 16 + c), d);
      if (d[7:0] != 8'(v)) ok = 0;
    end
    `TB_CHECK(ok, "reconstruction = prediction + residual"); if (ok) hit(K_REC_INTER);
    // REC skip: previous macroblock copied
    for (int i = 0; i < 256; i++) begin recon[i] = 8'(64 + (i % 16) * 2); bw(S(S_REC, 12'h100 + i), 16'(recon[i])); end
    bw(S(S_REC, 12'h200), 4);
    run(M_REC);
    ok = 1;
    for (int i = 0; i < 256; i += 5) begin br(S(S_REC, i), d); if (d[7:0] != recon[i]) ok = 0; end
    `TB_CHECK(ok, "skipped macroblock copied"); if (ok) hit(K_REC_SKIP);
    // DB on the smooth macroblock: interior pixels unchanged, edge pixels filtered gently
    bw(S(S_DB, 12'h100), 4); bw(S(S_DB, 12'h101), 0);
    run(M_DB);
    ok = 1;
    for (int r = 0; r < 16; r++) begin
      br(S(S_DB, r * 16 + 4), d); if (d[7:0] != recon[r * 16 + 4]) ok = 0;
      br(S(S_DB, r * 16 + 8), d); if (d[7:0] < recon[r * 16 + 7] || d[7:0] > recon[r * 16 + 8]) ok = 0;
    end
    `TB_CHECK(ok, "deblocked macroblock"); if (ok) hit(K_DEBLOCK);

    // ---- decode the produced stream: VLD -> DCTQ (IQ/IDCT) ----
    // a fresh level buffer, then the controller refills the 64-byte VLD
    // buffer as it drains
    for (int i = 0; i < 64; i++) bw(S(S_DCTQ, 12'h040 + i), 0);
    bw(S(S_VLD, 12'h100), 2);
    for (int i = 0; i < 64; i++) bw(S(S_VLD, 0), 16'(so_q.pop_front()));
    bw(S(S_CMD, 0), 16'(1 << M_VLD));
    while (so_q.size() > 0) begin
      br(S(S_VLD, 12'h103), d);
      if (d < 60) bw(S(S_VLD, 0), 16'(so_q.pop_front()));
    end
    do br(S(S_CMD, 3), d); while (!d[M_VLD]);
    bw(S(S_CMD, 3), 16'(1 << M_VLD));
    br(S(S_VLD, 12'h101), d); `TB_CHECK(!d[1], "VLD no error")
    bw(S(S_DCTQ, 12'h101), 2);
    run(M_DCTQ);
    ok = 1;
    for (int i = 0; i < 64; i++) begin br(S(S_DCTQ, 12'h080 + i), d); if ($signed(d) != enc_res[i]) ok = 0; end
    `TB_CHECK(ok, "decoded residual equals the encoder's reconstruction"); if (ok) hit(K_VLD_DCTQ_DEC);

    // ---- DCTQ skip (small block SAD) ----
    bw(S(S_DCTQ, 12'h101), 4); bw(S(S_DCTQ, 12'h102), 10);
    run(M_DCTQ);
    br(S(S_DCTQ, 12'h103), d); `TB_CHECK(!d[0], "block skipped")
    begin logic [15:0] c; br(S(S_DCTQ, 12'h104), c); if (!d[0] && c <= 4) hit(K_DCTQ_SKIP); end

    // ---- ISC stream input ----
    for (int i = 0; i < 10; i++) begin @(negedge clk); strm_valid = 1; strm_data = 8'(i * 17); end
    @(negedge clk); strm_valid = 0;
    ok = 1;
    for (int i = 0; i < 10; i++) begin br(S(S_ISC, 0), d); if (d[7:0] != 8'(i * 17)) ok = 0; end
    `TB_CHECK(ok && !isc_overflow, "stream bytes buffered"); if (ok) hit(K_ISC);

    // ---- VIM: frame start interrupt and capture ----
    bw(P(P_INTC, 1), 8'h08);
    @(negedge clk); vsync = 1; repeat (3) @(negedge clk); vsync = 0;
    repeat (3) @(negedge clk);
    `TB_CHECK(cpu_irq, "frame interrupt reaches the controller")
    bw(P(P_INTC, 4), 8'h08); `TB_CHECK(!cpu_irq, "interrupt cleared")
    @(negedge clk); href = 1;
    for (int i = 0; i < 8; i++) begin pix_valid = 1; pix = 8'(i); @(negedge clk); end
    href = 0; pix_valid = 0; repeat (3) @(negedge clk);
    br(S(S_VIM, 0), d); `TB_CHECK(d == 16'h0100, "first {Y,C} word")
    br(S(S_VIM, 1), d); `TB_CHECK(d == 3, "three words left")
    if (d == 3) hit(K_VIM_FRAME);

    // ---- VOM ----
    for (int i = 0; i < 6; i++) bw(S(S_VOM, 0), 16'h8080);
    vo_ready = 1; repeat (10) @(posedge clk); vo_ready = 0;
    `TB_CHECK(n_vo == 6, "six pixels displayed"); if (n_vo == 6) hit(K_VOM);

    // ---- host port (Intel style) ----
    @(negedge clk); h_cs_n = 0; h_a = 0; h_din = 8'h5A; repeat (2) @(negedge clk); h_wr_n = 0;
    repeat (5) @(negedge clk); h_wr_n = 1; repeat (2) @(negedge clk); h_cs_n = 1; repeat (4) @(negedge clk);
    br(P(P_HIF, 0), d); `TB_CHECK(d[7:0] == 8'h5A, "host byte received"); if (d[7:0] == 8'h5A) hit(K_HOST);
    bw(P(P_INTC, 4), 8'h08);

    // ---- timer interrupt wakes the paused controller ----
    bw(P(P_INTC, 1), 8'h01);
    bw(P(P_TIMER, 0), 200); bw(P(P_TIMER, 1), 0); bw(P(P_TIMER, 2), 0); bw(P(P_TIMER, 3), 8'b101);
    bw(P(P_RPC, 1), 0);
    `TB_CHECK(cpu_pause, "controller paused")
    t0 = $time;
    @(posedge cpu_irq);
    `TB_CHECK(($time - t0) / 10 < 220, "timer fired")
    hit(K_TIMER_IRQ);
    repeat (2) @(posedge clk); #1;
    `TB_CHECK(!cpu_pause, "interrupt ends the pause"); if (!cpu_pause) hit(K_PAUSE_WAKE);
    bw(P(P_TIMER, 4), 1);

    // ---- bus monitor and test mode ----
    `TB_CHECK(n_mon > 100, "monitor saw transfers"); if (n_mon > 100) hit(K_BUS_MONITOR);
    @(negedge clk); test_mode = 1;
    tst_req = '{1'b1, 1'b1, S(S_CMD, 5), 16'h0001};
    @(posedge clk); while (tst_rsp.stall) @(posedge clk);
    @(negedge clk); tst_req = '{1'b1, 1'b0, S(S_CMD, 5), 16'h0000};
    #1; while (tst_rsp.stall) begin @(negedge clk); #1; end
    d = tst_rsp.rdata;
    @(negedge clk); tst_req = '0; test_mode = 0;
    `TB_CHECK(d == 16'h0001, $sformatf("test pins reach a module register %h", d)); if (d == 16'h0001) hit(K_TEST_MODE);

    // ---- clocks, gating, software reset ----
    `TB_CHECK(n_c27 > 1000 && n_gclk0 > 1000, "clocks running"); if (n_c27 > 1000) hit(K_CLOCKS);
    bw(S(S_CMD, 1), 16'hFE);
    t0 = n_gclk0; repeat (20) @(posedge clk);
    `TB_CHECK(n_gclk0 == t0, "gated clock stopped"); if (n_gclk0 == t0) hit(K_CLOCK_GATING);
    bw(S(S_CMD, 1), 16'hFF);
    // sleep: every gated clock stops until the wake-up pin
    bw(P(P_RPC, 3), 0);
    t0 = n_gclk0; repeat (20) @(posedge clk);
    `TB_CHECK(cpu_pause && n_gclk0 == t0, "sleep stops clocks and holds the controller")
    @(negedge clk); wake = 1; @(negedge clk); wake = 0;
    t0 = n_gclk0; repeat (20) @(posedge clk);
    `TB_CHECK(!cpu_pause && n_gclk0 > t0, "wake-up pin ends sleep")
    if (!cpu_pause && n_gclk0 > t0) hit(K_SLEEP_WAKE);
    bw(S(S_CMD, 2), 16'h01); bw(S(S_CMD, 2), 16'h00);
    br(S(S_MEC, 12'h414), d); `TB_CHECK(d == 0, "MEC reset by software"); if (d == 0) hit(K_SOFT_RESET);

    `TB_CHECK(u_sd.errors == 0, "SDRAM protocol clean")
    for (int k = 0; k < K_NUM; k++) begin
      automatic mech_e m = mech_e'(k);
      $display("mechanism %-20s %0d", m.name(), mech[k]);
      `TB_CHECK(mech[k] > 0, $sformatf("mechanism %s never happened", m.name()))
    end
    `TB_FINISH
  end
endmodule
