// mova_top: the MoVa MPEG-4 simple-profile video codec chip, without its
// embedded controller core.
//
// The codec splits the work between a controller (an ARM7TDMI core running
// rate control, header coding, error resilience and the macroblock
// scheduler) and hardwired modules on a 16-bit system bus (ASB) and an
// 8-bit peripheral bus (APB):
//   encoder pipeline: MEC (coarse ME) -> MEFMC (fine ME + MC) ->
//                     DCTQ + VLC -> REC + SP (stream producer)
//   decoder pipeline: VLD -> MC + IQ/IDCT -> REC + DB (deblocking)
// Software starts each module through the command registers, one
// macroblock time slot at a time; the DMA controller moves macroblock data
// between SDRAM (through the external memory interface) and the modules'
// local buffers.  Data passes directly between neighbouring modules:
// MEFMC prediction -> REC, DCTQ residual -> REC, DCTQ levels -> VLC, VLC
// bits -> SP, VLD levels -> DCTQ, REC -> DB, MVMVD vector -> MEFMC (bypass).
//
// The controller core is not part of this RTL: its memory interface is a
// port group (cpu_*), together with its reset, interrupt and pause
// signals.  Sleep mode (entered by software through the remap and pause
// controller) holds the controller and stops all gated clocks until the
// external 'wake' pin is raised.  The ROM and SDRAM are off chip.  All logic here runs on the
// one system clock 'clk'; clk_ctrl derives the chip's 27/13.5 MHz clocks
// and gated module clocks from 'clk_main' and brings them out, but they do
// not clock the modules in this model (the modules use the command
// registers' clock-enable bits as start qualifiers instead).
//
// System bus map (16-bit word addresses): 0x000000-0x0FFFFF SDRAM;
// 0x10k000 slave k: 1 command regs, 2 MEC, 3 MEFMC, 4 DCTQ, 5 VLD, 6 DB,
// 7 REC, 8 ISC, 9 VIM, 10 VOM, 11 DMAC, 12 APB bridge, 13 reset control,
// 14 MVMVD.  APB (inside slave 12, address bits 11:8): 0 RPC, 1 INTC,
// 2 timers, 3 host interface, 4 VLC, 5 SP.  Controller address map: SRAM
// at 0, system bus at 0x4000_0000 + 2 * word address.
module mova_top
  import mova_pkg::*;
(
  input  logic        clk,
  input  logic        clk_main,
  input  logic        npor,
  // controller (ARM7TDMI) memory interface
  input  logic [31:0] cpu_addr,
  input  logic        cpu_nmreq,
  input  logic        cpu_nrw,
  input  logic [1:0]  cpu_mas,
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_wait,
  output logic        cpu_rst_n,
  output logic        cpu_irq,
  output logic        cpu_pause,
  input  logic        wake,
  output logic        remap,
  // program ROM
  output logic [15:0] rom_addr,
  output logic        rom_oe_n,
  input  logic [7:0]  rom_data,
  // SDRAM
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic        sd_ba,
  output logic [10:0] sd_a,
  output logic [1:0]  sd_dqm,
  output logic [15:0] sd_dq_out,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_in,
  // bus test / monitor
  input  logic        test_mode,
  input  mst_req_t    tst_req,
  output mst_rsp_t    tst_rsp,
  output logic        mon_strobe,
  output logic        mon_wr,
  output logic [23:0] mon_addr,
  output logic [15:0] mon_data,
  // compressed stream in and out
  input  logic        strm_valid,
  input  logic [7:0]  strm_data,
  output logic        so_valid,
  output logic [7:0]  so_data,
  input  logic        so_ready,
  // video in (image sensor) and out (display)
  input  logic        vsync,
  input  logic        href,
  input  logic        pix_valid,
  input  logic [7:0]  pix,
  output logic        vo_valid,
  output logic [23:0] vo_data,
  input  logic        vo_ready,
  // host interface
  input  logic        h_moto,
  input  logic        h_cs_n,
  input  logic        h_rd_n,
  input  logic        h_wr_n,
  input  logic        h_a,
  input  logic [7:0]  h_din,
  output logic [7:0]  h_dout,
  output logic        h_doe,
  input  logic        scl,
  input  logic        sda_in,
  output logic        sda_oe,
  input  logic        ext_irq,
  // clocks generated for the chip
  output logic        clk27,
  output logic        clk27_q,
  output logic        clk13,
  output logic        clk13_q,
  output logic [6:0]  gclk,
  output logic        dma_irq,
  output logic        isc_overflow,
  output logic [15:0] sdram_row_opens
);
  // ---------------- reset, clocks, download ----------------
  logic            sys_rst_n, download;
  logic rpc_pause, sleep;
  logic [NMOD-1:0] mrst_n, start, clken, srst, mdone, mbusy;
  logic            start_intra;
  slv_req_t        sreq [NSLV];
  slv_rsp_t        srsp [NSLV];

  rst_ctrl #(.NRST(NMOD)) u_rstc (
    .clk, .npor, .s_req(sreq[S_RSTC]), .s_rsp(srsp[S_RSTC]), .download, .srst,
    .sys_rst_n, .cpu_rst_n, .mod_rst_n(mrst_n));

  clk_ctrl u_clk (
    .clk_main, .rst_n(npor), .en(clken[6:0] & ~{7{sleep}}), .clk27, .clk27_q, .clk13, .clk13_q, .gclk);

  logic        dl_we;
  logic [15:0] dl_addr;
  logic [7:0]  dl_wdata;
  ext_wrapper u_ext (
    .clk, .rst_n(sys_rst_n), .rom_addr, .rom_oe_n, .rom_data, .download,
    .sram_we(dl_we), .sram_addr(dl_addr), .sram_wdata(dl_wdata));

  // ---------------- controller side ----------------
  logic        sr_en, sr_we;
  logic [12:0] sr_addr;
  logic [1:0]  sr_size;
  logic [31:0] sr_wdata, sr_rdata;
  int_sram u_sram (
    .clk, .en(sr_en), .we(sr_we), .addr(sr_addr), .size(sr_size), .wdata(sr_wdata),
    .rdata(sr_rdata));

  mst_req_t cpu_mreq, m0_req, dma_req;
  mst_rsp_t cpu_mrsp, m0_rsp, dma_rsp;
  logic [1:0] grant;

  amba_wrapper u_wrap (
    .clk, .rst_n(sys_rst_n), .cpu_addr, .cpu_nmreq(cpu_nmreq || !cpu_rst_n), .cpu_nrw, .cpu_mas,
    .cpu_wdata, .cpu_rdata, .cpu_wait, .dl_we, .dl_addr, .dl_wdata,
    .sram_en(sr_en), .sram_we(sr_we), .sram_addr(sr_addr), .sram_size(sr_size),
    .sram_wdata(sr_wdata), .sram_rdata(sr_rdata),
    .m_req(cpu_mreq), .m_gnt(grant[0]), .m_rsp(cpu_mrsp));

  // ---------------- system bus ----------------
  mst_req_t   breq;
  logic [NSLV-1:0] bsel;
  logic       bmiss, bxfer;
  logic [19:0] emi_addr;
  logic [11:0] saddr;
  slv_rsp_t   brsp;

  bus_watcher u_bw (
    .clk, .rst_n(sys_rst_n), .test_mode, .cpu_req(cpu_mreq), .cpu_rsp(cpu_mrsp),
    .tst_req, .tst_rsp, .m_req(m0_req), .m_rsp(m0_rsp),
    .bus_xfer(bxfer), .bus_wr(breq.wr), .bus_addr(breq.addr), .bus_wdata(breq.wdata),
    .bus_rdata(brsp.rdata), .mon_strobe, .mon_wr, .mon_addr, .mon_data);

  asb_arbiter #(.NM(2)) u_arb (
    .clk, .rst_n(sys_rst_n), .req({dma_req.req, m0_req.req}), .grant);

  assign breq = grant[1] ? dma_req : m0_req;

  asb_decoder #(.NS(NSLV)) u_dec (
    .addr(breq.addr), .valid(breq.req), .sel(bsel), .miss(bmiss), .emi_addr, .slv_addr(saddr));

  always_comb begin
    brsp = '0;
    for (int i = 0; i < NSLV; i++) begin
      sreq[i].sel   = bsel[i];
      sreq[i].wr    = breq.wr;
      sreq[i].addr  = saddr;
      sreq[i].wdata = breq.wdata;
      if (bsel[i]) brsp = srsp[i];
    end
    m0_rsp.rdata  = brsp.rdata;
    dma_rsp.rdata = brsp.rdata;
    m0_rsp.stall  = !grant[0] || brsp.stall;
    dma_rsp.stall = !grant[1] || brsp.stall;
  end
  assign bxfer = breq.req && !brsp.stall;

  emi u_emi (
    .clk, .rst_n(sys_rst_n), .sel(bsel[S_EMI]), .wr(breq.wr), .addr(emi_addr),
    .wdata(breq.wdata), .s_rsp(srsp[S_EMI]), .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n,
    .sd_we_n, .sd_ba, .sd_a, .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .n_act(sdram_row_opens));

  dmac u_dmac (
    .clk, .rst_n(cpu_rst_n), .s_req(sreq[S_DMAC]), .s_rsp(srsp[S_DMAC]), .start(1'b0),
    .m_req(dma_req), .m_gnt(grant[1]), .m_rsp(dma_rsp), .irq(dma_irq));

  cmd_regs u_cmd (
    .clk, .rst_n(cpu_rst_n), .s_req(sreq[S_CMD]), .s_rsp(srsp[S_CMD]), .start, .clken,
    .srst, .start_intra, .mod_done(mdone), .mod_busy(mbusy));

  // ---------------- encoder / decoder modules ----------------
  logic [7:0]         pred_addr, pred_data;
  logic [15:0]        blk_sad [4];
  logic signed [7:0]  mvd_x, mvd_y;
  logic [5:0]         lvl_addr, res_addr;
  logic signed [11:0] lvl_data, res_data;
  logic               vld_we;
  logic [5:0]         vld_addr;
  logic signed [11:0] vld_data;
  logic               coded;
  logic [7:0]         db_addr, db_data;
  logic [15:0]        db_nfilt;
  logic               vlc_valid, vlc_ready;
  bitchunk_t          vlc_chunk;

  mec u_mec (
    .clk, .rst_n(mrst_n[M_MEC]), .s_req(sreq[S_MEC]), .s_rsp(srsp[S_MEC]),
    .start(start[M_MEC]), .busy(mbusy[M_MEC]), .done(mdone[M_MEC]));

  mefmc u_mefmc (
    .clk, .rst_n(mrst_n[M_MEFMC]), .s_req(sreq[S_MEFMC]), .s_rsp(srsp[S_MEFMC]),
    .start(start[M_MEFMC]), .byp_mv_x(mvd_x), .byp_mv_y(mvd_y),
    .busy(mbusy[M_MEFMC]), .done(mdone[M_MEFMC]), .pred_addr, .pred_data, .blk_sad);

  mvmvd u_mvmvd (
    .clk, .rst_n(mrst_n[M_MVMVD]), .s_req(sreq[S_MVMVD]), .s_rsp(srsp[S_MVMVD]),
    .start(start[M_MVMVD]), .done(mdone[M_MVMVD]), .mv_x(mvd_x), .mv_y(mvd_y));
  assign mbusy[M_MVMVD] = 1'b0;

  dctq u_dctq (
    .clk, .rst_n(mrst_n[M_DCTQ]), .s_req(sreq[S_DCTQ]), .s_rsp(srsp[S_DCTQ]),
    .start(start[M_DCTQ]), .busy(mbusy[M_DCTQ]), .done(mdone[M_DCTQ]),
    .in_we(vld_we), .in_addr(vld_addr), .in_data(vld_data), .lvl_we(1'b1),
    .lvl_addr, .lvl_data, .res_addr, .res_data, .coded);

  rec u_rec (
    .clk, .rst_n(mrst_n[M_REC]), .s_req(sreq[S_REC]), .s_rsp(srsp[S_REC]),
    .start(start[M_REC]), .busy(mbusy[M_REC]), .done(mdone[M_REC]),
    .pred_addr, .pred_data, .res_addr, .res_data, .db_addr, .db_data);

  db u_db (
    .clk, .rst_n(mrst_n[M_DB]), .s_req(sreq[S_DB]), .s_rsp(srsp[S_DB]),
    .start(start[M_DB]), .busy(mbusy[M_DB]), .done(mdone[M_DB]),
    .src_addr(db_addr), .src_data(db_data), .nfilt(db_nfilt));

  vld u_vld (
    .clk, .rst_n(mrst_n[M_VLD]), .s_req(sreq[S_VLD]), .s_rsp(srsp[S_VLD]),
    .start(start[M_VLD]), .busy(mbusy[M_VLD]), .done(mdone[M_VLD]),
    .o_we(vld_we), .o_addr(vld_addr), .o_data(vld_data));

  isc u_isc (
    .clk, .rst_n(cpu_rst_n), .s_req(sreq[S_ISC]), .s_rsp(srsp[S_ISC]),
    .strm_valid, .strm_data, .overflow(isc_overflow));

  logic frame_irq;
  vim u_vim (
    .clk, .rst_n(cpu_rst_n), .s_req(sreq[S_VIM]), .s_rsp(srsp[S_VIM]),
    .vsync, .href, .pix_valid, .pix, .frame_irq);

  vom u_vom (
    .clk, .rst_n(cpu_rst_n), .s_req(sreq[S_VOM]), .s_rsp(srsp[S_VOM]),
    .out_valid(vo_valid), .out_data(vo_data), .out_ready(vo_ready));

  // ---------------- peripheral bus ----------------
  apb_req_t             preq;
  logic [NAPB-1:0]      psel;
  logic [NAPB-1:0][7:0] prdata;
  logic [2:0]           tirq;
  logic                 hif_irq;

  apb_bridge #(.NP(NAPB)) u_bridge (
    .clk, .rst_n(sys_rst_n), .s_req(sreq[S_APB]), .s_rsp(srsp[S_APB]), .p_req(preq),
    .psel, .prdata);

  rpc u_rpc (
    .clk, .rst_n(cpu_rst_n), .psel(psel[P_RPC]), .p_req(preq), .prdata(prdata[P_RPC]),
    .irq(cpu_irq), .wake, .remap, .pause(rpc_pause), .sleep);
  // Sleep holds the controller like a pause and stops every gated clock.
  assign cpu_pause = rpc_pause | sleep;

  intc u_intc (
    .clk, .rst_n(cpu_rst_n), .psel(psel[P_INTC]), .p_req(preq), .prdata(prdata[P_INTC]),
    .timer_irq(tirq), .ext_irq(ext_irq || hif_irq || frame_irq), .irq(cpu_irq));

  timers #(.NTIMER(3)) u_tmr (
    .clk, .rst_n(cpu_rst_n), .psel(psel[P_TIMER]), .p_req(preq), .prdata(prdata[P_TIMER]),
    .irq(tirq));

  hif u_hif (
    .clk, .rst_n(cpu_rst_n), .psel(psel[P_HIF]), .p_req(preq), .prdata(prdata[P_HIF]),
    .irq(hif_irq), .moto(h_moto), .h_cs_n, .h_rd_n, .h_wr_n, .h_a, .h_din, .h_dout, .h_doe,
    .scl, .sda_in, .sda_oe);

  vlc u_vlc (
    .clk, .rst_n(mrst_n[M_VLC]), .psel(psel[P_VLC]), .p_req(preq), .prdata(prdata[P_VLC]),
    .start(start[M_VLC]), .start_intra, .busy(mbusy[M_VLC]), .done(mdone[M_VLC]),
    .lvl_addr, .lvl_data, .out_valid(vlc_valid), .out_chunk(vlc_chunk), .out_ready(vlc_ready));

  sp u_sp (
    .clk, .rst_n(cpu_rst_n), .psel(psel[P_SP]), .p_req(preq), .prdata(prdata[P_SP]),
    .in_valid(vlc_valid), .in_chunk(vlc_chunk), .in_ready(vlc_ready),
    .out_valid(so_valid), .out_data(so_data), .out_ready(so_ready));
endmodule
