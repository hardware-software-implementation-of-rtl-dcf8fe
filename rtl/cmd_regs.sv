// cmd_regs: command registers through which the scheduler software runs
// the hardwired modules in the macroblock pipeline.  For each module (MEC,
// MEFMC, DCTQ, VLC, VLD, REC, DB, MVMVD) there is a start bit, a clock
// enable bit (power-manager field; a module whose clock is gated ignores
// start) and a software reset bit; each module's done pulse sets a sticky
// done bit.  The field set follows the document (start, clock gating,
// software reset); the layout is this design's choice.
//
// Bus map: 0x000 START (write 1s: one-cycle start pulses); 0x001 CLKEN
//   (r/w, all on after reset); 0x002 SRST (r/w, 1 holds the module in
//   reset); 0x003 DONE (read; write 1s to clear); 0x004 BUSY (read);
//   0x005 START_INTRA (bit 0: intra flag passed with a VLC start).
module cmd_regs
  import mova_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  slv_req_t        s_req,
  output slv_rsp_t        s_rsp,
  output logic [NMOD-1:0] start,
  output logic [NMOD-1:0] clken,
  output logic [NMOD-1:0] srst,
  output logic            start_intra,
  input  logic [NMOD-1:0] mod_done,
  input  logic [NMOD-1:0] mod_busy
);
  logic [NMOD-1:0] dn;
  logic wr;
  assign wr = s_req.sel && s_req.wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start <= '0; clken <= '1; srst <= '0; dn <= '0; start_intra <= 1'b0;
    end else begin
      start <= '0;
      dn <= dn | mod_done;
      if (wr) case (s_req.addr)
        12'h000: begin
          start <= s_req.wdata[NMOD-1:0] & clken & ~srst;
          dn    <= (dn | mod_done) & ~s_req.wdata[NMOD-1:0];
        end
        12'h001: clken <= s_req.wdata[NMOD-1:0];
        12'h002: srst  <= s_req.wdata[NMOD-1:0];
        12'h003: dn    <= (dn | mod_done) & ~s_req.wdata[NMOD-1:0];
        12'h005: start_intra <= s_req.wdata[0];
        default: ;
      endcase
    end
  end

  always_comb begin
    s_rsp.stall = 1'b0;
    case (s_req.addr)
      12'h001: s_rsp.rdata = 16'(clken);
      12'h002: s_rsp.rdata = 16'(srst);
      12'h003: s_rsp.rdata = 16'(dn);
      12'h004: s_rsp.rdata = 16'(mod_busy);
      12'h005: s_rsp.rdata = 16'(start_intra);
      default: s_rsp.rdata = '0;
    endcase
  end
endmodule
