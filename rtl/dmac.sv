// dmac: direct memory access controller with a two-dimensional address
// generator.  It moves a rectangle of WIDTH words x HEIGHT lines from a
// source to a destination on the system bus: the source and destination
// addresses advance by one word along a line and by their own strides from
// line to line, so a motion-offset block inside a frame in SDRAM can be
// gathered into a module buffer (or a buffer scattered into a frame).
// Consecutive words of a line are consecutive SDRAM addresses, which the
// memory interface serves within one open row (page mode).
//
// Each word is one bus read followed by one bus write; the DMAC is a bus
// master and requests the bus only while moving data.  The done flag is
// sticky until the next start; 'irq' pulses at the end.  Register layout is
// this design's choice; the document gives the 2-D address generation.
//
// Bus map (its own registers, as a slave): 0x000/1 SRC low/high, 0x002/3
//   DST low/high, 0x004 WIDTH, 0x005 HEIGHT, 0x006 SRC_STRIDE, 0x007
//   DST_STRIDE, 0x008 CTRL write {start}, read {done[1], busy[0]}.
module dmac
  import mova_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  slv_req_t s_req,
  output slv_rsp_t s_rsp,
  input  logic     start,          // start from the command registers
  output mst_req_t m_req,
  input  logic     m_gnt,
  input  mst_rsp_t m_rsp,
  output logic     irq
);
  logic [23:0] src, dst, sa, da, sl, dl;
  logic [15:0] width, height, sstr, dstr, x, y;
  logic [15:0] data;
  logic        dn;
  typedef enum logic [1:0] {IDLE, RD, WR} st_e;
  st_e st;
  logic xfer;
  assign xfer = m_req.req && m_gnt && !m_rsp.stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src <= '0; dst <= '0; width <= '0; height <= '0; sstr <= '0; dstr <= '0;
      sa <= '0; da <= '0; sl <= '0; dl <= '0; x <= '0; y <= '0; data <= '0;
      st <= IDLE; dn <= 1'b0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (s_req.sel && s_req.wr) case (s_req.addr)
        12'h000: src[15:0]  <= s_req.wdata;
        12'h001: src[23:16] <= s_req.wdata[7:0];
        12'h002: dst[15:0]  <= s_req.wdata;
        12'h003: dst[23:16] <= s_req.wdata[7:0];
        12'h004: width  <= s_req.wdata;
        12'h005: height <= s_req.wdata;
        12'h006: sstr   <= s_req.wdata;
        12'h007: dstr   <= s_req.wdata;
        default: ;
      endcase
      case (st)
        IDLE: if ((start || (s_req.sel && s_req.wr && s_req.addr == 12'h008 && s_req.wdata[0]))
                  && width != 0 && height != 0) begin
          sa <= src; da <= dst; sl <= src; dl <= dst; x <= '0; y <= '0; dn <= 1'b0; st <= RD;
        end
        RD: if (xfer) begin data <= m_rsp.rdata; st <= WR; end
        WR: if (xfer) begin
          st <= RD;
          if (x == width - 1'b1) begin
            x <= '0;
            sl <= sl + 24'(sstr); dl <= dl + 24'(dstr);
            sa <= sl + 24'(sstr); da <= dl + 24'(dstr);
            if (y == height - 1'b1) begin st <= IDLE; dn <= 1'b1; irq <= 1'b1; end
            else y <= y + 1'b1;
          end else begin
            x <= x + 1'b1; sa <= sa + 1'b1; da <= da + 1'b1;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    m_req.req   = (st != IDLE);
    m_req.wr    = (st == WR);
    m_req.addr  = (st == WR) ? da : sa;
    m_req.wdata = data;
    s_rsp.stall = 1'b0;
    s_rsp.rdata = (s_req.addr == 12'h008) ? {14'd0, dn, st != IDLE} : '0;
  end
endmodule
