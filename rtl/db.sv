// db: deblocking post filter of the decoder, luminance only.
//
// The reconstructed 16x16 macroblock is copied from the reconstruction
// buffer into the DB buffer (DB-BUF1, 256 cycles).  The filter then works
// along the 8x8 block edges: the vertical edges at column 0 (against the
// last two columns of the previous macroblock, kept from the previous run)
// and column 8, then the horizontal edge at row 8; one 4-pixel segment
// (p1 p0 | q0 q1) per cycle, 48 cycles.  The filtered macroblock is read out
// over the bus (DB-BUF2), and its last two columns are kept for the next
// macroblock (post-DB shift).  The top macroblock edge is not filtered
// because the row above is not kept.  Pixels of the previous macroblock are
// not changed (it has already been written out).
//
// Filter (this design's choice; the document specifies only where it
// works): a segment is smoothed when |p0-q0| < 2 QP, |p1-p0| < QP and
// |q1-q0| < QP; then d = clip((4 (q0-p0) + (p1-q1) + 4) >> 3, -QP, QP),
// p0 += d, q0 -= d.
//
// Bus map: 0x000-0x0FF filtered MB (read), 0x100 QP, 0x101 {left_valid}.
module db
  import mova_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  slv_req_t   s_req,
  output slv_rsp_t   s_rsp,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic [7:0] src_addr,
  input  logic [7:0] src_data,
  output logic [15:0] nfilt      // segments changed by the last run
);
  logic [7:0] mb [256];
  logic [7:0] lft [32];          // previous MB columns 14,15: lft[row*2 + c]
  logic [5:0] qp;
  logic       left_valid;
  typedef enum logic [2:0] {IDLE, LOAD, VEDGE, HEDGE, SAVE, FIN} st_e;
  st_e st;
  logic [8:0] cnt;

  assign src_addr = cnt[7:0];

  // segment pixels for the current step
  logic [7:0] p1, p0, q0, q1;
  logic [7:0] ip0, iq0;          // MB indices written
  logic       lside;             // left MB edge (p side outside the MB)
  always_comb begin
    automatic int rr = int'(cnt[3:0]);
    lside = 1'b0; ip0 = '0; iq0 = '0; p1 = '0; p0 = '0; q0 = '0; q1 = '0;
    if (st == VEDGE) begin
      if (!cnt[4]) begin                       // column 0 edge
        lside = 1'b1;
        p1 = lft[rr*2]; p0 = lft[rr*2+1];
        iq0 = 8'(rr*16); q0 = mb[rr*16]; q1 = mb[rr*16+1];
      end else begin                           // column 8 edge
        p1 = mb[rr*16+6]; ip0 = 8'(rr*16+7); p0 = mb[rr*16+7];
        iq0 = 8'(rr*16+8); q0 = mb[rr*16+8]; q1 = mb[rr*16+9];
      end
    end else begin                             // row 8 edge, column rr
      p1 = mb[6*16+rr]; ip0 = 8'(7*16+rr); p0 = mb[7*16+rr];
      iq0 = 8'(8*16+rr); q0 = mb[8*16+rr]; q1 = mb[9*16+rr];
    end
  end

  logic        act;
  logic signed [11:0] d;
  always_comb begin
    automatic int a0 = int'(p0) - int'(q0);
    automatic int a1 = int'(p1) - int'(p0);
    automatic int a2 = int'(q1) - int'(q0);
    automatic int dd = (4 * (int'(q0) - int'(p0)) + (int'(p1) - int'(q1)) + 4) >>> 3;
    if (a0 < 0) a0 = -a0;
    if (a1 < 0) a1 = -a1;
    if (a2 < 0) a2 = -a2;
    if (dd > int'(qp)) dd = int'(qp);
    if (dd < -int'(qp)) dd = -int'(qp);
    d   = 12'(dd);
    act = (a0 < 2 * int'(qp)) && (a1 < int'(qp)) && (a2 < int'(qp)) && (dd != 0) &&
          !(lside && !left_valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qp <= 6'd1; left_valid <= 1'b0; st <= IDLE; cnt <= '0; done <= 1'b0; nfilt <= '0;
      for (int i = 0; i < 32; i++) lft[i] <= '0;
    end else begin
      done <= 1'b0;
      if (s_req.sel && s_req.wr && s_req.addr == 12'h100) qp <= s_req.wdata[5:0];
      if (s_req.sel && s_req.wr && s_req.addr == 12'h101) left_valid <= s_req.wdata[0];
      case (st)
        IDLE: if (start) begin cnt <= '0; nfilt <= '0; st <= LOAD; end
        LOAD: begin
          mb[cnt[7:0]] <= src_data;
          cnt <= cnt + 1'b1;
          if (cnt == 9'd255) begin cnt <= '0; st <= VEDGE; end
        end
        VEDGE, HEDGE: begin
          if (act) begin
            nfilt <= nfilt + 1'b1;
            mb[iq0] <= clip8(16'(int'(q0) - int'(d)));
            if (!lside) mb[ip0] <= clip8(16'(int'(p0) + int'(d)));
          end
          cnt <= cnt + 1'b1;
          if (st == VEDGE && cnt == 9'd31) begin cnt <= '0; st <= HEDGE; end
          if (st == HEDGE && cnt == 9'd15) begin cnt <= '0; st <= SAVE; end
        end
        SAVE: begin
          for (int r = 0; r < 16; r++) begin
            lft[r*2]   <= mb[r*16+14];
            lft[r*2+1] <= mb[r*16+15];
          end
          st <= FIN;
        end
        FIN: begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  always_comb begin
    s_rsp.stall = 1'b0;
    s_rsp.rdata = '0;
    if (s_req.addr[11:8] == 4'h0) s_rsp.rdata = 16'(mb[s_req.addr[7:0]]);
    else if (s_req.addr == 12'h100) s_rsp.rdata = 16'(qp);
  end
endmodule
