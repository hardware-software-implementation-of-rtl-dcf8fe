// dctq: transform and quantization of one 8x8 block, and the inverse path
// that rebuilds the residual the encoder and decoder both use.
//
// Encode (MODE.decode = 0): the 8x8 input (pixel for intra, residual for
// inter) goes through a separable 2-D DCT, quantization, inverse
// quantization and a 2-D IDCT.  Results: quantized levels (for the VLC) and
// the reconstructed block (for REC).  Decode (MODE.decode = 1): levels
// written by the VLD go through inverse quantization and the IDCT only.
//
// Each 1-D pass computes one coefficient per cycle with 8 multipliers, so a
// pass is 64 cycles; encode takes 5 x 64 (+2) cycles per block and decode
// 3 x 64 (+2), so the six blocks of a macroblock stay far inside the stage
// budget.  DCT basis: C[u][x] = round(4096 * c(u) * cos((2x+1) u pi / 16)),
// c(0) = sqrt(1/8), c(u) = 1/2; it is computed from a nine-entry cosine
// table.  The intermediate row results keep 3 fractional bits.
//
// Quantization is the H.263-style method of MPEG-4 (this design's choice of
// method; the document does not give one):
//   intra DC: L = round(c / 8), rec = 8 L
//   intra AC: |L| = |c| / (2 QP); inter: |L| = (|c| - QP/2) / (2 QP)
//   rec: |c'| = QP (2|L| + 1), minus 1 when QP is even; L = 0 -> 0
// DCTQ skip: for an inter block with skip enabled whose SAD (from the fine
// motion search) is below SKIP_K * QP the block is declared not coded: all
// levels and the residual are zero and the transform is not run (2 cycles).
// Intra AC/DC prediction is not built.
//
// Bus map: 0x000-0x03F input (signed 9 bits in), 0x040-0x07F levels,
//   0x080-0x0BF reconstructed residual (read), 0x100 QP, 0x101 MODE
//   {skip_en[2], decode[1], intra[0]}, 0x102 block SAD, 0x103 STATUS
//   {coded[0]}, 0x104 cycles.
module dctq
  import mova_pkg::*;
#(
  parameter int SKIP_K = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  slv_req_t           s_req,
  output slv_rsp_t           s_rsp,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // direct input port (pixel data from the prediction path / VLD)
  input  logic               in_we,
  input  logic [5:0]         in_addr,
  input  logic signed [11:0] in_data,
  input  logic               lvl_we,          // writes the level buffer (decode)
  // level read port (VLC) and residual read port (REC)
  input  logic [5:0]         lvl_addr,
  output logic signed [11:0] lvl_data,
  input  logic [5:0]         res_addr,
  output logic signed [11:0] res_data,
  output logic               coded
);
  logic signed [11:0] xin [64];
  logic signed [11:0] lvl [64];
  logic signed [11:0] rec [64];
  logic signed [19:0] tmp [64];     // row pass result, 3 fraction bits
  logic signed [15:0] coef [64];    // DCT coefficients / dequantized values
  logic [5:0]  qp;
  logic        intra, decode, skip_en;
  logic [15:0] bsad, cyc;

  typedef enum logic [2:0] {IDLE, FROW, FCOL, QNT, IROW, ICOL, FIN} st_e;
  st_e st;
  logic [5:0] k;                    // output index: k[5:3] row, k[2:0] column

  function automatic int hcos(input int kk);
    int m;
    int t [9] = '{2048, 2009, 1892, 1703, 1448, 1138, 784, 400, 0};
    m = kk % 32;
    if (m <= 8)  return t[m];
    if (m <= 16) return -t[16 - m];
    if (m <= 24) return -t[m - 16];
    return t[32 - m];
  endfunction
  function automatic int cb(input int u, input int x);
    return (u == 0) ? 1448 : hcos((2 * x + 1) * u);
  endfunction

  // one coefficient of the current pass: 8 products
  logic signed [39:0] dot;
  int r, c;
  assign r = int'(k[5:3]);
  assign c = int'(k[2:0]);
  always_comb begin
    dot = '0;
    for (int i = 0; i < 8; i++) begin
      case (st)
        FROW: dot += 40'(xin[r*8+i]) * 40'(cb(c, i));          // T[r][u=c]
        FCOL: dot += 40'(cb(r, i)) * 40'(tmp[i*8+c]);          // F[v=r][u=c]
        IROW: dot += 40'(coef[r*8+i]) * 40'(cb(i, c));         // T[v=r][x=c]
        ICOL: dot += 40'(cb(i, r)) * 40'(tmp[i*8+c]);          // X[y=r][x=c]
        default: ;
      endcase
    end
  end
  function automatic logic signed [39:0] rshr(input logic signed [39:0] v, input int s);
    return (v + (40'sd1 <<< (s - 1))) >>> s;
  endfunction

  // quantization of coefficient k
  logic signed [15:0] cq;
  logic signed [11:0] lq;
  logic signed [15:0] dq;
  always_comb begin
    automatic int a, l, q2, rv;
    cq = coef[k];
    q2 = 2 * int'(qp);
    a  = (cq < 0) ? -int'(cq) : int'(cq);
    if (decode) l = (lvl[k] < 0) ? -int'(lvl[k]) : int'(lvl[k]);
    else if (intra && k == 0) l = (a + 4) / 8;
    else if (intra) l = a / q2;
    else l = (a > int'(qp) / 2) ? (a - int'(qp) / 2) / q2 : 0;
    if (l > 2047) l = 2047;
    if (intra && k == 0) rv = 8 * l;
    else if (l == 0) rv = 0;
    else rv = int'(qp) * (2 * l + 1) - ((qp[0] == 1'b0) ? 1 : 0);
    if (rv > 2047) rv = 2047;
    if (decode) begin
      lq = lvl[k];
      dq = (lvl[k] < 0) ? 16'(-rv) : 16'(rv);
    end else begin
      lq = (cq < 0) ? 12'(-l) : 12'(l);
      dq = (cq < 0) ? 16'(-rv) : 16'(rv);
    end
  end

  logic wr;
  assign wr = s_req.sel && s_req.wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; k <= '0; qp <= 6'd1; intra <= 1'b0; decode <= 1'b0; skip_en <= 1'b0;
      bsad <= '0; cyc <= '0; coded <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr) case (s_req.addr)
        12'h100: qp <= s_req.wdata[5:0];
        12'h101: {skip_en, decode, intra} <= s_req.wdata[2:0];
        12'h102: bsad <= s_req.wdata;
        default: ;
      endcase
      if (st != IDLE) cyc <= cyc + 1'b1;
      case (st)
        IDLE: if (start) begin
          k <= '0; cyc <= 16'd1;
          if (decode) begin coded <= 1'b0; st <= QNT; end
          else if (skip_en && !intra && int'(bsad) < SKIP_K * int'(qp)) begin
            coded <= 1'b0; st <= FIN;
          end else begin coded <= 1'b0; st <= FROW; end
        end
        FROW: begin tmp[k] <= 20'(rshr(dot, 9));  k <= k + 1'b1; if (k == 6'd63) st <= FCOL; end
        FCOL: begin coef[k] <= 16'(rshr(dot, 15)); k <= k + 1'b1; if (k == 6'd63) st <= QNT; end
        QNT: begin
          lvl[k]  <= lq;
          coef[k] <= dq;
          if (lq != 0) coded <= 1'b1;
          k <= k + 1'b1;
          if (k == 6'd63) st <= IROW;
        end
        IROW: begin tmp[k] <= 20'(rshr(dot, 9)); k <= k + 1'b1; if (k == 6'd63) st <= ICOL; end
        ICOL: begin rec[k] <= 12'(rshr(dot, 15)); k <= k + 1'b1; if (k == 6'd63) st <= FIN; end
        FIN: begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
      // not-coded block: clear levels and residual
      if (st == IDLE && start && !decode && skip_en && !intra && int'(bsad) < SKIP_K * int'(qp))
        for (int i = 0; i < 64; i++) begin lvl[i] <= '0; rec[i] <= '0; end
      if (wr && s_req.addr[11:6] == 6'd0) xin[s_req.addr[5:0]] <= 12'(signed'(s_req.wdata));
      if (wr && s_req.addr[11:6] == 6'd1) lvl[s_req.addr[5:0]] <= 12'(signed'(s_req.wdata));
      if (in_we && !lvl_we) xin[in_addr] <= in_data;
      if (in_we && lvl_we)  lvl[in_addr] <= in_data;
    end
  end

  assign busy     = (st != IDLE);
  assign lvl_data = lvl[lvl_addr];
  assign res_data = rec[res_addr];

  always_comb begin
    s_rsp.stall = 1'b0;
    s_rsp.rdata = '0;
    case (s_req.addr[11:6])
      6'd1: s_rsp.rdata = 16'(lvl[s_req.addr[5:0]]);
      6'd2: s_rsp.rdata = 16'(rec[s_req.addr[5:0]]);
      default: case (s_req.addr)
        12'h100: s_rsp.rdata = 16'(qp);
        12'h103: s_rsp.rdata = {15'd0, coded};
        12'h104: s_rsp.rdata = cyc;
        default: ;
      endcase
    endcase
  end
endmodule
