// rec: reconstruction of the luminance macroblock.
//
// For each 8x8 luminance block (BLK = 0..3, raster order in the
// macroblock) it adds the motion-compensated prediction, read from the
// fine-ME/MC prediction buffer, to the residual rebuilt by the DCTQ, clips
// to 0..255 and writes the result into the reconstruction buffer (one pixel
// per cycle, 64 cycles + 1).  Intra blocks use a zero prediction.  When rate
// control has skipped the macroblock, the co-located macroblock of the
// previous reconstructed picture (loaded into the 'previous' buffer, REC-BUF1)
// is copied instead (256 cycles + 1).  The reconstruction buffer is read by
// the DMA controller (to SDRAM, REC-BUF2) and by the deblocking filter.
// Chroma reconstruction is not built, because the MC built here predicts
// luminance only.
//
// Bus map: 0x000-0x0FF reconstructed MB (read), 0x100-0x1FF previous MB
//   (write), 0x200 CTRL {skip[2], intra[1]}, 0x201 BLK.
module rec
  import mova_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  slv_req_t           s_req,
  output slv_rsp_t           s_rsp,
  input  logic               start,
  output logic               busy,
  output logic               done,
  output logic [7:0]         pred_addr,
  input  logic [7:0]         pred_data,
  output logic [5:0]         res_addr,
  input  logic signed [11:0] res_data,
  input  logic [7:0]         db_addr,
  output logic [7:0]         db_data
);
  logic [7:0] outb [256];
  logic [7:0] prev [256];
  logic       skip, intra;
  logic [1:0] blk;
  typedef enum logic [1:0] {IDLE, ADD, COPY, FIN} st_e;
  st_e st;
  logic [7:0] cnt;
  logic [7:0] mbi;     // macroblock pixel index of the current block pixel

  assign mbi       = {blk[1], cnt[5:3], blk[0], cnt[2:0]};
  assign pred_addr = mbi;
  assign res_addr  = cnt[5:0];

  logic signed [15:0] sum;
  assign sum = 16'(res_data) + (intra ? 16'sd0 : 16'(pred_data));

  logic wr;
  assign wr = s_req.sel && s_req.wr;
  always_ff @(posedge clk) begin
    if (wr && s_req.addr[11:8] == 4'h1) prev[s_req.addr[7:0]] <= s_req.wdata[7:0];
    if (st == ADD)  outb[mbi] <= clip8(sum);
    if (st == COPY) outb[cnt] <= prev[cnt];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip <= 1'b0; intra <= 1'b0; blk <= '0; st <= IDLE; cnt <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr && s_req.addr == 12'h200) {skip, intra} <= s_req.wdata[2:1];
      if (wr && s_req.addr == 12'h201) blk <= s_req.wdata[1:0];
      case (st)
        IDLE: if (start) begin cnt <= '0; st <= skip ? COPY : ADD; end
        ADD:  begin cnt <= cnt + 1'b1; if (cnt == 8'd63)  st <= FIN; end
        COPY: begin cnt <= cnt + 1'b1; if (cnt == 8'd255) st <= FIN; end
        FIN:  begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy    = (st != IDLE);
  assign db_data = outb[db_addr];

  always_comb begin
    s_rsp.stall = 1'b0;
    s_rsp.rdata = '0;
    if (s_req.addr[11:8] == 4'h0) s_rsp.rdata = 16'(outb[s_req.addr[7:0]]);
    else if (s_req.addr == 12'h200) s_rsp.rdata = {13'd0, skip, intra, 1'b0};
    else if (s_req.addr == 12'h201) s_rsp.rdata = 16'(blk);
  end
endmodule
