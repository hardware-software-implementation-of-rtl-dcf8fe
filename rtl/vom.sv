// vom: video output module.  Decoded pixels are written over the bus as
// 16-bit words {Y, C} in 4:2:2 order (Cb with the even pixel, Cr with the
// odd one) into the video output buffer (a FIFO).  The display side takes
// one pixel per cycle while 'out_ready' is high, either as YUV
// (out_data = {8'h00, Y, C}) or converted to 24-bit RGB.
// RGB conversion (full-range BT.601, 8 fraction bits, this design's choice
// since only the YUV/RGB output is specified):
//   R = Y + 1.402 (Cr-128), G = Y - 0.344 (Cb-128) - 0.714 (Cr-128),
//   B = Y + 1.772 (Cb-128), each clipped to 0..255.
// In RGB mode a pixel pair leaves only when both of its words are buffered
// (the even pixel needs Cr of the odd word).
//
// Bus map: 0x000 write: push a word; 0x001 MODE {rgb[0]}; 0x002 level.
module vom
  import mova_pkg::*;
#(
  parameter int BUF_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  slv_req_t    s_req,
  output slv_rsp_t    s_rsp,
  output logic        out_valid,
  output logic [23:0] out_data,
  input  logic        out_ready
);
  logic        rgb, odd;
  logic [7:0]  cb_hold;
  logic        push, pop, empty, full;
  logic [15:0] rd;
  logic [$clog2(BUF_DEPTH):0] level;
  logic [15:0] rd_next;

  assign push = s_req.sel && s_req.wr && s_req.addr == 12'h000;

  // two-entry look-ahead: in RGB mode an even pixel needs the next word
  sync_fifo #(.W(16), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push, .wdata(s_req.wdata), .pop, .rdata(rd), .rdata_next(rd_next), .empty, .full, .level);

  logic avail;
  assign avail     = rgb ? (odd ? !empty : (int'(level) >= 2)) : !empty;
  assign out_valid = avail;
  assign pop       = avail && out_ready;

  logic [7:0] y, cb, cr;
  logic [7:0] cr_next;
  assign cr_next = rd_next[7:0];
  always_comb begin
    y  = rd[15:8];
    cb = odd ? cb_hold : rd[7:0];
    cr = odd ? rd[7:0] : cr_next;
  end

  logic signed [19:0] dy, du, dv, r, g, b;
  always_comb begin
    dy = 20'(y);
    du = 20'(cb) - 20'sd128;
    dv = 20'(cr) - 20'sd128;
    r  = dy + ((20'sd359 * dv + 20'sd128) >>> 8);
    g  = dy - ((20'sd88 * du + 20'sd183 * dv + 20'sd128) >>> 8);
    b  = dy + ((20'sd454 * du + 20'sd128) >>> 8);
    out_data = rgb ? {clip8(16'(r)), clip8(16'(g)), clip8(16'(b))} : {8'h00, rd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgb <= 1'b0; odd <= 1'b0; cb_hold <= '0;
    end else begin
      if (s_req.sel && s_req.wr && s_req.addr == 12'h001) begin rgb <= s_req.wdata[0]; odd <= 1'b0; end
      else if (pop) begin
        odd <= !odd;
        if (!odd) cb_hold <= rd[7:0];
      end
    end
  end

  always_comb begin
    s_rsp.stall = 1'b0;
    case (s_req.addr)
      12'h001: s_rsp.rdata = {15'd0, rgb};
      12'h002: s_rsp.rdata = 16'(level);
      default: s_rsp.rdata = '0;
    endcase
  end
endmodule
