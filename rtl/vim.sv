// vim: video input module.  It receives the image sensor's 8-bit Y/UV
// pixel stream (4:2:2, bytes alternating chroma and luma: Cb Y Cr Y ...),
// qualified by an active-line strobe, pairs each chroma byte with the
// following luma byte into a 16-bit word {Y, C} and stores the words in the
// video input buffer (a FIFO) for the bus to read.  The rising edge of the
// vertical sync starts a frame: the frame counter advances and 'frame_irq'
// pulses, which starts codec processing at frame level.  Lines are counted
// on the falling edge of the line strobe.  A word arriving while the buffer
// is full is dropped and sets overflow.  The byte order and register layout
// are this design's choices.
//
// Bus map: 0x000 read: pop a word {Y,C}; 0x001 level; 0x002 line count;
//   0x003 frame count; 0x004 {overflow}; write to 0x004 clears overflow.
module vim
  import mova_pkg::*;
#(
  parameter int BUF_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  slv_req_t   s_req,
  output slv_rsp_t   s_rsp,
  input  logic       vsync,
  input  logic       href,
  input  logic       pix_valid,
  input  logic [7:0] pix,
  output logic       frame_irq
);
  logic        vs_d, hr_d, phase, ovf;
  logic [7:0]  chroma;
  logic [15:0] lines, frames;
  logic        push, pop, empty, full;
  logic [15:0] rd;
  logic [$clog2(BUF_DEPTH):0] level;

  assign push = href && pix_valid && phase;
  assign pop  = s_req.sel && !s_req.wr && s_req.addr == 12'h000;

  sync_fifo #(.W(16), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push, .wdata({pix, chroma}), .pop, .rdata(rd), .rdata_next(), .empty, .full, .level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs_d <= 1'b0; hr_d <= 1'b0; phase <= 1'b0; chroma <= '0; lines <= '0; frames <= '0;
      frame_irq <= 1'b0; ovf <= 1'b0;
    end else begin
      vs_d <= vsync;
      hr_d <= href;
      frame_irq <= vsync && !vs_d;
      if (vsync && !vs_d) begin frames <= frames + 1'b1; lines <= '0; end
      if (!href && hr_d) lines <= lines + 1'b1;
      if (!href) phase <= 1'b0;
      else if (pix_valid) begin
        if (!phase) chroma <= pix;
        phase <= !phase;
      end
      if (push && full && !pop) ovf <= 1'b1;
      else if (s_req.sel && s_req.wr && s_req.addr == 12'h004) ovf <= 1'b0;
    end
  end

  always_comb begin
    s_rsp.stall = 1'b0;
    case (s_req.addr)
      12'h000: s_rsp.rdata = empty ? 16'd0 : rd;
      12'h001: s_rsp.rdata = 16'(level);
      12'h002: s_rsp.rdata = lines;
      12'h003: s_rsp.rdata = frames;
      12'h004: s_rsp.rdata = {15'd0, ovf};
      default: s_rsp.rdata = '0;
    endcase
  end
endmodule
