// isc: input stream controller.  The compressed stream arrives as bytes
// with a valid strobe and is kept in the ISC buffer (a FIFO) until it is
// read over the system bus (normally by the DMA controller, which moves it
// to SDRAM).  A byte that arrives while the buffer is full is dropped and
// sets a sticky overflow flag.  Byte-wide input and the register layout are
// this design's choices.
//
// Bus map: 0x000 read: pop one byte (0 when empty); 0x001 STATUS
//   {overflow[15], level}; a write to 0x001 clears overflow.
module isc
  import mova_pkg::*;
#(
  parameter int BUF_DEPTH = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  slv_req_t   s_req,
  output slv_rsp_t   s_rsp,
  input  logic       strm_valid,
  input  logic [7:0] strm_data,
  output logic       overflow
);
  logic [7:0] rd;
  logic       empty, full, pop;
  logic [$clog2(BUF_DEPTH):0] level;

  assign pop = s_req.sel && !s_req.wr && s_req.addr == 12'h000;

  sync_fifo #(.W(8), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(strm_valid), .wdata(strm_data), .pop,
    .rdata(rd), .rdata_next(), .empty, .full, .level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) overflow <= 1'b0;
    else if (strm_valid && full && !pop) overflow <= 1'b1;
    else if (s_req.sel && s_req.wr && s_req.addr == 12'h001) overflow <= 1'b0;
  end

  always_comb begin
    s_rsp.stall = 1'b0;
    s_rsp.rdata = '0;
    if (s_req.addr == 12'h000 && !empty) s_rsp.rdata = {8'd0, rd};
    if (s_req.addr == 12'h001) s_rsp.rdata = {overflow, 15'(level)};
  end
endmodule
