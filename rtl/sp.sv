// sp: stream producer.  It joins the header bits written by software (the
// header VLC runs in software) and the texture bit groups from the VLC into
// one bit stream, packs it most significant bit first into bytes, keeps the
// bytes in its local buffer and hands them to the off-chip stream buffer
// through a valid/ready byte port.  It also counts the bits produced, which
// software reads as the per-macroblock bit total used for packet changes
// and rate control.
//
// A bit group is accepted when fewer than 8 bits wait in the packer and the
// buffer has room for 5 bytes; afterwards one byte per cycle moves into the
// buffer.  A header group written by software has priority over the VLC.
// 'Stuff' appends a 0 and then 1s up to the next byte boundary (the MPEG-4
// stuffing form, this design's choice).
//
// APB registers: 0-3 header bits [7:0]..[31:24], 4 write: header length
//   (1-32, 0 means 32) and push; 5 write: stuff; 5 read: {pending, empty};
//   6/7 bit count low/high (read; write to 6 clears).
module sp
  import mova_pkg::*;
#(
  parameter int BUF_DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  apb_req_t   p_req,
  output logic [7:0] prdata,
  input  logic       in_valid,
  input  bitchunk_t  in_chunk,
  output logic       in_ready,
  output logic       out_valid,
  output logic [7:0] out_data,
  input  logic       out_ready
);
  logic [31:0] hbits;
  logic        hpend;
  bitchunk_t   hchunk;
  logic [63:0] acc;        // right-aligned pending bits
  logic [6:0]  nb;
  logic [15:0] bitcnt;
  logic        stuff_req;
  logic        wr;

  logic       f_push, f_full, f_empty;
  logic [7:0] f_wdata;
  logic [$clog2(BUF_DEPTH):0] f_level;

  assign wr = psel && p_req.penable && p_req.pwrite;

  sync_fifo #(.W(8), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(f_push), .wdata(f_wdata), .pop(out_valid && out_ready),
    .rdata(out_data), .rdata_next(), .empty(f_empty), .full(f_full), .level(f_level));
  assign out_valid = !f_empty;

  logic can_take;
  assign can_take = (nb < 7'd8) && (int'(f_level) <= BUF_DEPTH - 5);
  assign in_ready = can_take && !hpend && !stuff_req;
  assign f_push   = (nb >= 7'd8);
  assign f_wdata  = 8'(acc >> (nb - 7'd8));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hbits <= '0; hpend <= 1'b0; hchunk <= '0; acc <= '0; nb <= '0; bitcnt <= '0;
      stuff_req <= 1'b0;
    end else begin
      automatic logic [6:0] n = f_push ? nb - 7'd8 : nb;
      automatic logic [63:0] a = acc;
      if (wr) case (p_req.paddr[2:0])
        3'd0: hbits[7:0]   <= p_req.pwdata;
        3'd1: hbits[15:8]  <= p_req.pwdata;
        3'd2: hbits[23:16] <= p_req.pwdata;
        3'd3: hbits[31:24] <= p_req.pwdata;
        3'd4: begin hpend <= 1'b1; hchunk <= '{len: p_req.pwdata[5:0], bits: hbits}; end
        3'd5: stuff_req <= 1'b1;
        default: ;
      endcase
      if (can_take) begin
        if (hpend) begin
          automatic int l = (hchunk.len == 0) ? 32 : int'(hchunk.len);
          a = (a << l) | 64'(hchunk.bits & (32'hFFFFFFFF >> (32 - l)));
          n = n + 7'(l);
          bitcnt <= bitcnt + 16'(l);
          hpend <= 1'b0;
        end else if (stuff_req) begin
          automatic int l = 8 - int'(n);
          a = (a << l) | 64'((8'hFF >> (9 - l)));
          n = n + 7'(l);
          bitcnt <= bitcnt + 16'(l);
          stuff_req <= 1'b0;
        end else if (in_valid) begin
          a = (a << in_chunk.len) | 64'(in_chunk.bits);
          n = n + 7'(in_chunk.len);
          bitcnt <= bitcnt + 16'(in_chunk.len);
        end
      end
      if (wr && p_req.paddr[2:0] == 3'd6) bitcnt <= '0;
      acc <= a;
      nb  <= n;
    end
  end

  always_comb begin
    case (p_req.paddr[2:0])
      3'd5: prdata = {6'd0, hpend || stuff_req || (nb != 0), f_empty};
      3'd6: prdata = bitcnt[7:0];
      3'd7: prdata = bitcnt[15:8];
      default: prdata = '0;
    endcase
  end
endmodule
