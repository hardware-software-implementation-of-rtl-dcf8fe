// vld: variable length decoder for the texture of one 8x8 block, the
// inverse of the VLC.
//
// Stream bytes are written into the VLD buffer (a FIFO) over the bus.  A
// 64-bit bit reader refills itself one byte per cycle.  On start, for a
// coded block, the decoder reads the 8-bit intra DC value (intra blocks),
// then escape-form events (30 bits: 0000011, 11, last, run[6], 1,
// level[12], 1), placing each level at zigzag position pos + run, until an
// event with 'last' set.  A code that does not match the event form sets
// the error flag and ends the block.  The rebuilt block (raster order) is
// then written into the DCTQ level buffer through the direct port, 64
// cycles.  Header fields are parsed by software and are not handled here.
//
// Bus map: 0x000 write: push a stream byte (bits 7:0); 0x100 MODE
//   {coded[1], intra[0]}; 0x101 STATUS {error[1], busy[0]}; 0x102 bits
//   consumed (write clears); 0x103 buffer level; 0x140-0x17F block (read).
module vld
  import mova_pkg::*;
#(
  parameter int BUF_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  slv_req_t           s_req,
  output slv_rsp_t           s_rsp,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // output into the DCTQ level buffer
  output logic               o_we,
  output logic [5:0]         o_addr,
  output logic signed [11:0] o_data
);
  localparam zz_t ZZ = zigzag_table();

  logic [7:0] f_rdata;
  logic       f_empty, f_full, f_pop, f_push;
  logic [$clog2(BUF_DEPTH):0] f_level;
  assign f_push = s_req.sel && s_req.wr && s_req.addr == 12'h000;

  sync_fifo #(.W(8), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(f_push), .wdata(s_req.wdata[7:0]), .pop(f_pop),
    .rdata(f_rdata), .rdata_next(), .empty(f_empty), .full(f_full), .level(f_level));

  logic [63:0] acc;
  logic [6:0]  nb;
  logic [15:0] consumed;
  logic signed [11:0] blk [64];
  logic        intra, coded, err;

  typedef enum logic [2:0] {IDLE, CLR, DC, EV, OUT, FIN} st_e;
  st_e st;
  logic [6:0] pos;

  // consumption this cycle
  logic [5:0] take;
  always_comb begin
    take = '0;
    if (st == DC && nb >= 7'd8) take = 6'd8;
    if (st == EV && nb >= 7'd30) take = 6'd30;
  end
  assign f_pop = !f_empty && (int'(nb) - int'(take) <= 56);

  logic ev_ok;
  assign ev_ok = (acc[63:57] == 7'b0000011) && (acc[56:55] == 2'b11) && acc[47] && acc[34];
  logic [6:0] npos;
  assign npos = pos + 7'(acc[53:48]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; nb <= '0; consumed <= '0; intra <= 1'b0; coded <= 1'b0; err <= 1'b0;
      st <= IDLE; pos <= '0; done <= 1'b0; o_we <= 1'b0; o_addr <= '0; o_data <= '0;
    end else begin
      automatic logic [63:0] a = acc << take;
      automatic logic [6:0]  n = nb - 7'(take);
      done <= 1'b0;
      o_we <= 1'b0;
      if (f_pop) a = a | (64'(f_rdata) << (7'd56 - n));
      acc <= a;
      nb  <= f_pop ? n + 7'd8 : n;
      consumed <= consumed + 16'(take);
      if (s_req.sel && s_req.wr && s_req.addr == 12'h100) {coded, intra} <= s_req.wdata[1:0];
      if (s_req.sel && s_req.wr && s_req.addr == 12'h102) consumed <= '0;
      case (st)
        IDLE: if (start) begin pos <= '0; err <= 1'b0; st <= CLR; end
        CLR: begin
          for (int i = 0; i < 64; i++) blk[i] <= '0;
          st <= !coded ? OUT : (intra ? DC : EV);
          pos <= intra ? 7'd1 : 7'd0;
          if (!coded) pos <= '0;
        end
        DC: if (nb >= 7'd8) begin
          blk[0] <= 12'(acc[63:56]);
          st <= EV;
        end
        EV: if (nb >= 7'd30) begin
          if (!ev_ok || npos > 7'd63) begin
            err <= 1'b1; pos <= '0; st <= OUT;
          end else begin
            blk[ZZ[npos[5:0]]] <= acc[46:35];
            pos <= npos + 7'd1;
            if (acc[54]) begin pos <= '0; st <= OUT; end
          end
        end
        OUT: begin
          o_we <= 1'b1; o_addr <= pos[5:0]; o_data <= blk[pos[5:0]];
          pos <= pos + 1'b1;
          if (pos == 7'd63) st <= FIN;
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
    if (s_req.addr[11:6] == 6'h05) s_rsp.rdata = 16'(blk[s_req.addr[5:0]]);
    else case (s_req.addr)
      12'h100: s_rsp.rdata = {14'd0, coded, intra};
      12'h101: s_rsp.rdata = {14'd0, err, busy};
      12'h102: s_rsp.rdata = consumed;
      12'h103: s_rsp.rdata = 16'(f_level);
      default: ;
    endcase
  end
endmodule
