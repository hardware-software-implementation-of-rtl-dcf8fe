// vlc: variable length coder for the texture of one 8x8 block.
//
// It reads the quantized levels from the DCTQ level buffer in zigzag order,
// counts runs of zeros and turns every non-zero level into a
// (last, run, level) event, where 'last' marks the final non-zero level of
// the block.  Each event is emitted as a bit group to the stream producer.
// Event code: the MPEG-4 fixed-length escape form (escape 0000011, mode 11,
// last 1 bit, run 6 bits, marker 1, level 12 bits two's complement, marker
// 1), 30 bits.  The variable-length tables of the standard are not built,
// so every event uses this escape form.  For intra blocks the DC level is
// sent first as an 8-bit fixed-length value (clipped to 1..254) and the
// scan starts at position 1.  A block with no non-zero level to code emits
// nothing.  The number of texture bits emitted is accumulated for rate
// control.
//
// Timing: one scan position per cycle, stalled while a bit group waits for
// the stream producer; 64 cycles plus stalls per block.
//
// APB registers: 0 CTRL {intra[1], start[0]} (write), 1 STATUS {busy},
//   2/3 texture bit count low/high (read; a write to 2 clears it).
module vlc
  import mova_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               psel,
  input  apb_req_t           p_req,
  output logic [7:0]         prdata,
  input  logic               start,        // from the command registers
  input  logic               start_intra,
  output logic               busy,
  output logic               done,
  output logic [5:0]         lvl_addr,
  input  logic signed [11:0] lvl_data,
  output logic               out_valid,
  output bitchunk_t          out_chunk,
  input  logic               out_ready
);
  localparam zz_t ZZ = zigzag_table();

  typedef enum logic [1:0] {IDLE, SCAN, FLUSH, FIN} st_e;
  st_e st;
  logic [6:0]  pos;
  logic [5:0]  run;
  logic        have_pend;
  logic [5:0]  p_run;
  logic [11:0] p_lvl;
  logic [15:0] tbits;
  logic        hold;
  logic        wr;

  assign wr       = psel && p_req.penable && p_req.pwrite;
  assign hold     = out_valid && !out_ready;
  assign lvl_addr = (st == IDLE) ? 6'd0 : ZZ[pos[5:0]];

  function automatic bitchunk_t esc(input logic last, input logic [5:0] r, input logic [11:0] l);
    bitchunk_t b;
    b.len  = 6'd30;
    b.bits = {2'b00, 7'b0000011, 2'b11, last, r, 1'b1, l, 1'b1};
    return b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; pos <= '0; run <= '0; have_pend <= 1'b0; p_run <= '0; p_lvl <= '0;
      tbits <= '0; out_valid <= 1'b0; out_chunk <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (wr && p_req.paddr[1:0] == 2'd2) tbits <= '0;
      case (st)
        IDLE: begin
          automatic logic go = start || (wr && p_req.paddr[1:0] == 2'd0 && p_req.pwdata[0]);
          automatic logic in = start ? start_intra : p_req.pwdata[1];
          if (go && !hold) begin
            run <= '0; have_pend <= 1'b0; st <= SCAN;
            if (in) begin
              // intra DC as an 8-bit fixed-length value
              automatic int dc = int'(lvl_data);
              if (dc < 1) dc = 1;
              if (dc > 254) dc = 254;
              out_valid <= 1'b1;
              out_chunk <= '{len: 6'd8, bits: 32'(dc)};
              tbits <= tbits + 16'd8;
              pos <= 7'd1;
            end else pos <= 7'd0;
          end
        end
        SCAN: if (!hold) begin
          if (lvl_data != 0) begin
            if (have_pend) begin
              out_valid <= 1'b1;
              out_chunk <= esc(1'b0, p_run, p_lvl);
              tbits <= tbits + 16'd30;
            end
            have_pend <= 1'b1; p_run <= run; p_lvl <= lvl_data; run <= '0;
          end else run <= run + 1'b1;
          pos <= pos + 1'b1;
          if (pos == 7'd63) st <= FLUSH;
        end
        FLUSH: if (!hold) begin
          if (have_pend) begin
            out_valid <= 1'b1;
            out_chunk <= esc(1'b1, p_run, p_lvl);
            tbits <= tbits + 16'd30;
          end
          st <= FIN;
        end
        FIN: if (!hold) begin done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  always_comb begin
    case (p_req.paddr[1:0])
      2'd1: prdata = {7'd0, busy};
      2'd2: prdata = tbits[7:0];
      2'd3: prdata = tbits[15:8];
      default: prdata = '0;
    endcase
  end
endmodule
