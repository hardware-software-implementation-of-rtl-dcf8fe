// mec: coarse motion estimation (first step of the three-step hierarchical
// search).
//
// The current macroblock and its reference search area are held 2:1
// subsampled in both directions: an 8x8 current block and a 22x22 reference
// window, so the +-RANGE full-pel search (+-14) becomes +-7 subsampled
// positions, 15x15 = 225 candidates.  NPE processing elements (8) each take
// the absolute difference of one pixel of a row, so one candidate row of 8
// pixels is summed per cycle and a candidate takes 8 cycles: a full search
// takes 1800 cycles, inside the 4,500-cycle encoder stage budget.
//
// ME skip: when enabled, the SAD at the predicted vector is computed first
// (8 cycles); if it is not greater than the largest of the three SADs of the
// left, upper and upper-right macroblocks the search is skipped and the
// predicted vector is the result (flag 'skip', which also tells the fine
// search it may be skipped).  Inter/intra decision: the mean absolute
// deviation A of the current block is compared with the best SAD; the block
// is intra when A < SAD - 2*64 (the usual reference-encoder rule scaled to
// 64 samples; this rule is this design's choice).
//
// The document gives the step sizes, range, PE count, subsampled 8x8 data,
// skip rule and the decisions; the PE arrangement, tie rule (first minimum
// in raster order) and register map are this design's.
//
// Bus map (word address, pixel in bits 7:0):
//   0x000-0x03F current 8x8, 0x100-0x2E3 reference 22x22 (row-major)
//   0x400 PRED_X, 0x401 PRED_Y (predicted vector, full pel, even values)
//   0x402 SAD_LEFT, 0x403 SAD_UP, 0x404 SAD_UPRIGHT, 0x405 SKIP_EN
//   0x410 MV_X, 0x411 MV_Y (full pel), 0x412 SAD, 0x413 {intra, skip},
//   0x414 cycles used by the last search
module mec
  import mova_pkg::*;
#(
  parameter int NPE   = 8,
  parameter int RANGE = 14
) (
  input  logic     clk,
  input  logic     rst_n,
  input  slv_req_t s_req,
  output slv_rsp_t s_rsp,
  input  logic     start,
  output logic     busy,
  output logic     done
);
  localparam int SR  = RANGE / 2;          // subsampled range
  localparam int NC  = 2 * SR + 1;         // candidates per axis
  localparam int WIN = 8 + 2 * SR;         // reference window size

  logic [7:0] cur [64];
  logic [7:0] refw [WIN*WIN];
  logic signed [7:0] pred_x, pred_y, mv_x, mv_y;
  logic [15:0] sad_l, sad_u, sad_ur, best_sad, cyc;
  logic        skip_en, intra, skip;

  typedef enum logic [2:0] {IDLE, PRED, SEARCH, MEAN, DEV, FIN} st_e;
  st_e st;
  logic [4:0]  cx, cy;          // candidate offset in the window
  logic [2:0]  row;
  logic [15:0] acc;
  logic [13:0] sum;
  logic [15:0] dev;

  // processing elements: one row of NPE absolute differences
  logic [10:0] row_sad;
  logic [10:0] row_dev;
  logic [10:0] row_sum;
  logic [7:0]  mean;
  assign mean = sum[13:6];
  always_comb begin
    row_sad = '0;
    row_dev = '0;
    row_sum = '0;
    for (int p = 0; p < NPE; p++) begin
      automatic logic [7:0] a = cur[{row, 3'(p)}];
      automatic logic [7:0] b = refw[(int'(cy) + int'(row)) * WIN + int'(cx) + p];
      row_sad += 11'((a > b) ? a - b : b - a);
      row_dev += 11'((a > mean) ? a - mean : mean - a);
      row_sum += 11'(a);
    end
  end

  logic [15:0] cand_sad;
  assign cand_sad = acc + 16'(row_sad);
  logic [15:0] nb_max;
  always_comb begin
    nb_max = sad_l;
    if (sad_u > nb_max)  nb_max = sad_u;
    if (sad_ur > nb_max) nb_max = sad_ur;
  end

  logic wr;
  assign wr = s_req.sel && s_req.wr;

  always_ff @(posedge clk) begin
    if (wr && s_req.addr < 12'h040) cur[s_req.addr[5:0]] <= s_req.wdata[7:0];
    if (wr && s_req.addr >= 12'h100 && s_req.addr < 12'(12'h100 + WIN * WIN))
      refw[s_req.addr - 12'h100] <= s_req.wdata[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; pred_x <= '0; pred_y <= '0; sad_l <= '0; sad_u <= '0; sad_ur <= '0;
      skip_en <= 1'b0; mv_x <= '0; mv_y <= '0; best_sad <= '0; intra <= 1'b0; skip <= 1'b0;
      cx <= '0; cy <= '0; row <= '0; acc <= '0; sum <= '0; dev <= '0; cyc <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wr) case (s_req.addr)
        12'h400: pred_x  <= s_req.wdata[7:0];
        12'h401: pred_y  <= s_req.wdata[7:0];
        12'h402: sad_l   <= s_req.wdata;
        12'h403: sad_u   <= s_req.wdata;
        12'h404: sad_ur  <= s_req.wdata;
        12'h405: skip_en <= s_req.wdata[0];
        default: ;
      endcase
      if (st != IDLE) cyc <= cyc + 1'b1;
      case (st)
        IDLE: if (start) begin
          cyc <= 16'd1; acc <= '0; row <= '0; skip <= 1'b0; best_sad <= 16'hFFFF;
          if (skip_en) begin
            cx <= 5'(SR + (pred_x >>> 1)); cy <= 5'(SR + (pred_y >>> 1));
            st <= PRED;
          end else begin
            cx <= '0; cy <= '0; st <= SEARCH;
          end
        end
        PRED: begin
          row <= row + 1'b1;
          acc <= cand_sad;
          if (row == 3'd7) begin
            acc <= '0;
            if (cand_sad <= nb_max) begin
              skip <= 1'b1; best_sad <= cand_sad; mv_x <= pred_x; mv_y <= pred_y;
              sum <= '0; st <= MEAN;
            end else begin
              cx <= '0; cy <= '0; st <= SEARCH;
            end
          end
        end
        SEARCH: begin
          row <= row + 1'b1;
          acc <= cand_sad;
          if (row == 3'd7) begin
            acc <= '0;
            if (cand_sad < best_sad) begin
              best_sad <= cand_sad;
              mv_x <= 8'(2 * (int'(cx) - SR));
              mv_y <= 8'(2 * (int'(cy) - SR));
            end
            if (int'(cx) == NC - 1) begin
              cx <= '0;
              if (int'(cy) == NC - 1) begin sum <= '0; st <= MEAN; end
              else cy <= cy + 1'b1;
            end else cx <= cx + 1'b1;
          end
        end
        MEAN: begin
          row <= row + 1'b1;
          sum <= sum + 14'(row_sum);
          if (row == 3'd7) begin dev <= '0; st <= DEV; end
        end
        DEV: begin
          row <= row + 1'b1;
          dev <= dev + 16'(row_dev);
          if (row == 3'd7) st <= FIN;
        end
        FIN: begin
          intra <= (int'(dev) < int'(best_sad) - 128);
          done  <= 1'b1;
          st    <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

  always_comb begin
    s_rsp.stall = 1'b0;
    case (s_req.addr)
      12'h410: s_rsp.rdata = 16'(mv_x);
      12'h411: s_rsp.rdata = 16'(mv_y);
      12'h412: s_rsp.rdata = best_sad;
      12'h413: s_rsp.rdata = {14'd0, intra, skip};
      12'h414: s_rsp.rdata = cyc;
      default: s_rsp.rdata = '0;
    endcase
  end
endmodule
