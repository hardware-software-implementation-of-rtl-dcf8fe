// mefmc: fine motion estimation and motion compensation (second and third
// steps of the hierarchical search) for one 16x16 luminance macroblock.
//
// The reference window is 20x20 full pels whose origin is the coarse vector
// minus 2 pels, so the current macroblock sits at window offset (2,2).
// Step 2 is a full search of the 9 integer positions within +-1 pel; step 3
// a full search of the 9 half-pel positions within +-0.5 pel of the best
// integer position.  NPE (3) processing elements each accumulate the SAD of
// one candidate, one pixel per cycle, so three candidates take 256 cycles and
// each step takes 768 cycles.  Half-pel samples use bilinear interpolation
// with rounding up ((a+b+1)>>1, (a+b+c+d+2)>>2).  The final pass (256
// cycles) writes the motion-compensated prediction into the prediction
// buffer and the four 8x8 block SADs that the DCTQ skip uses.  The first
// minimum in scan order wins a tie.
//
// MC-only mode (decoder, or an encoder macroblock whose fine search is
// skipped) performs only the final pass at the vector in MC_X/MC_Y, which
// the motion-vector unit supplies directly when MODE.bypass is set
// (parameter bypass: byp_mv_x/y instead of MC_X/MC_Y).
// Vectors are in half-pel units; the coarse vector is in full pels.
// The advanced prediction mode (four vectors) and chroma are not built.
//
// Bus map: 0x000-0x0FF current 16x16, 0x100-0x28F reference 20x20,
//   0x300 COARSE_X, 0x301 COARSE_Y, 0x302 MODE {bypass[1], mc_only[0]}, 0x303 MC_X,
//   0x304 MC_Y; 0x310 MV_X, 0x311 MV_Y, 0x312 SAD, 0x313-0x316 block SADs,
//   0x317 cycles; 0x400-0x4FF prediction (read).
module mefmc
  import mova_pkg::*;
#(
  parameter int NPE = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  slv_req_t          s_req,
  output slv_rsp_t          s_rsp,
  input  logic              start,
  input  logic signed [7:0] byp_mv_x,
  input  logic signed [7:0] byp_mv_y,
  output logic              busy,
  output logic              done,
  // prediction read port (DCTQ / REC)
  input  logic [7:0]        pred_addr,
  output logic [7:0]        pred_data,
  output logic [15:0]       blk_sad [4]
);
  localparam int W = 20;
  logic [7:0] cur  [256];
  logic [7:0] refw [W*W];
  logic [7:0] pred [256];
  logic signed [7:0] coarse_x, coarse_y, mc_x, mc_y, mv_x, mv_y;
  logic        mc_only, mv_bypass;
  logic [15:0] best_sad, cyc;

  typedef enum logic [2:0] {IDLE, INT, HALF, MC, FIN} st_e;
  st_e st;
  logic [7:0]  pix;              // pixel index in the macroblock
  logic [1:0]  grp;              // candidate group (3 candidates each)
  logic [15:0] acc [NPE];
  logic [4:0]  bhx, bhy;         // best half-pel position in the window (half units)
  logic [4:0]  hx0, hy0;         // search centre for the current step (half units)

  // half-pel sample of the window at (y2, x2) in half units
  function automatic logic [7:0] sample(input int y2, input int x2);
    int ya, xa;
    logic [9:0] s;
    ya = y2 >> 1; xa = x2 >> 1;
    if ((x2 & 1) != 0 && (y2 & 1) != 0)
      s = (10'(refw[ya*W+xa]) + 10'(refw[ya*W+xa+1]) + 10'(refw[(ya+1)*W+xa]) +
           10'(refw[(ya+1)*W+xa+1]) + 10'd2) >> 2;
    else if ((x2 & 1) != 0) s = (10'(refw[ya*W+xa]) + 10'(refw[ya*W+xa+1]) + 10'd1) >> 1;
    else if ((y2 & 1) != 0) s = (10'(refw[ya*W+xa]) + 10'(refw[(ya+1)*W+xa]) + 10'd1) >> 1;
    else s = 10'(refw[ya*W+xa]);
    return s[7:0];
  endfunction

  // candidate k of group grp: 3x3 neighbourhood around (hx0,hy0) with step 'stp'
  logic [7:0] pe_diff [NPE];
  logic [7:0] mc_pix;
  int stp;
  always_comb begin
    stp = (st == INT) ? 2 : 1;
    for (int k = 0; k < NPE; k++) begin
      automatic int hx = int'(hx0) + (k - 1) * stp;
      automatic int hy = int'(hy0) + (int'(grp) - 1) * stp;
      automatic int y2 = hy + 2 * int'(pix[7:4]);
      automatic int x2 = hx + 2 * int'(pix[3:0]);
      automatic logic [7:0] r = sample(y2, x2);
      automatic logic [7:0] c = cur[pix];
      pe_diff[k] = (c > r) ? c - r : r - c;
    end
    mc_pix = sample(int'(bhy) + 2 * int'(pix[7:4]), int'(bhx) + 2 * int'(pix[3:0]));
  end

  logic wr;
  assign wr = s_req.sel && s_req.wr;
  always_ff @(posedge clk) begin
    if (wr && s_req.addr < 12'h100) cur[s_req.addr[7:0]] <= s_req.wdata[7:0];
    if (wr && s_req.addr >= 12'h100 && s_req.addr < 12'h100 + 12'(W*W))
      refw[s_req.addr - 12'h100] <= s_req.wdata[7:0];
    if (st == MC) pred[pix] <= mc_pix;
  end

  // best of the group just finished
  logic [15:0] fin_sad [NPE];
  always_comb for (int k = 0; k < NPE; k++) fin_sad[k] = acc[k] + 16'(pe_diff[k]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; coarse_x <= '0; coarse_y <= '0; mc_x <= '0; mc_y <= '0; mc_only <= 1'b0; mv_bypass <= 1'b0;
      mv_x <= '0; mv_y <= '0; best_sad <= '0; cyc <= '0; pix <= '0; grp <= '0;
      bhx <= '0; bhy <= '0; hx0 <= '0; hy0 <= '0; done <= 1'b0;
      for (int k = 0; k < NPE; k++) acc[k] <= '0;
      for (int b = 0; b < 4; b++) blk_sad[b] <= '0;
    end else begin
      done <= 1'b0;
      if (wr) case (s_req.addr)
        12'h300: coarse_x <= s_req.wdata[7:0];
        12'h301: coarse_y <= s_req.wdata[7:0];
        12'h302: {mv_bypass, mc_only} <= s_req.wdata[1:0];
        12'h303: mc_x     <= s_req.wdata[7:0];
        12'h304: mc_y     <= s_req.wdata[7:0];
        default: ;
      endcase
      if (st != IDLE) cyc <= cyc + 1'b1;
      case (st)
        IDLE: if (start) begin
          cyc <= 16'd1; pix <= '0; grp <= '0; best_sad <= 16'hFFFF;
          for (int k = 0; k < NPE; k++) acc[k] <= '0;
          for (int b = 0; b < 4; b++) blk_sad[b] <= '0;
          hx0 <= 5'd4; hy0 <= 5'd4;
          if (mc_only) begin
            // window position of the given vector
            bhx <= 5'(int'(mv_bypass ? byp_mv_x : mc_x) - 2 * int'(coarse_x) + 4);
            bhy <= 5'(int'(mv_bypass ? byp_mv_y : mc_y) - 2 * int'(coarse_y) + 4);
            mv_x <= mv_bypass ? byp_mv_x : mc_x;
            mv_y <= mv_bypass ? byp_mv_y : mc_y;
            st <= MC;
          end else st <= INT;
        end
        INT, HALF: begin
          pix <= pix + 1'b1;
          for (int k = 0; k < NPE; k++) acc[k] <= fin_sad[k];
          if (pix == 8'hFF) begin
            automatic logic [15:0] bs = best_sad;
            automatic logic [4:0] nx = bhx, ny = bhy;
            for (int k = 0; k < NPE; k++) begin
              acc[k] <= '0;
              if (fin_sad[k] < bs) begin
                bs = fin_sad[k];
                nx = 5'(int'(hx0) + (k - 1) * stp);
                ny = 5'(int'(hy0) + (int'(grp) - 1) * stp);
              end
            end
            best_sad <= bs; bhx <= nx; bhy <= ny;
            if (grp == 2'd2) begin
              grp <= '0;
              if (st == INT) begin
                hx0 <= nx; hy0 <= ny; st <= HALF;
              end else begin
                mv_x <= 8'(2 * int'(coarse_x) + int'(nx) - 4);
                mv_y <= 8'(2 * int'(coarse_y) + int'(ny) - 4);
                st <= MC;
              end
            end else grp <= grp + 1'b1;
          end
        end
        MC: begin
          pix <= pix + 1'b1;
          blk_sad[{pix[7], pix[3]}] <= blk_sad[{pix[7], pix[3]}] +
            16'((cur[pix] > mc_pix) ? cur[pix] - mc_pix : mc_pix - cur[pix]);
          if (pix == 8'hFF) st <= FIN;
        end
        FIN: begin
          if (mc_only) best_sad <= blk_sad[0] + blk_sad[1] + blk_sad[2] + blk_sad[3];
          done <= 1'b1;
          st   <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy      = (st != IDLE);
  assign pred_data = pred[pred_addr];

  always_comb begin
    s_rsp.stall = 1'b0;
    s_rsp.rdata = '0;
    if (s_req.addr[11:8] == 4'h4) s_rsp.rdata = 16'(pred[s_req.addr[7:0]]);
    else case (s_req.addr)
      12'h310: s_rsp.rdata = 16'(mv_x);
      12'h311: s_rsp.rdata = 16'(mv_y);
      12'h312: s_rsp.rdata = best_sad;
      12'h313: s_rsp.rdata = blk_sad[0];
      12'h314: s_rsp.rdata = blk_sad[1];
      12'h315: s_rsp.rdata = blk_sad[2];
      12'h316: s_rsp.rdata = blk_sad[3];
      12'h317: s_rsp.rdata = cyc;
      default: s_rsp.rdata = '0;
    endcase
  end
endmodule
