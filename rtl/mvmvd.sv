// mvmvd: motion vector prediction and differential coding.
//
// The predictor is the component-wise median of the vectors of the left,
// upper and upper-right macroblocks (the candidates are written by software,
// which substitutes zero or another candidate at picture edges, following
// the MPEG-4 rules).  Encode: MVD = MV - predictor.  Decode: MV =
// predictor + MVD.  The result registers drive the motion-compensation
// unit directly ('bypass' of the parameters, so no software transfer is
// needed between the two modules).  Vectors are signed half-pel values;
// wrapping into the f_code range is left to software.  One cycle from
// start to done.
//
// Bus map: 0x000/1 A (left) x/y, 0x002/3 B (upper), 0x004/5 C (upper-right),
//   0x006/7 input vector (MV when encoding, MVD when decoding), 0x008 MODE
//   {decode[0]}; read 0x010/1 predictor, 0x012/3 MVD, 0x014/5 MV.
module mvmvd
  import mova_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  slv_req_t          s_req,
  output slv_rsp_t          s_rsp,
  input  logic              start,
  output logic              done,
  output logic signed [7:0] mv_x,
  output logic signed [7:0] mv_y
);
  logic signed [7:0] in_r [8];
  logic              decode;
  logic signed [7:0] px, py, dx, dy;

  function automatic logic signed [7:0] med3(input logic signed [7:0] a, b, c);
    logic signed [7:0] mx, mn;
    mx = (a > b) ? a : b;
    mn = (a > b) ? b : a;
    if (c > mx) return mx;
    if (c < mn) return mn;
    return c;
  endfunction

  logic signed [7:0] mpx, mpy;
  assign mpx = med3(in_r[0], in_r[2], in_r[4]);
  assign mpy = med3(in_r[1], in_r[3], in_r[5]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 8; i++) in_r[i] <= '0;
      decode <= 1'b0; px <= '0; py <= '0; dx <= '0; dy <= '0; mv_x <= '0; mv_y <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (s_req.sel && s_req.wr && s_req.addr < 12'h008) in_r[s_req.addr[2:0]] <= s_req.wdata[7:0];
      if (s_req.sel && s_req.wr && s_req.addr == 12'h008) decode <= s_req.wdata[0];
      if (start) begin
        px <= mpx; py <= mpy;
        if (decode) begin
          dx <= in_r[6]; dy <= in_r[7];
          mv_x <= mpx + in_r[6]; mv_y <= mpy + in_r[7];
        end else begin
          mv_x <= in_r[6]; mv_y <= in_r[7];
          dx <= in_r[6] - mpx; dy <= in_r[7] - mpy;
        end
      end
    end
  end

  always_comb begin
    s_rsp.stall = 1'b0;
    case (s_req.addr)
      12'h010: s_rsp.rdata = 16'(px);
      12'h011: s_rsp.rdata = 16'(py);
      12'h012: s_rsp.rdata = 16'(dx);
      12'h013: s_rsp.rdata = 16'(dy);
      12'h014: s_rsp.rdata = 16'(mv_x);
      12'h015: s_rsp.rdata = 16'(mv_y);
      default: s_rsp.rdata = '0;
    endcase
  end
endmodule
