// Testbench for mvmvd: random candidate vectors; the median predictor, the
// encoder's difference and the decoder's sum are compared with values
// computed here, including the bypass outputs.
`include "tb/tb_common.svh"
module tb_mvmvd;
  import mova_pkg::*;
  logic clk, rst_n, start, done;
  logic signed [7:0] mv_x, mv_y;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  mvmvd dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_SLAVE_TASKS
  logic [15:0] v;
  function automatic int med(int a, int b, int c);
    // the median is the value that is neither the unique max nor min
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction
  initial begin
    s_req = '0; start = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic int c [8];
      automatic bit dec = t % 2;
      automatic int px, py;
      for (int i = 0; i < 8; i++) begin c[i] = $urandom_range(0, 60) - 30; bw(12'(i), 16'(c[i])); end
      bw(12'h008, 16'(dec));
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      `TB_CHECK(done == 1'b1, "done one cycle after start")
      px = med(c[0], c[2], c[4]); py = med(c[1], c[3], c[5]);
      br(12'h010, v); `TB_CHECK($signed(v) == px, "pred x")
      br(12'h011, v); `TB_CHECK($signed(v) == py, "pred y")
      if (dec) begin
        `TB_CHECK(mv_x == px + c[6] && mv_y == py + c[7], "decoded vector on bypass port")
      end else begin
        br(12'h012, v); `TB_CHECK($signed(v) == c[6] - px, "mvd x")
        br(12'h013, v); `TB_CHECK($signed(v) == c[7] - py, "mvd y")
        `TB_CHECK(mv_x == c[6] && mv_y == c[7], "encoder vector on bypass port")
      end
    end
    `TB_FINISH
  end
endmodule
