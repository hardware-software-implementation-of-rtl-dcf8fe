// Testbench for vom: words are written over the bus and leave one pixel per
// ready cycle.  YUV mode passes words through; RGB mode is compared with a
// BT.601 reference (tolerance 1 LSB).  Output rate: one pixel per cycle.
`include "tb/tb_common.svh"
module tb_vom;
  import mova_pkg::*;
  logic clk, rst_n, out_valid, out_ready;
  logic [23:0] out_data;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  vom #(.BUF_DEPTH(256)) dut (.*);
  `TB_CLOCK_WATCHDOG(20000)
  `TB_SLAVE_TASKS
  function automatic int clipi(real v);
    int i = $rtoi(v + (v >= 0 ? 0.5 : -0.5));
    return i < 0 ? 0 : (i > 255 ? 255 : i);
  endfunction
  function automatic bit near(int a, int b); return (a - b) <= 1 && (b - a) <= 1; endfunction
  logic [15:0] w[32];
  initial begin
    logic [15:0] d;
    int t0;
    s_req = '0; out_ready = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin w[i] = 16'($urandom); bw(0, w[i]); end
    br(2, d); `TB_CHECK(d == 32, "level")
    @(negedge clk); out_ready = 1; t0 = $time;
    for (int i = 0; i < 32; i++) begin
      #1; `TB_CHECK(out_valid && out_data == {8'h00, w[i]}, $sformatf("yuv %0d", i))
      @(negedge clk);
    end
    `TB_CHECK(($time - t0) / 10 == 32, "one pixel per cycle")
    #1; `TB_CHECK(!out_valid, "empty")
    out_ready = 0;
    bw(1, 1);
    for (int i = 0; i < 32; i++) begin w[i] = 16'($urandom); bw(0, w[i]); end
    @(negedge clk); out_ready = 1;
    for (int i = 0; i < 32; i++) begin
      automatic int e = i & ~1;
      automatic real y = w[i][15:8], cb = real'(w[e][7:0]) - 128.0, cr = real'(w[e+1][7:0]) - 128.0;
      automatic int r = clipi(y + 1.402 * cr), g = clipi(y - 0.344 * cb - 0.714 * cr), b = clipi(y + 1.772 * cb);
      #1; `TB_CHECK(out_valid && near(out_data[23:16], r) && near(out_data[15:8], g) && near(out_data[7:0], b),
                    $sformatf("rgb %0d: %h vs %0d %0d %0d", i, out_data, r, g, b))
      @(negedge clk);
    end
    `TB_FINISH
  end
endmodule
