// Testbench for rec: the testbench serves the prediction and residual read
// ports; each of the four luminance blocks is reconstructed and compared
// with prediction + residual clipped to 0..255; an intra block ignores the
// prediction; a skipped macroblock copies the previous macroblock.
`include "tb/tb_common.svh"
module tb_rec;
  import mova_pkg::*;
  logic clk, rst_n, start, busy, done;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  logic [7:0] pred_addr, pred_data, db_addr, db_data;
  logic [5:0] res_addr;
  logic signed [11:0] res_data;
  int checks = 0, failures = 0;
  rec dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_SLAVE_TASKS

  int pred [256], res [4][64], prev [256];
  int blk;
  assign pred_data = 8'(pred[pred_addr]);
  assign res_data  = 12'(res[blk][res_addr]);
  logic [15:0] v;
  task automatic run();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
  endtask
  function automatic int clip(int x); return x < 0 ? 0 : (x > 255 ? 255 : x); endfunction

  initial begin
    s_req = '0; start = 0; rst_n = 0; db_addr = 0; blk = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) pred[i] = $urandom_range(0, 255);
    for (int b = 0; b < 4; b++) for (int i = 0; i < 64; i++) res[b][i] = $urandom_range(0, 600) - 300;
    bw(12'h200, 16'b000);
    for (int b = 0; b < 4; b++) begin
      blk = b; bw(12'h201, 16'(b)); run();
    end
    for (int i = 0; i < 256; i++) begin
      automatic int b = (i / 128) * 2 + ((i % 16) / 8);
      automatic int k = ((i / 16) % 8) * 8 + (i % 8);
      br(12'(i), v);
      `TB_CHECK(int'(v) == clip(pred[i] + res[b][k]), $sformatf("inter pixel %0d", i))
    end
    // intra block 3
    for (int i = 0; i < 64; i++) res[3][i] = $urandom_range(0, 300);
    blk = 3; bw(12'h200, 16'b010); bw(12'h201, 16'd3); run();
    for (int k = 0; k < 64; k += 5) begin
      @(negedge clk); db_addr = 8'(128 + (k / 8) * 16 + 8 + k % 8); #1;
      `TB_CHECK(int'(db_data) == clip(res[3][k]), "intra pixel via DB port")
    end
    // skipped MB
    for (int i = 0; i < 256; i++) begin prev[i] = $urandom_range(0, 255); bw(12'(256 + i), 16'(prev[i])); end
    bw(12'h200, 16'b100); run();
    for (int i = 0; i < 256; i += 3) begin br(12'(i), v); `TB_CHECK(int'(v) == prev[i], "skip copy") end
    `TB_FINISH
  end
endmodule
