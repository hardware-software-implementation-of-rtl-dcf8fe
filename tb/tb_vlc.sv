// Testbench for vlc: a level block is served by the testbench (as the DCTQ
// level buffer would).  The emitted bit groups are collected with random
// back-pressure and compared with the (last, run, level) events and escape
// codes worked out here from the zigzag order.  Also checks the intra DC
// code, the texture bit counter over the APB and an empty block.
`include "tb/tb_common.svh"
module tb_vlc;
  import mova_pkg::*;
  logic clk, rst_n, psel, start, start_intra, busy, done, out_valid, out_ready;
  apb_req_t p_req;
  logic [7:0] prdata;
  logic [5:0] lvl_addr;
  logic signed [11:0] lvl_data;
  bitchunk_t out_chunk;
  int checks = 0, failures = 0;
  vlc dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_APB_TASKS

  int blk [64];
  assign lvl_data = 12'(blk[lvl_addr]);
  // zigzag order written out independently
  int zz [64] = '{0,1,8,16,9,2,3,10,17,24,32,25,18,11,4,5,12,19,26,33,40,48,41,34,27,20,13,6,7,14,21,
                  28,35,42,49,56,57,50,43,36,29,22,15,23,30,37,44,51,58,59,52,45,38,31,39,46,53,60,
                  61,54,47,55,62,63};
  bitchunk_t got [$];
  bitchunk_t exp_q [$];

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (out_valid && out_ready) got.push_back(out_chunk);
  end

  task automatic model(bit intra, output int nbits);
    int run = 0, last_nz = -1, first;
    exp_q = {};
    nbits = 0;
    first = intra ? 1 : 0;
    if (intra) begin
      automatic int dc = blk[0] < 1 ? 1 : (blk[0] > 254 ? 254 : blk[0]);
      exp_q.push_back('{len: 8, bits: 32'(dc)});
      nbits += 8;
    end
    for (int n = first; n < 64; n++) if (blk[zz[n]] != 0) last_nz = n;
    for (int n = first; n < 64; n++) begin
      if (blk[zz[n]] == 0) run++;
      else begin
        automatic logic [11:0] l = 12'(blk[zz[n]]);
        automatic logic lst = (n == last_nz);
        exp_q.push_back('{len: 30, bits: {2'b00, 7'b0000011, 2'b11, lst, 6'(run), 1'b1, l, 1'b1}});
        nbits += 30;
        run = 0;
      end
    end
  endtask

  initial begin
    logic [7:0] lo, hi;
    int nb, total;
    psel = 0; p_req = '0; start = 0; start_intra = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    pw(8'd2, 0);
    total = 0;
    for (int t = 0; t < 6; t++) begin
      automatic bit intra = (t % 3 == 1);
      for (int i = 0; i < 64; i++) blk[i] = ($urandom_range(0, 5) == 0) ? $urandom_range(0, 40) - 20 : 0;
      if (t == 5) for (int i = 0; i < 64; i++) blk[i] = 0;     // empty block
      if (intra) blk[0] = $urandom_range(1, 250);
      blk[63] = (t == 2) ? 2047 : blk[63];
      model(intra, nb);
      total += nb;
      got = {};
      @(negedge clk); start = 1; start_intra = intra; @(negedge clk); start = 0;
      while (!done) @(posedge clk);
      repeat (4) @(posedge clk);
      `TB_CHECK(got.size() == exp_q.size(), $sformatf("event count %0d vs %0d", got.size(), exp_q.size()))
      for (int i = 0; i < exp_q.size() && i < got.size(); i++)
        `TB_CHECK(got[i] == exp_q[i], $sformatf("code %0d", i))
    end
    pr(8'd2, lo); pr(8'd3, hi);
    `TB_CHECK({hi, lo} == 16'(total), "texture bit count")
    // APB start path
    for (int i = 0; i < 64; i++) blk[i] = 0;
    blk[5] = -3;
    model(0, nb); got = {};
    pw(8'd0, 8'h01);
    repeat (100) @(posedge clk);
    `TB_CHECK(got.size() == 1 && got[0] == exp_q[0], "APB-started block")
    `TB_FINISH
  end
endmodule
