// Testbench for sp: header bit groups written over the APB and random
// texture bit groups on the VLC port are packed; the output bytes (drained
// with random back-pressure) are compared with the bit sequence built here.
// Also checks the stuffing pattern and the bit counter.
`include "tb/tb_common.svh"
module tb_sp;
  import mova_pkg::*;
  logic clk, rst_n, psel, in_valid, in_ready, out_valid, out_ready;
  apb_req_t p_req;
  logic [7:0] prdata, out_data;
  bitchunk_t in_chunk;
  int checks = 0, failures = 0;
  sp dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_APB_TASKS

  bit exp_bits [$];
  logic [7:0] got [$];
  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 2) != 0);
    if (out_valid && out_ready) got.push_back(out_data);
  end
  task automatic hdr(logic [31:0] b, int n);
    pw(0, b[7:0]); pw(1, b[15:8]); pw(2, b[23:16]); pw(3, b[31:24]); pw(4, 8'(n));
    for (int i = n - 1; i >= 0; i--) exp_bits.push_back(b[i]);
  endtask
  task automatic tex(logic [31:0] b, int n);
    @(negedge clk); in_valid = 1; in_chunk = '{len: 6'(n), bits: b & (32'hFFFFFFFF >> (32 - n))};
    @(posedge clk); while (!in_ready) @(posedge clk);
    @(negedge clk); in_valid = 0;
    for (int i = n - 1; i >= 0; i--) exp_bits.push_back(b[i]);
  endtask

  initial begin
    logic [7:0] lo, hi;
    int total;
    psel = 0; p_req = '0; in_valid = 0; in_chunk = '0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); got = {};
    hdr(32'h000001B6, 32);                   // a start code and VOP code
    hdr(32'h5, 3);
    for (int i = 0; i < 40; i++) tex($urandom(), $urandom_range(1, 30));
    hdr(32'h1F, 5);
    pw(5, 0);                                // stuffing
    // expected stuffing: '0' then '1's up to the byte boundary (8 bits when aligned)
    begin
      automatic int l = 8 - (exp_bits.size() % 8);
      exp_bits.push_back(1'b0);
      for (int i = 1; i < l; i++) exp_bits.push_back(1'b1);
    end
    total = exp_bits.size();
    repeat (200) @(posedge clk);
    `TB_CHECK(got.size() * 8 == total, $sformatf("byte count %0d for %0d bits", got.size(), total))
    for (int i = 0; i < got.size(); i++) begin
      automatic logic [7:0] e;
      for (int b = 0; b < 8; b++) e[7-b] = exp_bits[i*8+b];
      `TB_CHECK(got[i] == e, $sformatf("byte %0d got %h exp %h", i, got[i], e))
    end
    pr(6, lo); pr(7, hi);
    `TB_CHECK(int'({hi, lo}) == total, "bit counter")
    pr(5, lo); `TB_CHECK(lo == 8'h01, "idle and empty")
    `TB_FINISH
  end
endmodule
