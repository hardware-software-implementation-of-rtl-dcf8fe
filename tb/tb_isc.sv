// Testbench for isc: a bit-stream is pushed byte by byte at random gaps,
// read back over the bus in order; the buffer is overfilled to check that
// the overflow flag sets, drops the extra bytes and clears on write.
`include "tb/tb_common.svh"
module tb_isc;
  import mova_pkg::*;
  logic clk, rst_n, strm_valid, overflow;
  logic [7:0] strm_data;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  isc #(.BUF_DEPTH(256)) dut (.*);
  `TB_CLOCK_WATCHDOG(20000)
  `TB_SLAVE_TASKS
  byte unsigned q[$];
  task automatic put(input logic [7:0] b);
    @(negedge clk); strm_valid = 1; strm_data = b; @(negedge clk); strm_valid = 0;
  endtask
  initial begin
    logic [15:0] d;
    s_req = '0; strm_valid = 0; strm_data = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      automatic logic [7:0] b = 8'($urandom);
      put(b); q.push_back(b);
    end
    br(1, d); `TB_CHECK(d == 100, $sformatf("level %0d", d))
    for (int i = 0; i < 100; i++) begin
      br(0, d); `TB_CHECK(d[7:0] == q.pop_front(), $sformatf("byte %0d", i))
    end
    `TB_CHECK(overflow == 0, "no overflow yet")
    for (int i = 0; i < 260; i++) put(8'(i));
    `TB_CHECK(overflow == 1, "overflow flagged")
    br(1, d); `TB_CHECK(d == 16'h8000 | 256, "full and overflow in status")
    br(0, d); `TB_CHECK(d == 0, "oldest byte kept")
    bw(1, 0); `TB_CHECK(overflow == 0, "overflow cleared")
    `TB_FINISH
  end
endmodule
