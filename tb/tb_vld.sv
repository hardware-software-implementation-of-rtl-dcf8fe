// Testbench for vld: blocks are coded here into escape-form events
// (and an 8-bit intra DC), packed into bytes, written into the VLD buffer,
// and the decoded block that the VLD writes out through its DCTQ port is
// compared with the original.  Also checks a not-coded block, the consumed
// bit count and the error flag on a corrupt code.
`include "tb/tb_common.svh"
module tb_vld;
  import mova_pkg::*;
  logic clk, rst_n, start, busy, done, o_we;
  logic [5:0] o_addr;
  logic signed [11:0] o_data;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  vld dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_SLAVE_TASKS

  int zz [64] = '{0,1,8,16,9,2,3,10,17,24,32,25,18,11,4,5,12,19,26,33,40,48,41,34,27,20,13,6,7,14,21,
                  28,35,42,49,56,57,50,43,36,29,22,15,23,30,37,44,51,58,59,52,45,38,31,39,46,53,60,
                  61,54,47,55,62,63};
  int blk [64], outb [64];
  bit bits [$];
  logic [15:0] v;

  always @(posedge clk) if (o_we) outb[o_addr] <= int'(o_data);

  task automatic put(logic [31:0] b, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(b[i]);
  endtask
  task automatic encode(bit intra);
    int run = 0, last_nz = -1, first = intra ? 1 : 0;
    if (intra) put(32'(blk[0]), 8);
    for (int n = first; n < 64; n++) if (blk[zz[n]] != 0) last_nz = n;
    for (int n = first; n < 64; n++) begin
      if (blk[zz[n]] == 0) run++;
      else begin
        put({7'b0000011, 2'b11, (n == last_nz) ? 1'b1 : 1'b0, 6'(run), 1'b1, 12'(blk[zz[n]]), 1'b1}, 30);
        run = 0;
      end
    end
  endtask
  task automatic send();
    while (bits.size() % 8 != 0) bits.push_back(1'b0);
    while (bits.size() > 0) begin
      automatic logic [7:0] b;
      for (int i = 7; i >= 0; i--) b[i] = bits.pop_front();
      bw(12'h000, 16'(b));
    end
  endtask
  task automatic run(bit coded, bit intra);
    bw(12'h100, {14'd0, coded, intra});
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    @(posedge clk);
  endtask

  initial begin
    s_req = '0; start = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      automatic bit intra = (t % 2 == 1);
      automatic int ok = 1, bitsn;
      for (int i = 0; i < 64; i++) blk[i] = ($urandom_range(0, 4) == 0) ? $urandom_range(0, 200) - 100 : 0;
      if (intra) blk[0] = $urandom_range(1, 254);
      if (!intra && blk[zz[63]] == 0) blk[zz[63]] = -7;   // a coded block has a last event
      bits = {};
      encode(intra);
      bitsn = bits.size();
      bw(12'h102, 0);
      send();
      run(1, intra);
      for (int i = 0; i < 64; i++) if (outb[i] != blk[i]) ok = 0;
      `TB_CHECK(ok == 1, "decoded block matches")
      br(12'h101, v); `TB_CHECK(v[1] == 1'b0, "no error")
      br(12'h102, v); `TB_CHECK(int'(v) == bitsn, "bits consumed")
      // drop padding left in the reader: reset between blocks (byte aligned test)
      rst_n = 0; @(posedge clk); rst_n = 1;
    end
    // not-coded block: zeros without reading the stream
    for (int i = 0; i < 64; i++) outb[i] = 99;
    run(0, 0);
    begin
      automatic int ok = 1;
      for (int i = 0; i < 64; i++) if (outb[i] != 0) ok = 0;
      `TB_CHECK(ok == 1, "not-coded block is zero")
    end
    // corrupt code
    bits = {};
    put(32'h2AAAAAAA, 30);
    send();
    run(1, 0);
    br(12'h101, v); `TB_CHECK(v[1] == 1'b1, "error flag on a corrupt code")
    `TB_FINISH
  end
endmodule
