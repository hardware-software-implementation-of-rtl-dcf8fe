// Testbench for int_sram: random word, halfword and byte writes (data
// replicated on lanes) and reads against a byte-array reference model;
// checks the one-cycle read latency and that narrow writes touch only
// their bytes.
`include "tb/tb_common.svh"
module tb_int_sram;
  logic clk, en, we;
  logic [12:0] addr;
  logic [1:0] size;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  int_sram #(.NWORDS(2048)) dut (.*);
  `TB_CLOCK_WATCHDOG(100000)
  logic [7:0] ref_m [8192];
  initial begin
    en = 0; we = 0; addr = 0; size = 2; wdata = 0;
    for (int i = 0; i < 8192; i += 4) begin
      automatic logic [31:0] w = $urandom;
      @(negedge clk); en = 1; we = 1; addr = 13'(i); size = 2; wdata = w;
      {ref_m[i+3], ref_m[i+2], ref_m[i+1], ref_m[i]} = w;
    end
    for (int k = 0; k < 3000; k++) begin
      automatic logic [12:0] a = 13'($urandom);
      automatic logic [1:0] s = 2'($urandom % 3);
      automatic logic [31:0] w = $urandom;
      a = s == 2 ? {a[12:2], 2'b00} : (s == 1 ? {a[12:1], 1'b0} : a);
      @(negedge clk); en = 1; addr = a; size = s;
      if ($urandom % 2) begin
        we = 1; wdata = s == 0 ? {4{w[7:0]}} : (s == 1 ? {2{w[15:0]}} : w);
        if (s == 0) ref_m[a] = w[7:0];
        else if (s == 1) {ref_m[a+1], ref_m[a]} = w[15:0];
        else {ref_m[a+3], ref_m[a+2], ref_m[a+1], ref_m[a]} = w;
      end else begin
        automatic logic [12:0] wa = {a[12:2], 2'b00};
        we = 0;
        @(negedge clk); en = 0;
        `TB_CHECK(rdata == {ref_m[wa+3], ref_m[wa+2], ref_m[wa+1], ref_m[wa]}, $sformatf("read %h", a))
      end
    end
    `TB_FINISH
  end
endmodule
