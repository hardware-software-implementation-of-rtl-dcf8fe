// Testbench for ext_wrapper: a ROM model answers each address; every byte
// must be written to the same SRAM address, once, in order, at one byte
// per ROM_WAIT+1 cycles; download must fall after the last byte and stay
// low.
`include "tb/tb_common.svh"
module tb_ext_wrapper;
  localparam int N = 100, W = 3;
  logic clk, rst_n, rom_oe_n, download, sram_we;
  logic [15:0] rom_addr, sram_addr;
  logic [7:0] rom_data, sram_wdata;
  int checks = 0, failures = 0, nb = 0, t_end;
  ext_wrapper #(.DL_BYTES(N), .ROM_WAIT(W)) dut (.*);
  `TB_CLOCK_WATCHDOG(20000)
  assign rom_data = rom_oe_n ? 8'hZZ : 8'(rom_addr * 37 + 11);
  always @(posedge clk) if (rst_n && sram_we) begin
    `TB_CHECK(sram_addr == nb && sram_wdata == 8'(nb * 37 + 11), $sformatf("byte %0d", nb))
    nb++;
  end
  initial begin
    int t0;
    rst_n = 0;
    repeat (3) @(posedge clk); #1; `TB_CHECK(download, "download after reset")
    rst_n = 1; t0 = $time;
    @(negedge download); t_end = $time;
    `TB_CHECK((t_end - t0 + 5) / 10 == N * (W + 1), $sformatf("%0d cycles for %0d bytes", (t_end - t0 + 5) / 10, N))
    repeat (50) @(posedge clk);
    `TB_CHECK(nb == N && !download, "all bytes once, download stays low")
    `TB_FINISH
  end
endmodule
