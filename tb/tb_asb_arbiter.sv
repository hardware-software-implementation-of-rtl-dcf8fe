// Testbench for asb_arbiter: default master during and after reset, DMAC
// priority on a free bus, hold while the owner keeps requesting, parking on
// the default master; compared with a reference model on random requests.
`include "tb/tb_common.svh"
module tb_asb_arbiter;
  logic clk, rst_n;
  logic [1:0] req, grant, m;
  int checks = 0, failures = 0;
  asb_arbiter #(.NM(2)) dut (.*);
  `TB_CLOCK_WATCHDOG(5000)
  initial begin
    req = 2'b11; rst_n = 0;
    repeat (3) begin @(posedge clk); #1; `TB_CHECK(grant == 2'b01, "default master in reset") end
    @(negedge clk); rst_n = 1; m = 2'b01;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk); req = 2'($urandom_range(0, 3));
      // model of the next grant
      if (!(|(m & req))) m = req[1] ? 2'b10 : 2'b01;
      @(posedge clk); #1;
      `TB_CHECK(grant == m, "grant matches model")
    end
    `TB_FINISH
  end
endmodule
