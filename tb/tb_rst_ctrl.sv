// Testbench for rst_ctrl: power-on reset released after two clock edges;
// controller and modules held in reset during download; software reset
// bits hold single modules; status register and sticky power-on flag.
`include "tb/tb_common.svh"
module tb_rst_ctrl;
  import mova_pkg::*;
  logic clk, npor, download, sys_rst_n, cpu_rst_n;
  logic [7:0] srst, mod_rst_n;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  rst_ctrl dut (.*);
  `TB_CLOCK_WATCHDOG(5000)
  `TB_SLAVE_TASKS
  initial begin
    logic [15:0] d;
    s_req = '0; srst = 0; download = 1; npor = 1;
    @(negedge clk); npor = 0; #2;
    `TB_CHECK(!sys_rst_n && !cpu_rst_n && mod_rst_n == 0, "asynchronous assertion")
    @(negedge clk); npor = 1;
    @(posedge clk); #1; `TB_CHECK(!sys_rst_n, "still in reset after one edge")
    @(posedge clk); #1; `TB_CHECK(sys_rst_n, "released after two edges")
    repeat (5) @(posedge clk); #1;
    `TB_CHECK(!cpu_rst_n && mod_rst_n == 0, "held during download")
    br(0, d); `TB_CHECK(d == 3, "status download + por")
    @(negedge clk); download = 0; repeat (2) @(posedge clk); #1;
    `TB_CHECK(cpu_rst_n && mod_rst_n == 8'hFF, "run after download")
    srst = 8'h10; repeat (2) @(posedge clk); #1;
    `TB_CHECK(mod_rst_n == 8'hEF, "software reset of one module")
    bw(0, 1); br(0, d); `TB_CHECK(d == 0, "power-on flag cleared")
    `TB_FINISH
  end
endmodule
