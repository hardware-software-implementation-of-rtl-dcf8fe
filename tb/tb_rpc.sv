// Testbench for rpc: remap low after reset and set by a write; pause set by
// a write and released by an interrupt; sleep set by a write, kept through
// an interrupt and ended only by the wake-up pin.
`include "tb/tb_common.svh"
module tb_rpc;
  import mova_pkg::*;
  logic clk, rst_n, psel, irq, wake, remap, pause, sleep;
  apb_req_t p_req;
  logic [7:0] prdata;
  int checks = 0, failures = 0;
  rpc dut (.*);
  `TB_CLOCK_WATCHDOG(5000)
  `TB_APB_TASKS
  initial begin
    logic [7:0] d;
    psel = 0; p_req = '0; rst_n = 0; irq = 0; wake = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    `TB_CHECK(remap == 0 && pause == 0, "reset state")
    pw(0, 8'h00); `TB_CHECK(remap == 1, "remap set HIGH on write")
    pw(1, 8'h00); `TB_CHECK(pause == 1, "wait for interrupt")
    repeat (10) @(posedge clk); `TB_CHECK(pause == 1, "stays paused")
    pr(2, d); `TB_CHECK(d == 8'h03, "status")
    @(negedge clk); irq = 1; @(negedge clk); irq = 0;
    `TB_CHECK(pause == 0, "interrupt wakes the controller")
    pw(3, 8'h00); `TB_CHECK(sleep == 1 && pause == 0, "sleep entered")
    @(negedge clk); irq = 1; @(negedge clk); irq = 0;
    `TB_CHECK(sleep == 1, "an interrupt does not end sleep")
    pr(2, d); `TB_CHECK(d == 8'h05, "status in sleep")
    @(negedge clk); wake = 1; @(negedge clk); wake = 0;
    `TB_CHECK(sleep == 0, "wake-up pin ends sleep")
    rst_n = 0; @(posedge clk); #1; `TB_CHECK(remap == 0, "remap cleared on reset")
    `TB_FINISH
  end
endmodule
