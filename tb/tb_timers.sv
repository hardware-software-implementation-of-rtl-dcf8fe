// Testbench for timers: periodic time-out interval (LOAD x (PRESCALE+1)
// cycles), one-shot stop, masked and unmasked interrupts, status clear.
`include "tb/tb_common.svh"
module tb_timers;
  import mova_pkg::*;
  logic clk, rst_n, psel;
  apb_req_t p_req;
  logic [7:0] prdata;
  logic [2:0] irq;
  int checks = 0, failures = 0;
  timers #(.NTIMER(3)) dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_APB_TASKS
  initial begin
    logic [7:0] d;
    int t0, t1;
    psel = 0; p_req = '0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // timer 1: load 50, prescale 3 -> 200 cycles, periodic, irq enabled
    pw(8 + 0, 50); pw(8 + 1, 0); pw(8 + 2, 3); pw(8 + 3, 8'b111);
    @(posedge irq[1]); t0 = $time;
    pw(8 + 4, 1);
    `TB_CHECK(irq[1] == 1'b0, "status cleared")
    @(posedge irq[1]); t1 = $time;
    `TB_CHECK((t1 - t0) / 10 == 200, $sformatf("period %0d cycles (200)", (t1 - t0) / 10))
    `TB_CHECK(irq[0] == 0 && irq[2] == 0, "other timers quiet")
    // timer 2: one-shot, masked interrupt
    pw(16 + 0, 10); pw(16 + 2, 0); pw(16 + 3, 8'b001);
    repeat (30) @(posedge clk);
    pr(16 + 4, d); `TB_CHECK(d[0] == 1'b1, "one-shot timed out")
    `TB_CHECK(irq[2] == 1'b0, "masked interrupt stays low")
    pr(16 + 3, d); `TB_CHECK(d[0] == 1'b0, "one-shot stopped")
    pr(16 + 5, d); `TB_CHECK(d == 0, "one-shot value 0")
    // timer 0 count value readback
    pw(0, 8'h34); pw(1, 8'h12); pw(2, 0); pw(3, 8'b011);
    pr(6, d); `TB_CHECK(d == 8'h12, "value high byte counting")
    `TB_FINISH
  end
endmodule
