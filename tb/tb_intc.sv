// Testbench for intc: each of the seven sources (three timers, external
// edge, three soft interrupts) reaches IRQ only when enabled; latched
// sources clear; status register reports raw & enable.
`include "tb/tb_common.svh"
module tb_intc;
  import mova_pkg::*;
  logic clk, rst_n, psel, ext_irq, irq;
  apb_req_t p_req;
  logic [7:0] prdata;
  logic [2:0] timer_irq;
  int checks = 0, failures = 0;
  intc dut (.*);
  `TB_CLOCK_WATCHDOG(50000)
  `TB_APB_TASKS
  initial begin
    logic [7:0] d;
    psel = 0; p_req = '0; rst_n = 0; ext_irq = 0; timer_irq = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    timer_irq = 3'b010; repeat (2) @(posedge clk);
    `TB_CHECK(irq == 0, "disabled source does not interrupt")
    pr(0, d); `TB_CHECK(d == 8'h02, "raw shows timer1")
    pw(1, 8'h02); `TB_CHECK(irq == 1, "enabled timer1 interrupts")
    pr(2, d); `TB_CHECK(d == 8'h02, "status")
    timer_irq = 0; @(posedge clk); #1; `TB_CHECK(irq == 0, "level source released")
    pw(1, 8'h7F);
    ext_irq = 1; repeat (3) @(posedge clk); ext_irq = 0; repeat (2) @(posedge clk);
    `TB_CHECK(irq == 1, "external edge latched")
    pw(4, 8'h08); `TB_CHECK(irq == 0, "external cleared")
    for (int s = 4; s < 7; s++) begin
      pw(3, 8'(1 << s)); pr(2, d);
      `TB_CHECK(d == 8'(1 << s) && irq, $sformatf("soft interrupt %0d", s - 4))
      pw(4, 8'(1 << s)); `TB_CHECK(irq == 0, "soft cleared")
    end
    pw(1, 8'h00); pw(3, 8'h10); `TB_CHECK(irq == 0, "masked soft")
    `TB_FINISH
  end
endmodule
