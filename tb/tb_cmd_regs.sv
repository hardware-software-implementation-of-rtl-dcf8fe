// Testbench for cmd_regs: start pulses last one cycle and are blocked by a
// cleared clock enable or a set software reset; done bits are sticky and
// cleared by write-1 or by a new start; busy and start_intra read back.
`include "tb/tb_common.svh"
module tb_cmd_regs;
  import mova_pkg::*;
  logic clk, rst_n, start_intra;
  logic [NMOD-1:0] start, clken, srst, mod_done, mod_busy;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0, pulses [NMOD];
  cmd_regs dut (.*);
  `TB_CLOCK_WATCHDOG(20000)
  `TB_SLAVE_TASKS
  always @(posedge clk) for (int m = 0; m < NMOD; m++) if (start[m]) pulses[m]++;
  initial begin
    logic [15:0] d;
    s_req = '0; mod_done = 0; mod_busy = 0; rst_n = 0;
    for (int m = 0; m < NMOD; m++) pulses[m] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    `TB_CHECK(clken == '1 && srst == 0 && start == 0, "reset values")
    for (int m = 0; m < NMOD; m++) begin
      bw(0, 16'(1 << m)); @(posedge clk); #1;
      `TB_CHECK(pulses[m] == 1, $sformatf("one start pulse for module %0d", m))
    end
    bw(1, 16'hFE); bw(0, 16'h01); @(posedge clk); #1; `TB_CHECK(pulses[0] == 1, "gated module ignores start")
    bw(1, 16'hFF); bw(2, 16'h02); bw(0, 16'h02); @(posedge clk); #1; `TB_CHECK(pulses[1] == 1, "module in reset ignores start")
    `TB_CHECK(srst == 8'h02, "software reset bit")
    bw(2, 0);
    @(negedge clk); mod_done = 8'h24; @(negedge clk); mod_done = 0;
    br(3, d); `TB_CHECK(d == 16'h24, "done sticky")
    bw(3, 16'h04); br(3, d); `TB_CHECK(d == 16'h20, "done write-1 clear")
    bw(0, 16'h20); br(3, d); `TB_CHECK(d == 0, "start clears done")
    mod_busy = 8'h81; br(4, d); `TB_CHECK(d == 16'h81, "busy")
    bw(5, 1); `TB_CHECK(start_intra == 1, "start_intra")
    `TB_FINISH
  end
endmodule
