// Testbench for apb_bridge with three register-file peripherals: checks
// the setup/strobe sequence (one stall cycle per access), that only the
// addressed peripheral is selected, and write/read data.
`include "tb/tb_common.svh"
module tb_apb_bridge;
  import mova_pkg::*;
  logic clk, rst_n;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  apb_req_t p_req;
  logic [2:0] psel;
  logic [2:0][7:0] prdata;
  logic [7:0] regs [3][4];
  int checks = 0, failures = 0, stalls;
  apb_bridge #(.NP(3)) dut (.*);
  `TB_CLOCK_WATCHDOG(20000)
  always_ff @(posedge clk)
    for (int p = 0; p < 3; p++) if (psel[p] && p_req.penable && p_req.pwrite) regs[p][p_req.paddr[1:0]] <= p_req.pwdata;
  always_comb for (int p = 0; p < 3; p++) prdata[p] = regs[p][p_req.paddr[1:0]];
  always @(posedge clk) `TB_CHECK($countones(psel) <= 1, "one select at most")
  task automatic acc(bit w, int p, int r, logic [7:0] d, output logic [7:0] q);
    @(negedge clk); s_req = '{sel: 1, wr: w, addr: {4'(p), 6'd0, 2'(r)}, wdata: 16'(d)};
    stalls = 0;
    #1; while (s_rsp.stall) begin stalls++; @(negedge clk); #1; end
    `TB_CHECK(psel[p] && p_req.penable, "strobe in the completing cycle")
    q = s_rsp.rdata[7:0];
    @(negedge clk); s_req.sel = 0;
    `TB_CHECK(stalls == 1, "one wait cycle per access")
  endtask
  initial begin
    logic [7:0] q, m [3][4];
    s_req = '0; rst_n = 0;
    for (int p = 0; p < 3; p++) for (int r = 0; r < 4; r++) begin regs[p][r] = 0; m[p][r] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      automatic int p = $urandom_range(0, 2), r = $urandom_range(0, 3);
      automatic logic [7:0] d = 8'($urandom);
      if ($urandom_range(0, 1)) begin acc(1, p, r, d, q); m[p][r] = d; end
      else begin acc(0, p, r, 0, q); `TB_CHECK(q == m[p][r], "read data") end
    end
    `TB_FINISH
  end
endmodule
