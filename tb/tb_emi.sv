// Testbench for emi with the behavioural SDRAM model: waits for the power-up
// sequence, writes and reads back random words across rows and banks,
// checks page-hit and page-miss latencies (hit write 3 cycles, hit read
// 4+CL cycles, a miss adds ACTIVE/PRECHARGE time), counts row opens, and
// checks that refresh keeps running and the model sees no protocol errors.
`include "tb/tb_common.svh"
module tb_emi;
  import mova_pkg::*;
  localparam int INIT = 60, REFI = 150, CLAT = 2;
  logic clk, rst_n, sel, wr;
  logic [19:0] addr;
  logic [15:0] wdata, sd_dq_out, sd_dq_in, n_act;
  slv_rsp_t s_rsp;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_ba, sd_dq_oe;
  logic [10:0] sd_a;
  logic [1:0] sd_dqm;
  int checks = 0, failures = 0;
  emi #(.INIT_CYC(INIT), .REF_INT(REFI), .CL(CLAT)) dut (.*);
  sdram_model #(.CL(CLAT), .INIT_CYC(INIT), .MAX_REF_GAP(REFI + 40)) mem (
    .clk, .cke(sd_cke), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dqm(sd_dqm), .dq_in(sd_dq_out), .dq_oe(sd_dq_oe), .dq_out(sd_dq_in));
  `TB_CLOCK_WATCHDOG(200000)

  task automatic acc(input logic w, input logic [19:0] a, input logic [15:0] d,
                     output logic [15:0] q, output int cyc);
    @(negedge clk); sel = 1; wr = w; addr = a; wdata = d; cyc = 1;
    #1; while (s_rsp.stall) begin @(negedge clk); cyc++; #1; end
    q = s_rsp.rdata;
    @(negedge clk); sel = 0; wr = 0;
  endtask

  logic [15:0] ref_mem [int];
  initial begin
    logic [15:0] q;
    int c, a0;
    sel = 0; wr = 0; addr = 0; wdata = 0; rst_n = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // first access waits for the initialisation
    acc(1, 20'h00105, 16'hBEEF, q, c);
    `TB_CHECK(c > INIT, "first access after power-up sequence")
    a0 = n_act;
    acc(1, 20'h00106, 16'h1234, q, c);
    `TB_CHECK(c == 3 || mem.n_ref > 0, $sformatf("page-hit write %0d cycles", c))
    acc(0, 20'h00105, 0, q, c);
    `TB_CHECK(q == 16'hBEEF, "read back")
    `TB_CHECK(c == 4 + CLAT, $sformatf("page-hit read %0d cycles", c))
    `TB_CHECK(n_act == a0, "no ACTIVE on page hits")
    acc(0, 20'h00206, 0, q, c);   // same bank, other row
    `TB_CHECK(n_act == a0 + 1 && c > 4 + CLAT, $sformatf("page miss %0d cycles", c))
    acc(0, 20'h80206, 0, q, c);   // other bank
    `TB_CHECK(n_act == a0 + 2, "other bank opens its row")
    ref_mem[20'h00105] = 16'hBEEF; ref_mem[20'h00106] = 16'h1234;
    // random traffic, including refresh intervals
    for (int i = 0; i < 400; i++) begin
      automatic logic [19:0] a = {1'($urandom), 3'($urandom), 8'h00, 8'($urandom)};
      automatic logic [15:0] d = 16'($urandom);
      if (($urandom % 2) || !ref_mem.exists(a)) begin
        acc(1, a, d, q, c); ref_mem[a] = d;
      end else begin
        acc(0, a, 0, q, c);
        `TB_CHECK(q == ref_mem[a], $sformatf("random read %h", a))
      end
    end
    foreach (ref_mem[k]) begin
      acc(0, 20'(k), 0, q, c);
      `TB_CHECK(q == ref_mem[k], $sformatf("final read %h", k))
    end
    `TB_CHECK(mem.n_ref > 10, $sformatf("refreshes %0d", mem.n_ref))
    `TB_CHECK(mem.errors == 0, "SDRAM protocol clean")
    `TB_CHECK(mem.n_act == n_act + 0, "row-open counter matches the memory")
    `TB_FINISH
  end
endmodule
