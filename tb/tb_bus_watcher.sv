// Testbench for bus_watcher: in test mode the test pins drive the bus and
// the controller is stalled; in normal mode the reverse.  Each observed
// transfer appears on the monitor pins one cycle later, with the write or
// read data.
`include "tb/tb_common.svh"
module tb_bus_watcher;
  import mova_pkg::*;
  logic clk, rst_n, test_mode, bus_xfer, bus_wr, mon_strobe, mon_wr;
  mst_req_t cpu_req, tst_req, m_req;
  mst_rsp_t cpu_rsp, tst_rsp, m_rsp;
  logic [23:0] bus_addr, mon_addr;
  logic [15:0] bus_wdata, bus_rdata, mon_data;
  int checks = 0, failures = 0;
  bus_watcher dut (.*);
  `TB_CLOCK_WATCHDOG(20000)
  initial begin
    rst_n = 0; test_mode = 0; bus_xfer = 0; bus_wr = 0; bus_addr = 0; bus_wdata = 0; bus_rdata = 0;
    cpu_req = '0; tst_req = '0; m_rsp = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      test_mode = (i >= 100);
      cpu_req = '{1'b1, 1'($urandom), 24'($urandom), 16'($urandom)};
      tst_req = '{1'b1, 1'($urandom), 24'($urandom), 16'($urandom)};
      m_rsp = '{16'($urandom), 1'($urandom)};
      bus_xfer = 1'($urandom); bus_wr = 1'($urandom); bus_addr = 24'($urandom);
      bus_wdata = 16'($urandom); bus_rdata = 16'($urandom);
      #1;
      `TB_CHECK(m_req == (test_mode ? tst_req : cpu_req), "bus master mux")
      `TB_CHECK(test_mode ? (cpu_rsp.stall && tst_rsp == m_rsp) : (tst_rsp.stall && cpu_rsp == m_rsp),
                "response routing")
      begin
        automatic logic x = bus_xfer, w = bus_wr, tm = test_mode;
        automatic logic [23:0] a = bus_addr;
        automatic logic [15:0] d = bus_wr ? bus_wdata : bus_rdata;
        @(posedge clk); #1;
        `TB_CHECK(mon_strobe == (x && !tm), "monitor strobe")
        if (x) `TB_CHECK(mon_wr == w && mon_addr == a && mon_data == d, "monitor contents")
      end
    end
    `TB_FINISH
  end
endmodule
