// bus_watcher: test and monitor access to the system bus from pins.
// Test mode ('test_mode' high): the external test pins act as the bus
// master in place of the controller, so every bus module except the
// controller can be exercised from outside.  Monitor mode (test_mode low):
// the codec runs normally and each completed bus transfer (address, data,
// direction) is registered onto the monitor pins with a strobe.
module bus_watcher
  import mova_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        test_mode,
  // controller master port (from the wrapper)
  input  mst_req_t    cpu_req,
  output mst_rsp_t    cpu_rsp,
  // external test master pins
  input  mst_req_t    tst_req,
  output mst_rsp_t    tst_rsp,
  // to the bus, as master 0
  output mst_req_t    m_req,
  input  mst_rsp_t    m_rsp,
  // observed transfer on the bus (any master)
  input  logic        bus_xfer,
  input  logic        bus_wr,
  input  logic [23:0] bus_addr,
  input  logic [15:0] bus_wdata,
  input  logic [15:0] bus_rdata,
  // monitor pins
  output logic        mon_strobe,
  output logic        mon_wr,
  output logic [23:0] mon_addr,
  output logic [15:0] mon_data
);
  always_comb begin
    m_req   = test_mode ? tst_req : cpu_req;
    cpu_rsp = m_rsp;
    tst_rsp = m_rsp;
    if (test_mode) cpu_rsp.stall = 1'b1; else tst_rsp.stall = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon_strobe <= 1'b0; mon_wr <= 1'b0; mon_addr <= '0; mon_data <= '0;
    end else begin
      mon_strobe <= bus_xfer && !test_mode;
      if (bus_xfer) begin
        mon_wr   <= bus_wr;
        mon_addr <= bus_addr;
        mon_data <= bus_wr ? bus_wdata : bus_rdata;
      end
    end
  end
endmodule
