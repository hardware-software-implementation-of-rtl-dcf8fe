// Testbench for amba_wrapper with the internal SRAM: controller-style word,
// halfword and byte accesses to SRAM (read data after one wait cycle),
// accesses to the system bus with random grant and stall (the controller
// waits until the transfer completes, and bus word address = addr[24:1]),
// and download writes taking the SRAM port.
`include "tb/tb_common.svh"
module tb_amba_wrapper;
  import mova_pkg::*;
  logic clk, rst_n, cpu_nmreq, cpu_nrw, cpu_wait, dl_we, sram_en, sram_we, m_gnt;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata, sram_wdata, sram_rdata;
  logic [1:0] cpu_mas, sram_size;
  logic [15:0] dl_addr;
  logic [7:0] dl_wdata;
  logic [12:0] sram_addr;
  mst_req_t m_req;
  mst_rsp_t m_rsp;
  int checks = 0, failures = 0, bus_w = 0;
  amba_wrapper dut (.*);
  int_sram u_sram (.clk, .en(sram_en), .we(sram_we), .addr(sram_addr), .size(sram_size),
                   .wdata(sram_wdata), .rdata(sram_rdata));
  `TB_CLOCK_WATCHDOG(100000)
  logic [15:0] bus_mem [int];
  always @(negedge clk) begin m_gnt = ($urandom % 3 != 0); m_rsp.stall = ($urandom % 4 == 0); end
  always_comb m_rsp.rdata = bus_mem.exists(int'(m_req.addr)) ? bus_mem[int'(m_req.addr)] : 16'hDEAD;
  always @(posedge clk) if (m_req.req && m_gnt && !m_rsp.stall && m_req.wr) begin
    bus_mem[int'(m_req.addr)] = m_req.wdata; bus_w++;
  end
  task automatic cpu(input logic w, input logic [31:0] a, input logic [1:0] s, input logic [31:0] d,
                     output logic [31:0] q);
    @(negedge clk); cpu_nmreq = 0; cpu_nrw = w; cpu_addr = a; cpu_mas = s; cpu_wdata = d;
    #1; while (cpu_wait) begin @(negedge clk); #1; end
    q = cpu_rdata;
    @(negedge clk); cpu_nmreq = 1; cpu_nrw = 0;
  endtask
  initial begin
    logic [31:0] q;
    rst_n = 0; cpu_nmreq = 1; cpu_nrw = 0; cpu_addr = 0; cpu_mas = 2; cpu_wdata = 0;
    dl_we = 0; dl_addr = 0; dl_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin   // download
      @(negedge clk); dl_we = 1; dl_addr = 16'(i); dl_wdata = 8'(i * 3);
    end
    @(negedge clk); dl_we = 0;
    cpu(0, 32'h0, 2, 0, q); `TB_CHECK(q == 32'h09060300, "downloaded word 0")
    cpu(0, 32'hC, 2, 0, q); `TB_CHECK(q == 32'h2D2A2724, "downloaded word 3")
    cpu(1, 32'h100, 2, 32'hCAFEF00D, q);
    cpu(1, 32'h102, 1, {2{16'h1234}}, q);
    cpu(1, 32'h100, 0, {4{8'h77}}, q);
    cpu(0, 32'h100, 2, 0, q); `TB_CHECK(q == 32'h1234F077, $sformatf("sized writes %h", q))
    for (int i = 0; i < 50; i++) begin
      automatic logic [31:0] a = 32'h4000_0000 | {7'd0, 24'($urandom % 64), 1'b0};
      automatic logic [15:0] d = 16'($urandom);
      cpu(1, a, 1, {2{d}}, q);
      `TB_CHECK(bus_mem[int'(a[24:1])] == d, "bus write lands at addr[24:1]")
      cpu(0, a, 1, 0, q);
      `TB_CHECK(q[15:0] == d, "bus read back")
    end
    `TB_CHECK(bus_w == 50, "one bus write per access")
    `TB_FINISH
  end
endmodule
