// amba_wrapper: connects the controller's memory interface (ARM7TDMI
// style: address, nRW, MAS size, nMREQ, data and a wait output) to the
// internal SRAM directly, not through the system bus, and to the system bus
// as a master for everything else.  Because SRAM accesses do not use the
// bus, the DMA controller can own the bus at the same time.
//
// Address map (this design's choice): 0x0000_0000-0x0000_1FFF internal
// SRAM; 0x4000_0000 and up: system bus, bus word address = addr[24:1].
// The system bus is 16 bits wide, so a bus access carries one halfword
// (low half of a word access).  An SRAM read waits one cycle (synchronous
// SRAM); an SRAM write completes at once; a bus access waits until the
// transfer is granted and not stalled.  While the download engine writes
// the SRAM it has the SRAM port.
module amba_wrapper
  import mova_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // controller side
  input  logic [31:0] cpu_addr,
  input  logic        cpu_nmreq,
  input  logic        cpu_nrw,       // 1 = write
  input  logic [1:0]  cpu_mas,       // 0 byte, 1 halfword, 2 word
  input  logic [31:0] cpu_wdata,
  output logic [31:0] cpu_rdata,
  output logic        cpu_wait,
  // download engine
  input  logic        dl_we,
  input  logic [15:0] dl_addr,
  input  logic [7:0]  dl_wdata,
  // internal SRAM
  output logic        sram_en,
  output logic        sram_we,
  output logic [12:0] sram_addr,
  output logic [1:0]  sram_size,
  output logic [31:0] sram_wdata,
  input  logic [31:0] sram_rdata,
  // system bus master
  output mst_req_t    m_req,
  input  logic        m_gnt,
  input  mst_rsp_t    m_rsp
);
  logic is_sram, is_bus, rd_pend;
  assign is_sram = !cpu_nmreq && cpu_addr[31:13] == '0;
  assign is_bus  = !cpu_nmreq && cpu_addr[31:30] == 2'b01;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pend <= 1'b0;
    else        rd_pend <= is_sram && !cpu_nrw && !rd_pend && !dl_we;
  end

  always_comb begin
    if (dl_we) begin
      sram_en = 1'b1; sram_we = 1'b1; sram_addr = dl_addr[12:0]; sram_size = 2'd0;
      sram_wdata = {4{dl_wdata}};
    end else begin
      sram_en = is_sram; sram_we = cpu_nrw; sram_addr = cpu_addr[12:0]; sram_size = cpu_mas;
      sram_wdata = cpu_wdata;
    end
    m_req.req   = is_bus;
    m_req.wr    = cpu_nrw;
    m_req.addr  = cpu_addr[24:1];
    m_req.wdata = cpu_wdata[15:0];
    cpu_wait    = 1'b0;
    cpu_rdata   = sram_rdata;
    if (is_sram && (dl_we || (!cpu_nrw && !rd_pend))) cpu_wait = 1'b1;
    if (is_bus) begin
      cpu_wait  = !(m_gnt && !m_rsp.stall);
      cpu_rdata = {16'd0, m_rsp.rdata};
    end
  end
endmodule
