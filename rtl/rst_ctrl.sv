// rst_ctrl: reset controller.  The asynchronous power-on reset pin
// (nPOReset) is released synchronously through a two-flop synchronizer to
// give the system reset.  While the program is downloaded from the ROM the
// chip is in its download state: the controller (and every module except
// the download engine) is held in reset.  A module is also held in reset
// while its software reset bit is set.  The status register tells software
// what the current reset state is.
//
// Bus map: 0x000 STATUS {download[1], por_seen[0]}; write 1 to bit 0 clears
// the sticky power-on flag.
module rst_ctrl
  import mova_pkg::*;
#(
  parameter int NRST = 8
) (
  input  logic            clk,
  input  logic            npor,
  input  slv_req_t        s_req,
  output slv_rsp_t        s_rsp,
  input  logic            download,
  input  logic [NRST-1:0] srst,
  output logic            sys_rst_n,     // download engine, bus fabric
  output logic            cpu_rst_n,     // controller and modules
  output logic [NRST-1:0] mod_rst_n
);
  logic [1:0] sync;
  logic       por_seen;

  always_ff @(posedge clk or negedge npor) begin
    if (!npor) sync <= '0;
    else       sync <= {sync[0], 1'b1};
  end
  assign sys_rst_n = sync[1];

  always_ff @(posedge clk or negedge sys_rst_n) begin
    if (!sys_rst_n) begin
      por_seen  <= 1'b1;
      cpu_rst_n <= 1'b0;
      mod_rst_n <= '0;
    end else begin
      cpu_rst_n <= !download;
      mod_rst_n <= {NRST{!download}} & ~srst;
      if (s_req.sel && s_req.wr && s_req.addr == 12'h000 && s_req.wdata[0]) por_seen <= 1'b0;
    end
  end

  assign s_rsp.stall = 1'b0;
  assign s_rsp.rdata = (s_req.addr == 12'h000) ? {14'd0, download, por_seen} : '0;
endmodule
