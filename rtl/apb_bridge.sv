// apb_bridge: connects the 16-bit system bus (ASB) to the 8-bit peripheral
// bus (APB).  The bridge is the only APB master.  Access to a peripheral is
// controlled by its select and by the strobe (penable) only.
//
// Timing: an access selected in cycle 0 presents address, direction and
// write data with the peripheral select (setup, ASB stalled), and in cycle 1
// raises the strobe; the ASB transfer completes in cycle 1 with the
// peripheral's read data.  Only the low byte of an ASB word is carried.
// Address bits [11:8] select the peripheral, [7:0] the register.
module apb_bridge
  import mova_pkg::*;
#(
  parameter int NP = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  slv_req_t             s_req,
  output slv_rsp_t             s_rsp,
  output apb_req_t             p_req,
  output logic [NP-1:0]        psel,
  input  logic [NP-1:0][7:0]   prdata
);
  typedef enum logic {IDLE, ACCESS} st_e;
  st_e st;
  logic [3:0] idx;
  assign idx = s_req.addr[11:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st <= IDLE;
    else if (st == IDLE && s_req.sel) st <= ACCESS;
    else st <= IDLE;
  end

  always_comb begin
    for (int i = 0; i < NP; i++) psel[i] = s_req.sel && (int'(idx) == i);
    p_req.penable = (st == ACCESS);
    p_req.pwrite  = s_req.wr;
    p_req.paddr   = s_req.addr[7:0];
    p_req.pwdata  = s_req.wdata[7:0];
    s_rsp.stall   = s_req.sel && (st == IDLE);
    s_rsp.rdata   = '0;
    for (int i = 0; i < NP; i++) if (int'(idx) == i) s_rsp.rdata = {8'h00, prdata[i]};
  end
endmodule
