// mova_pkg: types and constants shared by the MoVa codec modules.
//
// The system bus (ASB) is narrowed to 16 data bits and the peripheral bus
// (APB) to 8 data bits, as the codec architecture specifies.  The bus
// structs below are a simplified single-cycle form of those buses chosen by
// this design: a master holds its request until a cycle in which it is
// granted and the addressed slave does not stall; in that cycle a write is
// taken and read data is valid.  Addresses on the ASB are 16-bit word
// addresses, 24 bits wide.
package mova_pkg;

  localparam int ASB_AW = 24;   // word address width of the ASB
  localparam int ASB_DW = 16;   // ASB data width (16 bits, per the architecture)
  localparam int APB_DW = 8;    // APB data width (8 bits, per the architecture)
  localparam int SLV_AW = 12;   // local word address inside one ASB slave

  // ASB master request and response
  typedef struct packed {
    logic              req;
    logic              wr;
    logic [ASB_AW-1:0] addr;
    logic [ASB_DW-1:0] wdata;
  } mst_req_t;

  typedef struct packed {
    logic [ASB_DW-1:0] rdata;
    logic              stall;   // transfer not finished this cycle
  } mst_rsp_t;

  // ASB slave request (after address decoding) and response
  typedef struct packed {
    logic              sel;
    logic              wr;
    logic [SLV_AW-1:0] addr;
    logic [ASB_DW-1:0] wdata;
  } slv_req_t;

  typedef struct packed {
    logic [ASB_DW-1:0] rdata;
    logic              stall;
  } slv_rsp_t;

  // APB request shared by all APB slaves; each slave has its own select
  typedef struct packed {
    logic              penable;  // strobe
    logic              pwrite;
    logic [7:0]        paddr;
    logic [APB_DW-1:0] pwdata;
  } apb_req_t;

  // a group of stream bits, right-aligned, most significant bit sent first
  typedef struct packed {
    logic [5:0]  len;
    logic [31:0] bits;
  } bitchunk_t;

  // ASB slave numbers used by the address decoder
  typedef enum logic [3:0] {
    S_EMI = 4'd0, S_CMD = 4'd1, S_MEC = 4'd2, S_MEFMC = 4'd3, S_DCTQ = 4'd4,
    S_VLD = 4'd5, S_DB = 4'd6, S_REC = 4'd7, S_ISC = 4'd8, S_VIM = 4'd9,
    S_VOM = 4'd10, S_DMAC = 4'd11, S_APB = 4'd12, S_RSTC = 4'd13, S_MVMVD = 4'd14
  } slave_e;
  localparam int NSLV = 15;

  // APB peripheral numbers (address bits [11:8] of the bridge window)
  typedef enum logic [3:0] {
    P_RPC = 4'd0, P_INTC = 4'd1, P_TIMER = 4'd2, P_HIF = 4'd3, P_VLC = 4'd4, P_SP = 4'd5
  } apb_slave_e;
  localparam int NAPB = 6;

  // modules driven by the command registers
  typedef enum logic [2:0] {
    M_MEC = 3'd0, M_MEFMC = 3'd1, M_DCTQ = 3'd2, M_VLC = 3'd3,
    M_VLD = 3'd4, M_REC = 3'd5, M_DB = 3'd6, M_MVMVD = 3'd7
  } module_e;
  localparam int NMOD = 8;

  // zigzag scan: position n of the scan -> raster index (row*8+col)
  typedef logic [5:0] zz_t [64];
  function automatic zz_t zigzag_table();
    zz_t t;
    int r, c, n;
    r = 0; c = 0;
    for (n = 0; n < 64; n++) begin
      t[n] = 6'(r * 8 + c);
      if (((r + c) % 2) == 0) begin      // moving up-right
        if (c == 7)      r = r + 1;
        else if (r == 0) c = c + 1;
        else begin r = r - 1; c = c + 1; end
      end else begin                       // moving down-left
        if (r == 7)      c = c + 1;
        else if (c == 0) r = r + 1;
        else begin r = r + 1; c = c - 1; end
      end
    end
    return t;
  endfunction

  // 8-bit saturation of a signed value
  function automatic logic [7:0] clip8(input logic signed [15:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

endpackage
