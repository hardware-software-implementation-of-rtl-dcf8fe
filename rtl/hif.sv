// hif: host interface, for byte transfers in both directions between the
// controller and an external host processor.  Two mailboxes: host-to-chip
// (H2C) and chip-to-host (C2H), each one byte with a full flag.  The host
// reaches them through a parallel port, Intel style (nCS, nRD, nWR) or
// Motorola style (nCS, R/nW, E) selected by 'moto', or through an I2C
// slave.  All host pins are synchronised to the system clock (two flops)
// and strobes are acted on at their edge.  A new H2C byte raises 'irq'.
//
// Parallel port registers (host address): 0 data (write: H2C, read: C2H,
//   which empties C2H), 1 status {c2h_full[1], h2c_full[0]}.
// I2C: 7-bit address I2C_ADDR; a write transaction puts its bytes into
//   H2C; a read transaction returns C2H (0 when empty) and empties it.
// APB registers: 0 read H2C (empties it), 1 write C2H, 2 status
//   {c2h_full[1], h2c_full[0]}.
// The mailbox scheme, register layout and I2C address are this design's
// choices; the document names the parallel and I2C interfaces.
module hif
  import mova_pkg::*;
#(
  parameter logic [6:0] I2C_ADDR = 7'h3A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  apb_req_t   p_req,
  output logic [7:0] prdata,
  output logic       irq,
  // parallel port
  input  logic       moto,
  input  logic       h_cs_n,
  input  logic       h_rd_n,       // Motorola: R/nW
  input  logic       h_wr_n,       // Motorola: E
  input  logic       h_a,
  input  logic [7:0] h_din,
  output logic [7:0] h_dout,
  output logic       h_doe,
  // I2C
  input  logic       scl,
  input  logic       sda_in,
  output logic       sda_oe         // 1 pulls SDA low
);
  logic [7:0] h2c, c2h;
  logic       h2c_f, c2h_f;

  // ---- parallel port ----
  logic [2:0] cs_s, rd_s, wr_s;
  logic       p_rd, p_wr, rd_lvl, wr_lvl, rd_lvl_d, wr_lvl_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin cs_s <= '1; rd_s <= '1; wr_s <= '1; rd_lvl_d <= 1'b0; wr_lvl_d <= 1'b0; end
    else begin
      cs_s <= {cs_s[1:0], h_cs_n}; rd_s <= {rd_s[1:0], h_rd_n}; wr_s <= {wr_s[1:0], h_wr_n};
      rd_lvl_d <= rd_lvl; wr_lvl_d <= wr_lvl;
    end
  end
  // access levels: Intel: strobe low; Motorola: E high with R/nW
  assign rd_lvl = !cs_s[1] && (moto ? (wr_s[1] && rd_s[1])  : !rd_s[1]);
  assign wr_lvl = !cs_s[1] && (moto ? (wr_s[1] && !rd_s[1]) : !wr_s[1]);
  assign p_wr   = wr_lvl && !wr_lvl_d;            // act at the start of a write
  assign p_rd   = !rd_lvl && rd_lvl_d;            // empty C2H at the end of a read
  assign h_doe  = rd_lvl;
  assign h_dout = h_a ? {6'd0, c2h_f, h2c_f} : c2h;

  // ---- I2C slave ----
  logic [2:0] scl_s, sda_s;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin scl_s <= '1; sda_s <= '1; end
    else begin scl_s <= {scl_s[1:0], scl}; sda_s <= {sda_s[1:0], sda_in}; end
  end
  logic scl_r, scl_f, i_start, i_stop;
  assign scl_r   = scl_s[1] && !scl_s[2];
  assign scl_f   = !scl_s[1] && scl_s[2];
  assign i_start = scl_s[1] && !sda_s[1] && sda_s[2];
  assign i_stop  = scl_s[1] && sda_s[1] && !sda_s[2];

  typedef enum logic [2:0] {I_IDLE, I_ADDR, I_AACK, I_WDATA, I_WACK, I_RDATA, I_RACK} ist_e;
  ist_e ist;
  logic [7:0] sh;
  logic [3:0] bcnt;
  logic       i_wr, i_rd_take, i_rnw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist <= I_IDLE; sh <= '0; bcnt <= '0; sda_oe <= 1'b0; i_wr <= 1'b0; i_rd_take <= 1'b0;
      i_rnw <= 1'b0;
    end else begin
      i_wr <= 1'b0;
      i_rd_take <= 1'b0;
      if (i_start) begin ist <= I_ADDR; bcnt <= '0; sda_oe <= 1'b0; end
      else if (i_stop) begin ist <= I_IDLE; sda_oe <= 1'b0; end
      else case (ist)
        I_ADDR: if (scl_r) begin
          sh <= {sh[6:0], sda_s[1]}; bcnt <= bcnt + 1'b1;
        end else if (scl_f && bcnt == 4'd8) begin
          if (sh[7:1] == I2C_ADDR) begin sda_oe <= 1'b1; i_rnw <= sh[0]; ist <= I_AACK; end
          else ist <= I_IDLE;
        end
        I_AACK: if (scl_f) begin
          bcnt <= '0;
          if (i_rnw) begin
            sh <= c2h_f ? c2h : 8'h00; sda_oe <= !(c2h_f ? c2h[7] : 1'b0);
            i_rd_take <= 1'b1; ist <= I_RDATA;
          end else begin sda_oe <= 1'b0; ist <= I_WDATA; end
        end
        I_WDATA: if (scl_r) begin
          sh <= {sh[6:0], sda_s[1]}; bcnt <= bcnt + 1'b1;
        end else if (scl_f && bcnt == 4'd8) begin
          sda_oe <= 1'b1; i_wr <= 1'b1; ist <= I_WACK;
        end
        I_WACK: if (scl_f) begin sda_oe <= 1'b0; bcnt <= '0; ist <= I_WDATA; end
        I_RDATA: if (scl_f) begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == 4'd7) begin sda_oe <= 1'b0; ist <= I_RACK; end
          else begin sh <= {sh[6:0], 1'b0}; sda_oe <= !sh[6]; end
        end
        I_RACK: if (scl_r) begin
          if (sda_s[1]) ist <= I_IDLE;           // master NACK: end of read
          else begin
            ist <= I_AACK;  // continue reading: reuse the byte load path
          end
        end
        default: ist <= I_IDLE;
      endcase
    end
  end

  // ---- mailboxes ----
  logic apb_wr, apb_rd;
  assign apb_wr = psel && p_req.penable && p_req.pwrite;
  assign apb_rd = psel && p_req.penable && !p_req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h2c <= '0; c2h <= '0; h2c_f <= 1'b0; c2h_f <= 1'b0; irq <= 1'b0;
    end else begin
      irq <= 1'b0;
      if (p_wr && !h_a) begin h2c <= h_din; h2c_f <= 1'b1; irq <= 1'b1; end
      if (i_wr)         begin h2c <= sh;    h2c_f <= 1'b1; irq <= 1'b1; end
      if (apb_rd && p_req.paddr[1:0] == 2'd0) h2c_f <= 1'b0;
      if (apb_wr && p_req.paddr[1:0] == 2'd1) begin c2h <= p_req.pwdata; c2h_f <= 1'b1; end
      else if ((p_rd && !h_a) || i_rd_take) c2h_f <= 1'b0;
    end
  end

  always_comb begin
    case (p_req.paddr[1:0])
      2'd0: prdata = h2c;
      2'd2: prdata = {6'd0, c2h_f, h2c_f};
      default: prdata = '0;
    endcase
  end
endmodule
