// emi: external memory interface, a controller for one 16-bit SDRAM
// (16 Mbit: 2 banks x 2048 rows x 256 columns x 16 bits).
//
// It is a system-bus slave: a transfer stalls the bus until the SDRAM
// access completes.  Rows are left open after an access, so further
// accesses to the same row of a bank (a DMA line of a frame) need only a
// READ or WRITE command (page mode, minimal RAS cycles); another row needs
// PRECHARGE and ACTIVE first.  After reset the controller waits INIT_CYC
// cycles, precharges all banks, issues two AUTO REFRESH commands and sets
// the mode register (burst length 1, CAS latency CL).  It refreshes every
// REF_INT cycles, closing all rows first.  Timing (tRP, tRCD, tRFC in
// cycles) and the command sequence are this design's choices for a 27 MHz
// system clock; the document gives the 16-bit SDRAM interface and the
// page-mode use.
//
// Bus address (word): {bank[19], row[18:8], column[7:0]}.
// SDRAM pins: cke, cs_n, ras_n, cas_n, we_n, ba, a[10:0], dqm, dq (split
// into dq_out / dq_oe / dq_in).
module emi
  import mova_pkg::*;
#(
  parameter int INIT_CYC = 2700,   // 100 us at 27 MHz
  parameter int REF_INT  = 400,    // 4096 rows in 64 ms at 27 MHz -> 421
  parameter int T_RP     = 2,
  parameter int T_RCD    = 2,
  parameter int T_RFC    = 3,
  parameter int CL       = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  logic        wr,
  input  logic [19:0] addr,
  input  logic [15:0] wdata,
  output slv_rsp_t    s_rsp,
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic        sd_ba,
  output logic [10:0] sd_a,
  output logic [1:0]  sd_dqm,
  output logic [15:0] sd_dq_out,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_in,
  output logic [15:0] n_act          // ACTIVE commands issued (row misses)
);
  typedef enum logic [3:0] {
    S_INIT, S_IPRE, S_IREF1, S_IREF2, S_IMRS, S_IDLE, S_PRE, S_ACT, S_RW, S_RWAIT,
    S_DONE, S_RPRE, S_REF
  } st_e;
  st_e st;
  logic [15:0] tmr, rcnt;
  logic [1:0]  open;
  logic [10:0] orow [2];
  logic [15:0] rdat;
  logic        ref_due;

  logic        bk;
  logic [10:0] row;
  logic [7:0]  col;
  assign bk  = addr[19];
  assign row = addr[18:8];
  assign col = addr[7:0];

  // command encoding {ras_n, cas_n, we_n}
  localparam logic [2:0] C_NOP = 3'b111, C_ACT = 3'b011, C_RD = 3'b101, C_WR = 3'b100,
                         C_PRE = 3'b010, C_REF = 3'b001, C_MRS = 3'b000;
  logic [2:0] cmd;
  assign {sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_cs_n = 1'b0;
  assign sd_cke  = 1'b1;
  assign sd_dqm  = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_INIT; tmr <= 16'(INIT_CYC); rcnt <= '0; open <= '0; orow[0] <= '0; orow[1] <= '0;
      rdat <= '0; ref_due <= 1'b0; cmd <= C_NOP; sd_ba <= 1'b0; sd_a <= '0; sd_dq_out <= '0;
      sd_dq_oe <= 1'b0; n_act <= '0;
    end else begin
      cmd <= C_NOP;
      sd_dq_oe <= 1'b0;
      if (tmr != 0) tmr <= tmr - 1'b1;
      if (st != S_INIT && st != S_IPRE && st != S_IREF1 && st != S_IREF2 && st != S_IMRS) begin
        if (int'(rcnt) >= REF_INT - 1) begin rcnt <= '0; ref_due <= 1'b1; end
        else rcnt <= rcnt + 1'b1;
      end
      case (st)
        S_INIT:  if (tmr == 0) begin cmd <= C_PRE; sd_a[10] <= 1'b1; tmr <= 16'(T_RP); st <= S_IPRE; end
        S_IPRE:  if (tmr == 0) begin cmd <= C_REF; tmr <= 16'(T_RFC); st <= S_IREF1; end
        S_IREF1: if (tmr == 0) begin cmd <= C_REF; tmr <= 16'(T_RFC); st <= S_IREF2; end
        S_IREF2: if (tmr == 0) begin
          cmd <= C_MRS; sd_ba <= 1'b0;
          sd_a <= {4'b0000, 3'(CL), 1'b0, 3'b000};   // burst 1, sequential, CL
          tmr <= 16'd2; st <= S_IMRS;
        end
        S_IMRS:  if (tmr == 0) st <= S_IDLE;
        S_IDLE: begin
          if (ref_due) begin
            if (open != 0) begin cmd <= C_PRE; sd_a[10] <= 1'b1; open <= '0; tmr <= 16'(T_RP); end
            else tmr <= '0;
            st <= S_RPRE;
          end else if (sel) begin
            if (open[bk] && orow[bk] == row) begin
              st <= S_RW;
            end else if (open[bk]) begin
              cmd <= C_PRE; sd_ba <= bk; sd_a[10] <= 1'b0; open[bk] <= 1'b0;
              tmr <= 16'(T_RP); st <= S_PRE;
            end else begin
              cmd <= C_ACT; sd_ba <= bk; sd_a <= row; orow[bk] <= row; open[bk] <= 1'b1;
              n_act <= n_act + 1'b1; tmr <= 16'(T_RCD); st <= S_ACT;
            end
          end
        end
        S_PRE: if (tmr == 0) begin
          cmd <= C_ACT; sd_ba <= bk; sd_a <= row; orow[bk] <= row; open[bk] <= 1'b1;
          n_act <= n_act + 1'b1; tmr <= 16'(T_RCD); st <= S_ACT;
        end
        S_ACT: if (tmr == 0) st <= S_RW;
        S_RW: begin
          sd_ba <= bk; sd_a <= {3'b000, col};
          if (wr) begin
            cmd <= C_WR; sd_dq_out <= wdata; sd_dq_oe <= 1'b1; st <= S_DONE;
          end else begin
            cmd <= C_RD; tmr <= 16'(CL); st <= S_RWAIT;
          end
        end
        S_RWAIT: if (tmr == 0) begin rdat <= sd_dq_in; st <= S_DONE; end
        S_DONE: st <= S_IDLE;
        S_RPRE: if (tmr == 0) begin cmd <= C_REF; ref_due <= 1'b0; tmr <= 16'(T_RFC); st <= S_REF; end
        S_REF:  if (tmr == 0) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // the bus transfer completes in S_DONE
  assign s_rsp.stall = sel && (st != S_DONE);
  assign s_rsp.rdata = rdat;
endmodule
