// sdram_model: behavioural 16-bit SDRAM (2 banks x 2048 rows x 256 columns)
// for simulation.  Commands are sampled on the rising clock edge; read data
// appears CL cycles later (burst length 1).  The model stores written words
// in a sparse array and counts protocol violations in 'errors': a command
// before the power-up wait, READ/WRITE to a bank without an open row,
// ACTIVE to an open bank, READ/WRITE sooner than T_RCD after ACTIVE, ACTIVE
// sooner than T_RP after PRECHARGE, and a refresh gap longer than
// MAX_REF_GAP cycles once initialised.  Unwritten words read as a hash of
// their address.
module sdram_model #(
  parameter int CL          = 2,
  parameter int T_RCD       = 2,
  parameter int T_RP        = 2,
  parameter int INIT_CYC    = 2700,
  parameter int MAX_REF_GAP = 500
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic        ba,
  input  logic [10:0] a,
  input  logic [1:0]  dqm,
  input  logic [15:0] dq_in,    // data from the controller
  input  logic        dq_oe,
  output logic [15:0] dq_out    // data to the controller
);
  logic [15:0] mem [int];
  logic [15:0] pipe [CL];
  logic [1:0]  open = '0;
  logic [10:0] row [2] = '{default: '0};
  int          cyc = 0, act_at [2] = '{-100, -100}, pre_at [2] = '{-100, -100}, last_ref = 0;
  int          errors = 0, n_ref = 0, n_act = 0, n_rd = 0, n_wr = 0;
  bit          mrs_done = 0;
  logic [2:0]  cmd;
  assign cmd    = {ras_n, cas_n, we_n};
  assign dq_out = pipe[CL-1];
  initial for (int i = 0; i < CL; i++) pipe[i] = '0;

  function automatic int idx(logic b, logic [10:0] r, logic [7:0] c);
    return {b, r, c};
  endfunction

  task automatic err(string s);
    errors++; $display("SDRAM ERROR @%0d: %s", cyc, s);
  endtask

  always @(posedge clk) begin
    for (int i = CL - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= '0;
    cyc++;
    if (mrs_done && cyc - last_ref > MAX_REF_GAP) begin err("refresh overdue"); last_ref = cyc; end
    if (cyc > 2 && cke && !cs_n && cmd != 3'b111) begin   // pins settle during reset
      if (cyc < INIT_CYC) err("command during power-up wait");
      case (cmd)
        3'b011: begin   // ACTIVE
          if (open[ba]) err("ACTIVE to open bank");
          if (cyc - pre_at[ba] < T_RP) err("tRP");
          open[ba] = 1'b1; row[ba] = a; act_at[ba] = cyc; n_act++;
        end
        3'b101, 3'b100: begin   // READ / WRITE
          automatic int k = idx(ba, row[ba], a[7:0]);
          if (!open[ba]) err("READ/WRITE to closed bank");
          if (cyc - act_at[ba] < T_RCD) err("tRCD");
          if (cmd == 3'b100) begin
            if (!dq_oe) err("WRITE without data");
            mem[k] = dq_in; n_wr++;
          end else begin
            pipe[0] <= mem.exists(k) ? mem[k] : 16'(k * 40503);
            n_rd++;
          end
        end
        3'b010: begin   // PRECHARGE
          if (a[10]) begin open = '0; pre_at = '{cyc, cyc}; end
          else begin open[ba] = 1'b0; pre_at[ba] = cyc; end
        end
        3'b001: begin   // AUTO REFRESH
          if (open != 0) err("REFRESH with open rows");
          last_ref = cyc; n_ref++;
        end
        3'b000: mrs_done = 1;
        default: ;
      endcase
    end
  end
endmodule
