// timers: the three APB timers that pace encoding, decoding and video
// input.  Each timer is a 16-bit down counter clocked through an 8-bit
// prescaler; on reaching zero it sets its time-out flag, reloads (periodic
// mode) or stops (one-shot), and requests an interrupt if that timer's
// interrupt is unmasked.  The number of timers and the maskable time-out
// interrupt follow the architecture; widths and register layout are this
// design's choice.
//
// Registers (8-bit APB), timer t at offset 8*t:
//   +0 LOAD[7:0]  +1 LOAD[15:8]  +2 PRESCALE
//   +3 CTRL {.., ie[2], periodic[1], enable[0]}  (writing enable reloads)
//   +4 STATUS {timeout[0]}  (write 1 to clear)
//   +5 VALUE[7:0] +6 VALUE[15:8] (read)
module timers
  import mova_pkg::*;
#(
  parameter int NTIMER = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              psel,
  input  apb_req_t          p_req,
  output logic [7:0]        prdata,
  output logic [NTIMER-1:0] irq
);
  logic [15:0] load  [NTIMER];
  logic [15:0] value [NTIMER];
  logic [7:0]  pre   [NTIMER];
  logic [7:0]  pcnt  [NTIMER];
  logic [2:0]  ctrl  [NTIMER];
  logic [NTIMER-1:0] tout;
  logic wr;
  int   t;
  logic [2:0] r;

  assign wr = psel && p_req.penable && p_req.pwrite;
  assign t  = int'(p_req.paddr[7:3]);
  assign r  = p_req.paddr[2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTIMER; i++) begin
        load[i] <= '0; value[i] <= '0; pre[i] <= '0; pcnt[i] <= '0; ctrl[i] <= '0;
      end
      tout <= '0;
    end else begin
      for (int i = 0; i < NTIMER; i++) begin
        if (ctrl[i][0]) begin
          if (pcnt[i] != 0) pcnt[i] <= pcnt[i] - 1'b1;
          else begin
            pcnt[i] <= pre[i];
            if (value[i] == 16'd1 || value[i] == 16'd0) begin
              tout[i] <= 1'b1;
              if (ctrl[i][1]) value[i] <= load[i];
              else begin value[i] <= '0; ctrl[i][0] <= 1'b0; end
            end else value[i] <= value[i] - 1'b1;
          end
        end
      end
      if (wr && t < NTIMER) begin
        case (r)
          3'd0: load[t][7:0]  <= p_req.pwdata;
          3'd1: load[t][15:8] <= p_req.pwdata;
          3'd2: pre[t]        <= p_req.pwdata;
          3'd3: begin
            ctrl[t] <= p_req.pwdata[2:0];
            if (p_req.pwdata[0]) begin value[t] <= load[t]; pcnt[t] <= pre[t]; end
          end
          3'd4: if (p_req.pwdata[0]) tout[t] <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata = '0;
    if (t < NTIMER) begin
      case (r)
        3'd0: prdata = load[t][7:0];
        3'd1: prdata = load[t][15:8];
        3'd2: prdata = pre[t];
        3'd3: prdata = {5'd0, ctrl[t]};
        3'd4: prdata = {7'd0, tout[t]};
        3'd5: prdata = value[t][7:0];
        3'd6: prdata = value[t][15:8];
        default: prdata = '0;
      endcase
    end
    for (int i = 0; i < NTIMER; i++) irq[i] = tout[i] && ctrl[i][2];
  end
endmodule
