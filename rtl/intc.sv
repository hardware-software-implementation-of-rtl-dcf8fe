// intc: interrupt controller with seven sources, in this order:
//   0..2 Timer0..Timer2 (level), 3 external interrupt (rising edge, latched),
//   4..6 three swi interrupts (set by software).
// A single IRQ output goes to the controller; fast interrupts are not
// supported.  The source list and the absence of FIQ follow the
// architecture; the register layout is this design's choice.
//
// Registers: 0 RAW (read), 1 ENABLE (r/w), 2 STATUS = RAW & ENABLE (read),
//   3 SOFTSET (write 1 to bits 4..6), 4 CLEAR (write 1 clears latched
//   external and swi bits).
module intc
  import mova_pkg::*;
#(
  parameter int NSRC = 7
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  apb_req_t   p_req,
  output logic [7:0] prdata,
  input  logic [2:0] timer_irq,
  input  logic       ext_irq,
  output logic       irq
);
  logic [NSRC-1:0] raw, en;
  logic            ext_d, ext_l;
  logic [2:0]      swi;
  logic            wr;

  assign wr  = psel && p_req.penable && p_req.pwrite;
  assign raw = NSRC'({swi, ext_l, timer_irq});
  assign irq = |(raw & en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en <= '0; ext_d <= 1'b0; ext_l <= 1'b0; swi <= '0;
    end else begin
      ext_d <= ext_irq;
      if (ext_irq && !ext_d) ext_l <= 1'b1;
      if (wr) begin
        case (p_req.paddr[2:0])
          3'd1: en <= p_req.pwdata[NSRC-1:0];
          3'd3: swi <= swi | p_req.pwdata[6:4];
          3'd4: begin
            if (p_req.pwdata[3]) ext_l <= 1'b0;
            swi <= swi & ~p_req.pwdata[6:4];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (p_req.paddr[2:0])
      3'd0: prdata = 8'(raw);
      3'd1: prdata = 8'(en);
      3'd2: prdata = 8'(raw & en);
      default: prdata = '0;
    endcase
  end
endmodule
