// rpc: remap and pause controller on the APB.
// REMAP (register 0): cleared by reset, set HIGH by any write; read back.
// PAUSE (register 1): a write puts the controller in its "wait for
// interrupt" state ('pause' high, used to hold the controller's clock);
// the next interrupt request releases it.
// SLEEP (register 3): a write puts the chip in sleep mode ('sleep' high:
// the controller is held and every gated module clock stops); interrupts
// do not end it, only a wake-up event on the external 'wake' pin does.
// Register 2 reads {sleep, pause, remap}.  Register numbers are this
// design's choice.
module rpc
  import mova_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       psel,
  input  apb_req_t   p_req,
  output logic [7:0] prdata,
  input  logic       irq,
  input  logic       wake,
  output logic       remap,
  output logic       pause,
  output logic       sleep
);
  logic wr;
  assign wr = psel && p_req.penable && p_req.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remap <= 1'b0;
      pause <= 1'b0;
      sleep <= 1'b0;
    end else begin
      if (wr && p_req.paddr[1:0] == 2'd0) remap <= 1'b1;
      if (wr && p_req.paddr[1:0] == 2'd1) pause <= 1'b1;
      else if (irq) pause <= 1'b0;
      if (wr && p_req.paddr[1:0] == 2'd3) sleep <= 1'b1;
      else if (wake) sleep <= 1'b0;
    end
  end

  assign prdata = {5'd0, sleep, pause, remap};
endmodule
