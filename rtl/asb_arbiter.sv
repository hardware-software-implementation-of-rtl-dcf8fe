// asb_arbiter: grants the system bus to one of its masters (ARM controller
// through its wrapper, and the DMA controller).
//
// During reset the default master (master 0, the controller) holds the
// grant and every other grant is inactive, as the codec architecture
// requires.  After reset a master keeps the bus while it keeps requesting;
// when it releases, the highest-numbered requesting master wins (the DMA
// controller has priority over the controller; this priority order is this
// design's choice).  With no request the grant parks on the default master.
// The grant is registered, so a new owner drives the bus one cycle after
// arbitration (a simplified form of the pipelined arbitration of the bus).
module asb_arbiter #(
  parameter int NM = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] req,
  output logic [NM-1:0] grant
);
  logic [NM-1:0] nxt;

  always_comb begin
    nxt = grant;
    if (!(|(grant & req))) begin
      nxt = '0;
      nxt[0] = 1'b1;                       // park on the default master
      for (int i = 0; i < NM; i++)
        if (req[i]) begin
          nxt = '0;
          nxt[i] = 1'b1;
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grant <= NM'(1);
    else        grant <= nxt;
  end

  // exactly one master owns the bus (reset is only used as an assertion disable)
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(grant));
endmodule
