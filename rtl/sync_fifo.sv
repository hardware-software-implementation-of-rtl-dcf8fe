// sync_fifo: single-clock first-in first-out buffer used by the module
// buffers (stream input, video input/output, stream producer, VLD input).
// Push and pop may happen in the same cycle.  The read data is the head
// entry, available combinationally while not empty.  'level' counts stored
// entries; 'rdata_next' shows the entry after the head.  Depth must be a power of two.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [W-1:0]               wdata,
  input  logic                       pop,
  output logic [W-1:0]               rdata,
  output logic [W-1:0]               rdata_next,   // entry after the head
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH):0]     level
);
  localparam int AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          do_push, do_pop;

  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign level   = wp - rp;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rp[AW-1:0]];
  assign rdata_next = mem[AW'(rp[AW-1:0] + 1'b1)];

  always_ff @(posedge clk) if (do_push) mem[wp[AW-1:0]] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end
endmodule
