// int_sram: on-chip program/data memory of the controller, 8K bytes
// (2,048 32-bit words) built as four 2,048 x 8 banks, one per byte lane, so
// that a word, a halfword or a byte is accessed by enabling four, two or
// one banks.  Splitting the memory into small banks follows the document
// (it saves power on narrow accesses); reading "8,000 words divided into
// four 2,000-word memories" as 2K-byte banks of one 8K-byte memory is this
// design's reading (the program fits in 6.5 kB plus 1.5 kB of data).
//
// Port: byte address, size (0 byte, 1 halfword, 2 word), write data with
// the byte or halfword replicated on all lanes (ARM convention).  Reads are
// synchronous: the word appears the cycle after the access.
module int_sram #(
  parameter int NWORDS = 2048
) (
  input  logic                        clk,
  input  logic                        en,
  input  logic                        we,
  input  logic [$clog2(NWORDS)+1:0]   addr,
  input  logic [1:0]                  size,
  input  logic [31:0]                 wdata,
  output logic [31:0]                 rdata
);
  localparam int AW = $clog2(NWORDS);
  logic [3:0] be;
  always_comb begin
    case (size)
      2'd0:    be = 4'b0001 << addr[1:0];
      2'd1:    be = addr[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    logic [7:0] mem [NWORDS];
    always_ff @(posedge clk) begin
      if (en && we && be[b]) mem[addr[AW+1:2]] <= wdata[8*b +: 8];
      if (en) rdata[8*b +: 8] <= mem[addr[AW+1:2]];
    end
  end
endmodule
