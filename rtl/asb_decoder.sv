// asb_decoder: central address decoder of the system bus.  It turns the
// granted master's word address into one select per slave and the slave's
// local address.
//
// Address map (this design's choice; the architecture gives only the
// decoder's role):
//   addr[23:20] == 0          -> slave 0, external SDRAM (1M x 16 words)
//   addr[23:12] == 0x100 + k  -> slave k, k = 1 .. NS-1, 4K words each
// Any other address selects no slave ('miss'); such a read returns 0.
module asb_decoder #(
  parameter int NS = 15
) (
  input  logic [23:0]   addr,
  input  logic          valid,
  output logic [NS-1:0] sel,
  output logic          miss,
  output logic [19:0]   emi_addr,
  output logic [11:0]   slv_addr
);
  always_comb begin
    sel = '0;
    if (valid) begin
      if (addr[23:20] == 4'h0) sel[0] = 1'b1;
      else if (addr[23:16] == 8'h10 && int'(addr[15:12]) != 0 && int'(addr[15:12]) < NS)
        sel[addr[15:12]] = 1'b1;
    end
  end
  assign miss     = valid && (sel == '0);
  assign emi_addr = addr[19:0];
  assign slv_addr = addr[11:0];
endmodule
