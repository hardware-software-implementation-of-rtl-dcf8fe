// ext_wrapper: external 8-bit ROM interface and program download engine.
// After system reset it reads DL_BYTES bytes from the ROM, one address at
// a time, waiting ROM_WAIT cycles for the ROM access time, and writes each
// byte into the internal SRAM at the same byte address.  While it runs,
// 'download' is high and the rest of the chip is held inactive; it then
// stays low until the next reset.  The download size and ROM access time
// are this design's choices (the whole 8 KB program/data memory, 3 cycles).
module ext_wrapper #(
  parameter int DL_BYTES = 8192,
  parameter int ROM_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [15:0] rom_addr,
  output logic        rom_oe_n,
  input  logic [7:0]  rom_data,
  output logic        download,
  output logic        sram_we,
  output logic [15:0] sram_addr,
  output logic [7:0]  sram_wdata
);
  logic [3:0] wt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rom_addr <= '0; download <= 1'b1; wt <= '0; sram_we <= 1'b0; sram_addr <= '0;
      sram_wdata <= '0;
    end else begin
      sram_we <= 1'b0;
      if (download) begin
        if (int'(wt) == ROM_WAIT) begin
          wt <= '0;
          sram_we <= 1'b1; sram_addr <= rom_addr; sram_wdata <= rom_data;
          if (int'(rom_addr) == DL_BYTES - 1) download <= 1'b0;
          else rom_addr <= rom_addr + 1'b1;
        end else wt <= wt + 1'b1;
      end
    end
  end
  assign rom_oe_n = !download;
endmodule
