// Testbench for asb_decoder: every slave window, the SDRAM window, unmapped
// addresses and the idle bus.
`include "tb/tb_common.svh"
module tb_asb_decoder;
  logic [23:0] addr;
  logic valid, miss;
  logic [14:0] sel;
  logic [19:0] emi_addr;
  logic [11:0] slv_addr;
  int checks = 0, failures = 0;
  asb_decoder #(.NS(15)) dut (.*);
  initial begin
    valid = 1;
    for (int i = 0; i < 300; i++) begin
      automatic int k = $urandom_range(0, 17);
      automatic logic [15:0] e;
      addr = (k == 0) ? 24'($urandom_range(0, 24'hFFFFF)) :
             (k < 15) ? {8'h10, 4'(k), 12'($urandom)} :
             (k == 15) ? {8'h10, 4'h0, 12'($urandom)} : {8'h20 + 8'(k), 16'($urandom)};
      #1;
      e = (k < 15) ? (16'd1 << k) : 16'd0;
      `TB_CHECK(sel == e[14:0], $sformatf("select for case %0d", k))
      `TB_CHECK(miss == (k >= 15), "miss flag")
      `TB_CHECK(slv_addr == addr[11:0] && emi_addr == addr[19:0], "local address")
    end
    valid = 0; #1;
    `TB_CHECK(sel == 0 && !miss, "idle bus selects nothing")
    `TB_FINISH
  end
endmodule
