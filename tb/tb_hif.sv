// Testbench for hif: a host model exchanges bytes with the controller side
// (APB) through both mailboxes using the Intel-style and Motorola-style
// parallel port and an I2C master model (open-drain SDA, slave ACKs, a
// wrong address is ignored).  Checks data, full flags, and the interrupt
// on each new host byte.
`include "tb/tb_common.svh"
module tb_hif;
  import mova_pkg::*;
  logic clk, rst_n, psel, irq, moto, h_cs_n, h_rd_n, h_wr_n, h_a, h_doe, scl, sda_in, sda_oe, sda_m;
  apb_req_t p_req;
  logic [7:0] prdata, h_din, h_dout;
  int checks = 0, failures = 0, irqs = 0;
  hif #(.I2C_ADDR(7'h3A)) dut (.*);
  assign sda_in = sda_m && !sda_oe;
  `TB_CLOCK_WATCHDOG(200000)
  `TB_APB_TASKS
  always @(posedge clk) if (irq) irqs++;

  task automatic host_wr(input logic a, input logic [7:0] d);
    @(negedge clk); h_cs_n = 0; h_a = a; h_din = d;
    if (moto) begin h_rd_n = 0; repeat (2) @(negedge clk); h_wr_n = 1; end
    else begin repeat (2) @(negedge clk); h_wr_n = 0; end
    repeat (5) @(negedge clk);
    if (moto) h_wr_n = 0; else h_wr_n = 1;
    repeat (2) @(negedge clk); h_cs_n = 1; h_rd_n = moto ? 1'b1 : 1'b1; repeat (4) @(negedge clk);
  endtask
  task automatic host_rd(input logic a, output logic [7:0] d);
    @(negedge clk); h_cs_n = 0; h_a = a;
    if (moto) begin h_rd_n = 1; repeat (2) @(negedge clk); h_wr_n = 1; end
    else begin repeat (2) @(negedge clk); h_rd_n = 0; end
    repeat (5) @(negedge clk); d = h_dout;
    `TB_CHECK(h_doe, "host data bus driven during read")
    if (moto) h_wr_n = 0; else h_rd_n = 1;
    repeat (2) @(negedge clk); h_cs_n = 1; repeat (4) @(negedge clk);
  endtask

  localparam int Q = 6;   // quarter of an I2C bit in system clocks
  task automatic i2c_start; sda_m = 1; scl = 1; repeat (Q) @(negedge clk); sda_m = 0; repeat (Q) @(negedge clk); scl = 0; repeat (Q) @(negedge clk); endtask
  task automatic i2c_stop; sda_m = 0; repeat (Q) @(negedge clk); scl = 1; repeat (Q) @(negedge clk); sda_m = 1; repeat (2 * Q) @(negedge clk); endtask
  task automatic i2c_bit_w(input logic b);
    sda_m = b; repeat (Q) @(negedge clk); scl = 1; repeat (2 * Q) @(negedge clk); scl = 0; repeat (Q) @(negedge clk);
  endtask
  task automatic i2c_bit_r(output logic b);
    sda_m = 1; repeat (Q) @(negedge clk); scl = 1; repeat (Q) @(negedge clk); b = sda_in; repeat (Q) @(negedge clk);
    scl = 0; repeat (Q) @(negedge clk);
  endtask
  task automatic i2c_byte_w(input logic [7:0] d, output logic ack);
    logic b;
    for (int i = 7; i >= 0; i--) i2c_bit_w(d[i]);
    i2c_bit_r(b); ack = !b;
  endtask
  task automatic i2c_byte_r(output logic [7:0] d, input logic last);
    for (int i = 7; i >= 0; i--) i2c_bit_r(d[i]);
    i2c_bit_w(last);
  endtask

  initial begin
    logic [7:0] d;
    logic ack;
    int i0;
    rst_n = 0; psel = 0; p_req = '0; moto = 0; h_cs_n = 1; h_rd_n = 1; h_wr_n = 1; h_a = 0; h_din = 0;
    scl = 1; sda_m = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int m = 0; m < 2; m++) begin
      moto = m[0]; h_wr_n = moto ? 1'b0 : 1'b1; h_rd_n = 1; repeat (4) @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        automatic logic [7:0] x = 8'($urandom), y = 8'($urandom);
        i0 = irqs;
        host_wr(0, x);
        `TB_CHECK(irqs == i0 + 1, "interrupt on host byte")
        pr(2, d); `TB_CHECK(d[0], "h2c full")
        pr(0, d); `TB_CHECK(d == x, $sformatf("%s host->chip", moto ? "moto" : "intel"))
        pr(2, d); `TB_CHECK(!d[0], "h2c emptied")
        pw(1, y);
        host_rd(1, d); `TB_CHECK(d[1], "host sees c2h full")
        host_rd(0, d); `TB_CHECK(d == y, $sformatf("%s chip->host", moto ? "moto" : "intel"))
        host_rd(1, d); `TB_CHECK(!d[1], "c2h emptied by host read")
      end
    end
    moto = 0; h_wr_n = 1; h_rd_n = 1;
    // I2C write of two bytes
    i0 = irqs;
    i2c_start; i2c_byte_w({7'h3A, 1'b0}, ack); `TB_CHECK(ack, "address ACK")
    i2c_byte_w(8'hA5, ack); `TB_CHECK(ack, "data ACK")
    pr(0, d); `TB_CHECK(d == 8'hA5, "i2c host->chip byte 1")
    i2c_byte_w(8'h3C, ack); `TB_CHECK(ack, "data ACK 2")
    i2c_stop;
    pr(0, d); `TB_CHECK(d == 8'h3C, "i2c host->chip byte 2")
    `TB_CHECK(irqs == i0 + 2, "interrupts for i2c bytes")
    // wrong address
    i2c_start; i2c_byte_w({7'h11, 1'b0}, ack); `TB_CHECK(!ack, "other address not acknowledged") i2c_stop;
    // I2C read
    pw(1, 8'h96);
    i2c_start; i2c_byte_w({7'h3A, 1'b1}, ack); `TB_CHECK(ack, "read address ACK")
    i2c_byte_r(d, 1'b1); i2c_stop;
    `TB_CHECK(d == 8'h96, $sformatf("i2c chip->host %h", d))
    pr(2, d); `TB_CHECK(!d[1], "c2h emptied by i2c read")
    `TB_FINISH
  end
endmodule
