// Testbench for dctq: random intra and inter blocks are transformed; the
// levels are compared with a floating-point DCT and the quantizer rule
// computed here (within one step, as the fixed-point transform may round a
// coefficient across a decision boundary), and the rebuilt residual with a
// floating-point IDCT of the dequantized levels (within 2).  Also checks
// the DCTQ skip (not-coded block), decode mode, and cycle counts.
`include "tb/tb_common.svh"
module tb_dctq;
  import mova_pkg::*;
  logic clk, rst_n, start, busy, done, in_we, lvl_we, coded;
  logic [5:0] in_addr, lvl_addr, res_addr;
  logic signed [11:0] in_data, lvl_data, res_data;
  slv_req_t s_req;
  slv_rsp_t s_rsp;
  int checks = 0, failures = 0;
  dctq dut (.*);
  `TB_CLOCK_WATCHDOG(100000)
  `TB_SLAVE_TASKS

  real X [64], F [64], R [64];
  int  L [64];
  int  Dq [64];
  logic [15:0] v;
  localparam real PI = 3.14159265358979;

  function automatic real cu(int u); return (u == 0) ? $sqrt(0.125) : 0.5; endfunction
  task automatic fdct();
    for (int u = 0; u < 8; u++) for (int w = 0; w < 8; w++) begin
      automatic real s = 0;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        s += X[y*8+x] * $cos((2*x+1)*w*PI/16) * $cos((2*y+1)*u*PI/16);
      F[u*8+w] = cu(u) * cu(w) * s;
    end
  endtask
  task automatic idct();
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      automatic real s = 0;
      for (int u = 0; u < 8; u++) for (int w = 0; w < 8; w++)
        s += cu(u) * cu(w) * Dq[u*8+w] * $cos((2*x+1)*w*PI/16) * $cos((2*y+1)*u*PI/16);
      R[y*8+x] = s;
    end
  endtask
  function automatic int iq(int l, int qp, bit dc);
    automatic int a = (l < 0) ? -l : l, r;
    if (dc) return 8 * l;
    if (a == 0) return 0;
    r = qp * (2*a + 1) - ((qp % 2 == 0) ? 1 : 0);
    return (l < 0) ? -r : r;
  endfunction
  task automatic run();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(posedge clk);
  endtask

  initial begin
    s_req = '0; start = 0; rst_n = 0; in_we = 0; lvl_we = 0; in_addr = 0; in_data = 0;
    lvl_addr = 0; res_addr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      automatic bit intra = (t % 2 == 0);
      automatic int qp = (t < 2) ? 4 : 13;
      for (int i = 0; i < 64; i++) begin
        X[i] = intra ? $urandom_range(0, 255) : $itor($urandom_range(0, 120)) - 60;
        bw(12'(i), 16'(int'(X[i])));
      end
      bw(12'h100, 16'(qp)); bw(12'h101, {15'd0, intra});
      run();
      br(12'h104, v); `TB_CHECK(int'(v) == 322, "encode cycles: 5 passes of 64 + 2")
      fdct();
      for (int k = 0; k < 64; k++) begin
        automatic real c = F[k];
        automatic real a = (c < 0) ? -c : c;
        automatic int lm, lv;
        if (intra && k == 0) lm = int'($floor((c + 4) / 8));
        else if (intra) lm = int'($floor(a / (2*qp)));
        else lm = (a > qp/2) ? int'($floor((a - qp/2) / (2*qp))) : 0;
        if (!(intra && k == 0) && c < 0) lm = -lm;
        @(negedge clk); lvl_addr = 6'(k); #1; lv = int'(lvl_data);
        `TB_CHECK(lv - lm <= 1 && lm - lv <= 1, $sformatf("level %0d: got %0d model %0d", k, lv, lm))
        L[k] = lv;
        Dq[k] = iq(lv, qp, intra && k == 0);
      end
      idct();
      for (int k = 0; k < 64; k++) begin
        automatic real d;
        @(negedge clk); res_addr = 6'(k); #1;
        d = $itor(res_data) - R[k];
        `TB_CHECK(d <= 2.0 && d >= -2.0, $sformatf("residual %0d: got %0d model %f", k, res_data, R[k]))
      end
      `TB_CHECK(coded == 1'b1, "block coded")
    end
    // DCTQ skip: inter block with small SAD is not coded and fast
    bw(12'h100, 16'd10); bw(12'h101, 16'b100); bw(12'h102, 16'd100);
    run();
    br(12'h104, v); `TB_CHECK(int'(v) == 2, "skipped block takes 2 cycles")
    `TB_CHECK(coded == 1'b0, "skipped block not coded")
    for (int k = 0; k < 64; k += 9) begin
      @(negedge clk); lvl_addr = 6'(k); res_addr = 6'(k); #1;
      `TB_CHECK(lvl_data == 0 && res_data == 0, "skipped block zero")
    end
    // large SAD: not skipped
    bw(12'h102, 16'd1000); run();
    br(12'h104, v); `TB_CHECK(int'(v) == 322, "large SAD block transformed")
    // decode mode: levels through the direct port, IQ + IDCT only
    for (int k = 0; k < 64; k++) begin
      L[k] = (k < 10) ? $urandom_range(0, 6) - 3 : 0;
      Dq[k] = iq(L[k], 7, 0);
      @(negedge clk); in_we = 1; lvl_we = 1; in_addr = 6'(k); in_data = 12'(L[k]);
    end
    @(negedge clk); in_we = 0; lvl_we = 0;
    bw(12'h100, 16'd7); bw(12'h101, 16'b010);
    run();
    br(12'h104, v); `TB_CHECK(int'(v) == 194, "decode cycles: 3 passes of 64 + 2")
    idct();
    for (int k = 0; k < 64; k++) begin
      automatic real d;
      @(negedge clk); res_addr = 6'(k); #1;
      d = $itor(res_data) - R[k];
      `TB_CHECK(d <= 2.0 && d >= -2.0, "decoded residual")
    end
    `TB_FINISH
  end
endmodule
