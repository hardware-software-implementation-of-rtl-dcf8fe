// clk_ctrl: clock generator.  From the main clock input, taken here to run
// at 54 MHz (twice the 27 MHz system clock; the input frequency is this
// design's assumption), it derives the four internal clocks:
//   clk27   : main / 2
//   clk27_q : clk27 delayed by 1/4 of its period (toggles on the falling
//             edge of the main clock, half a main period later)
//   clk13   : main / 4
//   clk13_q : clk13 delayed by 1/4 of its period (one main period later)
// and NG gated clocks for the modules, each enabled by its clock-enable bit
// from the power-manager field.  A gated clock is clk27 or clk13 passed
// through a latch-based clock gate (enable latched while the source clock
// is low, so the gated clock never glitches); the latch is intended.
// Which modules run at 13.5 MHz follows the document (MEFMC, DCTQ, VLC,
// DB); the order of the gated outputs is MEC, MEFMC, DCTQ, VLC, VLD, REC,
// DB.
module clk_ctrl #(
  parameter int NG = 7,
  parameter logic [NG-1:0] SLOW = 7'b1001110   // 1 = derive from clk13
) (
  input  logic          clk_main,
  input  logic          rst_n,
  input  logic [NG-1:0] en,
  output logic          clk27,
  output logic          clk27_q,
  output logic          clk13,
  output logic          clk13_q,
  output logic [NG-1:0] gclk
);
  logic [1:0] div;
  always_ff @(posedge clk_main or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  end
  assign clk27 = div[0];
  assign clk13 = div[1];

  always_ff @(negedge clk_main or negedge rst_n) begin
    if (!rst_n) clk27_q <= 1'b0;
    else        clk27_q <= div[0];
  end
  always_ff @(posedge clk_main or negedge rst_n) begin
    if (!rst_n) clk13_q <= 1'b0;
    else        clk13_q <= div[1];
  end

  for (genvar g = 0; g < NG; g++) begin : g_gate
    logic src, en_l;
    assign src = SLOW[g] ? clk13 : clk27;
    always_latch begin
      if (!src) en_l = en[g];
    end
    assign gclk[g] = src && en_l;
  end
endmodule
