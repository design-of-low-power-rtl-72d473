// ycrcb_to_rgb: YCrCb to RGB colour-space converter.
//
// On every rising edge of clk the block registers R, G and B computed from
// the Y, Cr and Cb present at its inputs, using
//   R = 1.164(Y-16) + 1.596(Cr-128)
//   G = 1.164(Y-16) - 0.813(Cr-128) - 0.391(Cb-128)
//   B = 1.164(Y-16) + 2.018(Cb-128)
// The equations are the ones the design is built on; everything else here is
// this implementation's choice: the coefficients are integers with
// COEF_FRAC fraction bits (see vz_pkg), the offsets 16/128 are scaled to
// the input width (64/512 for 10-bit samples), the result is rounded to
// OUT_W bits and clamped to 0 .. 2**OUT_W-1.
//
// Interface: Y/Cr/Cb of IN_W bits in, R/G/B of OUT_W bits out, registered.
// Timing: one clock of latency. In the low-power configuration clk is the
// gated clock from clock_controller, so the outputs change only on the
// edges that controller lets through. rst is synchronous (active high);
// clock_controller keeps its gate open while reset is held, so reset takes
// effect on a gated clock too.
module ycrcb_to_rgb
  import vz_pkg::*;
#(
  parameter int IN_W  = SAMPLE_W,
  parameter int OUT_W = COLOR_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IN_W-1:0]  y,
  input  logic [IN_W-1:0]  cr,
  input  logic [IN_W-1:0]  cb,
  output logic [OUT_W-1:0] r,
  output logic [OUT_W-1:0] g,
  output logic [OUT_W-1:0] b
);

  localparam int SHIFT   = COEF_FRAC + IN_W - OUT_W;
  localparam int Y_OFS   = 16  << (IN_W - 8);
  localparam int C_OFS   = 128 << (IN_W - 8);
  localparam int MAX_OUT = (1 << OUT_W) - 1;

  // Round to OUT_W bits and clamp to the output range
  function automatic logic [OUT_W-1:0] scale_clamp(input logic signed [31:0] acc);
    logic signed [31:0] v;
    v = (acc + (1 << (SHIFT - 1))) >>> SHIFT;
    if (v < 0)                return '0;
    else if (v > MAX_OUT)     return OUT_W'(MAX_OUT);
    else                      return OUT_W'(v);
  endfunction

  logic signed [31:0] yo, cro, cbo;
  logic signed [31:0] r_acc, g_acc, b_acc;

  always_comb begin
    yo    = $signed(32'(y))  - Y_OFS;
    cro   = $signed(32'(cr)) - C_OFS;
    cbo   = $signed(32'(cb)) - C_OFS;
    r_acc = C_Y * yo + C_RV * cro;
    g_acc = C_Y * yo - C_GV * cro - C_GU * cbo;
    b_acc = C_Y * yo + C_BU * cbo;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r <= '0;
      g <= '0;
      b <= '0;
    end else begin
      r <= scale_clamp(r_acc);
      g <= scale_clamp(g_acc);
      b <= scale_clamp(b_acc);
    end
  end

endmodule
