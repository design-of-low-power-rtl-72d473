// clock_controller: clock gate for the YCrCb-to-RGB converter.
//
// Three registers hold the Y, Cr and Cb of the previous clock period and
// drive the converter's data inputs. Each register's input is XORed with its
// output; the three compare results are ORed into "input changed", and the
// converter's clock is the system clock ANDed with that change flag, so the
// converter is not clocked while successive pixels are identical. Register,
// XOR, OR and AND structure follow the design; two flip-flops are this
// implementation's addition:
//   * chg  (posedge) keeps the change flag of period n for one period, so the
//     gated edge that follows lands when the registers already hold the new
//     sample and the converter computes from the registered value;
//   * en_n (negedge) retimes that flag while clk is low, so the AND gate
//     only sees a stable enable while clk is high and the gated clock has no
//     glitches (a flip-flop form of an integrated clock gate).
// Reset (synchronous, active high) clears the registers and forces the gate
// open, so the converter gets one edge after reset and its output matches
// the cleared registers.
//
// Interface: *_in are the current samples, *_prev the registered ones,
// gclk the gated clock, clk_en the enable seen by the AND gate.
// Timing: a sample taken at edge n reaches the converter's output at edge
// n+1 (if it differed from the sample before it); otherwise the converter
// keeps its output, which already equals the converted value.
module clock_controller
  import vz_pkg::*;
#(
  parameter int W = SAMPLE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] y_in,
  input  logic [W-1:0] cr_in,
  input  logic [W-1:0] cb_in,
  output logic [W-1:0] y_prev,
  output logic [W-1:0] cr_prev,
  output logic [W-1:0] cb_prev,
  output logic         gclk,
  output logic         clk_en
);

  logic diff;
  logic chg;
  logic en_n;

  // Registers 1..3: previous input data
  always_ff @(posedge clk) begin
    if (rst) begin
      y_prev  <= '0;
      cr_prev <= '0;
      cb_prev <= '0;
    end else begin
      y_prev  <= y_in;
      cr_prev <= cr_in;
      cb_prev <= cb_in;
    end
  end

  // XOR per component, OR of the three results
  assign diff = (|(y_in ^ y_prev)) | (|(cr_in ^ cr_prev)) | (|(cb_in ^ cb_prev));

  always_ff @(posedge clk) begin
    if (rst) chg <= 1'b1;
    else     chg <= diff;
  end

  always_ff @(negedge clk) begin
    if (rst) en_n <= 1'b1;
    else     en_n <= chg;
  end

  // AND gate: the converter's clock
  assign clk_en = en_n;
  assign gclk   = clk & en_n;

endmodule
