// tb_gating_example: the 800 ns power example for the colour converter.
//
// The classical converter (free-running 27 MHz clock) and the low-power
// one (clock controller + converter) receive the same sample sequence for
// the window T = [0 ns, 800 ns]: a few values each held for several clock
// periods, as in a picture with runs of identical pixels. The testbench
// counts the rising edges N of each converter's clock inside the window,
// prints the average clock frequency N/T of both and the resulting
// reduction of the switching term A*C*V^2*F, and checks that both
// converters produce the same R/G/B and that the gated converter got one
// edge per input change.
module tb_gating_example;

  logic clk = 1'b0;
  logic rst;
  logic [9:0] y_in, cr_in, cb_in, y_prev, cr_prev, cb_prev, y_d, cr_d, cb_d;
  logic gclk, clk_en;
  logic [7:0] r, g, b, r_c, g_c, b_c;
  int checks = 0, failures = 0;
  int n_sys = 0, n_gated = 0, n_changes = 0;
  logic window = 1'b0;

  clock_controller ctl (.clk, .rst, .y_in, .cr_in, .cb_in, .y_prev, .cr_prev, .cb_prev, .gclk, .clk_en);
  ycrcb_to_rgb lp_conv (.clk(gclk), .rst, .y(y_prev), .cr(cr_prev), .cb(cb_prev), .r, .g, .b);

  always_ff @(posedge clk) begin y_d <= y_in; cr_d <= cr_in; cb_d <= cb_in; end
  ycrcb_to_rgb classic (.clk, .rst, .y(y_d), .cr(cr_d), .cb(cb_d), .r(r_c), .g(g_c), .b(b_c));

  always #18.5 clk = ~clk;   // 27 MHz

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)  if (window) n_sys++;
  always @(posedge gclk) if (window) n_gated++;
  always @(negedge clk) if (window) begin
    checks++;
    if ({r, g, b} !== {r_c, g_c, b_c}) begin
      failures++;
      $display("FAIL t=%0t low-power %h%h%h classical %h%h%h", $time, r, g, b, r_c, g_c, b_c);
    end
  end

  // held values: {y, cr, cb} and the number of clock periods each is held
  // Six changes in 22 periods, shaped like the reference timing diagram:
  // two Cb-only steps, then a step of all three components, a dark value,
  // a Y-only step and a long run of one value.
  localparam int NSEG = 7;
  localparam logic [29:0] SEG_VAL [NSEG] = '{
    {10'b1111111100, 10'b1111111100, 10'b1111111100},
    {10'b1111111100, 10'b1111111100, 10'b1111110000},
    {10'b1111111100, 10'b1111111100, 10'b1111101100},
    {10'b1111100000, 10'b1111100000, 10'b1111100000},
    {10'b0011001100, 10'b0011001100, 10'b0011001100},
    {10'b0011000000, 10'b0011001100, 10'b0011001100},
    {10'b1111100000, 10'b1111100000, 10'b1111100000}};
  localparam int SEG_LEN [NSEG] = '{3, 1, 1, 2, 2, 1, 12};

  initial begin
    real f_sys, f_gated;
    rst = 1'b1;
    {y_in, cr_in, cb_in} = SEG_VAL[0];
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    // window starts: both converters already show SEG_VAL[0]
    window = 1'b1;
    for (int s = 0; s < NSEG; s++) begin
      if (s > 0) n_changes++;
      {y_in, cr_in, cb_in} = SEG_VAL[s];
      repeat (SEG_LEN[s]) @(negedge clk);
    end
    window = 1'b0;
    f_sys   = real'(n_sys)   / 800.0e-9;
    f_gated = real'(n_gated) / 800.0e-9;
    $display("T = 800 ns: classical N = %0d (%0.1f MHz), low-power N = %0d (%0.1f MHz), gain %0.0f %%",
             n_sys, f_sys / 1.0e6, n_gated, f_gated / 1.0e6, 100.0 * (f_sys - f_gated) / f_sys);
    checks++;
    if (n_gated != n_changes) begin
      failures++;
      $display("FAIL %0d gated edges for %0d changes", n_gated, n_changes);
    end
    checks++;
    if (n_sys != 22) begin failures++; $display("FAIL window holds %0d system edges", n_sys); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
