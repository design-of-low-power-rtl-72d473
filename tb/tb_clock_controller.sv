// tb_clock_controller: checks the clock-gated converter (clock controller
// driving the YCrCb-to-RGB block) against the same converter on the free
// running clock.
//
// A pixel stream with runs of identical pixels, random pixels and long
// constant stretches is applied at the 27 MHz clock (37 ns period). The
// ungated reference converter sees the same samples one clock later, so
// the gated converter must match it on every cycle after reset. The test
// also checks that the gate stays shut for unchanged input and open for
// changed input, and counts the gated edges over the run to report the
// average gated clock frequency (edges / time) against the system clock.
module tb_clock_controller;
  import vz_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [9:0] y_in, cr_in, cb_in;
  logic [9:0] y_prev, cr_prev, cb_prev;
  logic [9:0] y_d, cr_d, cb_d;
  logic gclk, clk_en;
  logic [7:0] r, g, b, r_ref, g_ref, b_ref;
  int checks = 0, failures = 0;
  int sys_edges = 0, gated_edges = 0;
  int changes = 0;
  logic chk_on = 1'b0;

  clock_controller dut (.clk, .rst, .y_in, .cr_in, .cb_in,
                        .y_prev, .cr_prev, .cb_prev, .gclk, .clk_en);
  ycrcb_to_rgb conv (.clk(gclk), .rst, .y(y_prev), .cr(cr_prev), .cb(cb_prev), .r, .g, .b);

  // reference: ungated converter fed with the input delayed by one clock
  always_ff @(posedge clk) begin
    y_d <= y_in; cr_d <= cr_in; cb_d <= cb_in;
  end
  ycrcb_to_rgb ref_conv (.clk, .rst, .y(y_d), .cr(cr_d), .cb(cb_d), .r(r_ref), .g(g_ref), .b(b_ref));

  always #18.5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) sys_edges++;
  always @(posedge gclk) if (!rst) gated_edges++;

  // compare gated and reference outputs just edges0 every system edge
  always @(negedge clk) begin
    if (chk_on) begin
      checks++;
      if ({r, g, b} !== {r_ref, g_ref, b_ref}) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t gated %0d/%0d/%0d ref %0d/%0d/%0d", $time, r, g, b, r_ref, g_ref, b_ref);
      end
    end
  end

  logic [29:0] last_pix;

  task automatic drive(input logic [29:0] p);
    @(posedge clk);
    #2;
    if (p != last_pix) changes++;
    last_pix = p;
    {y_in, cr_in, cb_in} = p;
  endtask

  initial begin
    rst = 1'b1;
    {y_in, cr_in, cb_in} = '0;
    last_pix = '0;
    repeat (4) @(posedge clk);
    #2 rst = 1'b0;
    repeat (3) @(posedge clk);
    #2 chk_on = 1'b1;
    // after reset with zero input the gate must be shut
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (clk_en) begin failures++; $display("FAIL gate open for constant input"); end
    // runs of identical pixels, random run lengths
    for (int run = 0; run < 600; run++) begin
      logic [29:0] p;
      int len;
      p = 30'($urandom);
      len = 1 + ($urandom % 12);
      for (int k = 0; k < len; k++) drive(p);
    end
    // changes in one component only
    for (int i = 0; i < 300; i++) begin
      logic [29:0] p;
      p = last_pix;
      case (i % 3)
        0: p[29:20] = 10'($urandom);
        1: p[19:10] = 10'($urandom);
        default: p[9:0] = 10'($urandom);
      endcase
      drive(p);
      drive(p);
    end
    // fully random pixels: gate should be open nearly always
    for (int i = 0; i < 500; i++) drive(30'($urandom));
    // long constant stretch: gate shut after the first change
    drive(30'h1234_5678);
    repeat (2) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (clk_en) begin failures++; $display("FAIL gate open during constant input"); end
    end
    // a single change must open the gate for exactly one edge
    begin
      int edges0;
      edges0 = gated_edges;
      drive(30'h0ABC_DEF0);
      repeat (6) @(posedge clk);
      checks++;
      if (gated_edges - edges0 != 1) begin
        failures++;
        $display("FAIL single change gave %0d gated edges", gated_edges - edges0);
      end
    end
    $display("system edges %0d, gated edges %0d, input changes %0d", sys_edges, gated_edges, changes);
    $display("average gated clock %0.2f MHz for a 27.03 MHz system clock",
             27.03 * real'(gated_edges) / real'(sys_edges));
    // gated edges: one per change plus the one after reset
    checks++;
    if (gated_edges != changes + 1) begin
      failures++;
      $display("FAIL gated edges %0d expected %0d", gated_edges, changes + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
