// tb_ycrcb_to_rgb: checks the colour converter against the conversion
// equations evaluated in floating point.
//
// Random and corner Y/Cr/Cb samples (10-bit) are applied one per clock; one
// clock later R/G/B must equal round(clamp(eq)) within one LSB, where eq is
//   R = 1.164(Y'-16) + 1.596(Cr'-128), G = 1.164(Y'-16) - 0.813(Cr'-128)
//   - 0.391(Cb'-128), B = 1.164(Y'-16) + 2.018(Cb'-128), Y' = Y/4 etc.
// Reset must clear the outputs. The one-clock latency is checked by
// comparing each output with the sample of the previous clock.
module tb_ycrcb_to_rgb;
  import vz_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [9:0] y, cr, cb;
  logic [7:0] r, g, b;
  int checks = 0, failures = 0;

  ycrcb_to_rgb dut (.clk, .rst, .y, .cr, .cb, .r, .g, .b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_chan(input real v);
    int i;
    i = $rtoi(v + 0.5 + 1000.0) - 1000;   // round half up, also below zero
    if (i < 0) i = 0;
    if (i > 255) i = 255;
    return i;
  endfunction

  task automatic check_chan(input string nm, input int got, input int exp);
    checks++;
    if (got > exp + 1 || got < exp - 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", nm, got, exp);
    end
  endtask

  task automatic apply_and_check(input logic [9:0] yy, input logic [9:0] rr, input logic [9:0] bb);
    real yf, crf, cbf;
    y = yy; cr = rr; cb = bb;
    @(posedge clk);
    #1;
    yf  = real'(yy) / 4.0 - 16.0;
    crf = real'(rr) / 4.0 - 128.0;
    cbf = real'(bb) / 4.0 - 128.0;
    check_chan("R", int'(r), ref_chan(1.164 * yf + 1.596 * crf));
    check_chan("G", int'(g), ref_chan(1.164 * yf - 0.813 * crf - 0.391 * cbf));
    check_chan("B", int'(b), ref_chan(1.164 * yf + 2.018 * cbf));
  endtask

  initial begin
    rst = 1'b1; y = 10'd700; cr = 10'd300; cb = 10'd800;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (r !== 0 || g !== 0 || b !== 0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    // black, white, saturated corners
    apply_and_check(10'd64,  10'd512, 10'd512);
    checks++; if (r !== 0 || g !== 0 || b !== 0) begin failures++; $display("FAIL black"); end
    apply_and_check(10'd940, 10'd512, 10'd512);
    checks++; if (r !== 255 || g !== 255 || b !== 255) begin failures++; $display("FAIL white"); end
    apply_and_check(10'd0,    10'd0,    10'd0);
    apply_and_check(10'd1023, 10'd1023, 10'd1023);
    apply_and_check(10'd1023, 10'd0,    10'd1023);
    apply_and_check(10'd300,  10'd960,  10'd64);
    for (int i = 0; i < 5000; i++)
      apply_and_check(10'($urandom), 10'($urandom), 10'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
