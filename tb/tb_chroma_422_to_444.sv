// tb_chroma_422_to_444: checks the 4:2:2 to 4:4:4 conversion.
//
// Lines of random Cb Y Cr Y samples are applied with gaps between samples.
// For each sample quad Cb0 Y0 Cr0 Y1 the block must emit (Y0, Cr0, Cb0)
// and then (Y1, Cr0, Cb0), the first pixel of a line flagged, and hold the
// last pixel value while no new pixel is emitted.
module tb_chroma_422_to_444;
  import vz_pkg::*;

  localparam int PIX = 16;   // pixels per line

  logic clk = 1'b0;
  logic rst;
  logic s_valid, s_first, p_valid, p_first;
  logic [9:0] s_data;
  phase422_t s_phase;
  ycc_t p_pix;
  int checks = 0, failures = 0;

  chroma_422_to_444 dut (.clk, .rst, .s_valid, .s_data, .s_phase, .s_first,
                         .p_valid, .p_first, .p_pix);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ycc_t exp_q [$];
  logic first_q [$];
  ycc_t last_pix;
  int   npix = 0;

  always @(posedge clk) if (!rst) begin
    if (p_valid) begin
      ycc_t e; logic ef;
      checks++;
      e = exp_q.pop_front();
      ef = first_q.pop_front();
      if (p_pix !== e || p_first !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL pixel %0d got %h/%0d exp %h/%0d", npix, p_pix, p_first, e, ef);
      end
      last_pix = p_pix;
      npix++;
    end else if (npix > 0) begin
      checks++;
      if (p_pix !== last_pix) begin failures++; $display("FAIL pixel not held"); end
    end
  end

  task automatic put(input logic [9:0] d, input phase422_t ph, input logic first);
    // inputs change on the falling edge, away from the sampling edge
    s_valid = 1'b1; s_data = d; s_phase = ph; s_first = first;
    @(negedge clk);
    s_valid = 1'b0; s_first = 1'b0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; s_valid = 1'b0; s_data = '0; s_phase = PH_CB; s_first = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int l = 0; l < 20; l++)
      for (int k = 0; k < PIX / 2; k++) begin
        logic [9:0] cb, y0, cr, y1;
        cb = 10'($urandom); y0 = 10'($urandom); cr = 10'($urandom); y1 = 10'($urandom);
        exp_q.push_back('{y: y0, cr: cr, cb: cb}); first_q.push_back(k == 0);
        exp_q.push_back('{y: y1, cr: cr, cb: cb}); first_q.push_back(1'b0);
        put(cb, PH_CB, k == 0);
        put(y0, PH_Y0, 1'b0);
        put(cr, PH_CR, 1'b0);
        put(y1, PH_Y1, 1'b0);
      end
    repeat (5) @(posedge clk);
    checks++;
    if (npix != 20 * PIX || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d pixels", npix);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
