// tb_video_zoom_top: end-to-end test of the whole design at its default
// (PAL) size.
//
// Video side: a BT.656 stream at 27 MHz carries one full interlaced PAL
// frame (2 fields x 288 active lines x 720 pixels, 1728 words per line)
// of a test picture made of flat colour blocks with a noisy strip on the
// right. Every pixel that leaves the frame-store write port (100 MHz) is
// compared with the conversion equations applied to the generated Y/Cr/Cb
// (one LSB tolerance), at its weave position; all 576 frame lines must
// arrive exactly once. One timing code is sent with a wrong protection
// bit. Then a short extra field is sent with the write port held off, so
// the double line buffer overflows and drops lines.
// Zoom side, in parallel: a 480 x 384 region of interest is streamed into
// the zoom-in core and the 720 x 576 result is compared with a reference
// model; the output is stalled at random.
// Each mechanism is counted and must occur: gated and open converter
// clock cycles, write-port back-pressure, line-buffer overflow, protection
// error, new frame, zoom input and output stalls and the three zoom line
// kinds.
module tb_video_zoom_top;
  import vz_pkg::*;

  localparam int ACT_PIX = 720, FIELD_LINES = 288, HBLANK = 280;
  localparam int ZW = 480, ZH = 384, ZOW = 720;

  logic clk_vid = 1'b0, clk_sys = 1'b0;
  logic rst_vid, rst_sys;
  logic [9:0] vid_data;
  logic vid_trs_err, vid_field, vid_vblank, vid_new_line, vid_new_field, vid_new_frame;
  logic conv_clk_en, lb_overflow;
  logic mem_wr_valid, mem_wr_ready, mem_wr_last;
  rgb_t mem_wr_data;
  logic [9:0] mem_wr_x, mem_wr_line;
  logic zin_valid, zin_ready, zout_valid, zout_ready, zout_eol;
  rgb_t zin_data, zout_data;
  logic [1:0] zout_kind;

  video_zoom_top dut (.*);

  always #18.518 clk_vid = ~clk_vid;   // 27 MHz
  always #5      clk_sys = ~clk_sys;   // 100 MHz

  int checks = 0, failures = 0;

  initial begin
    #120ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ---------------- test picture ----------------
  function automatic int hash(input int a, input int b);
    int h;
    h = a * 73856093 ^ b * 19349663;
    h = h ^ (h >>> 13);
    return h & 32'h7fff_ffff;
  endfunction

  // Y, Cr, Cb of pixel x of field line l; chroma is shared by pixel pairs
  function automatic void picture(input int fld, input int l, input int x,
                                  output int y, output int cr, output int cb);
    int blk, cx;
    cx  = x & ~1;
    blk = ((cx >> 5) + (l >> 4) + fld) % 8;
    if (x >= 640) begin
      y  = 64 + hash(x, l + 1000 * fld) % 877;
      cb = 64 + hash(cx, l) % 897;
      cr = 64 + hash(cx + 7, l) % 897;
    end else begin
      y  = 100 + blk * 100;
      cb = 512 + (blk - 4) * 90;
      cr = 512 - (blk - 4) * 70;
    end
  endfunction

  function automatic int ref_chan(input real v);
    int i;
    i = $rtoi(v + 0.5 + 1000.0) - 1000;
    if (i < 0) i = 0;
    if (i > 255) i = 255;
    return i;
  endfunction

  function automatic logic close(input logic [7:0] got, input int exp);
    return int'(got) <= exp + 1 && int'(got) >= exp - 1;
  endfunction

  // ---------------- BT.656 source ----------------
  function automatic logic [9:0] xy(input logic ff, input logic vv, input logic hh);
    return {1'b1, ff, vv, hh, vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh, 2'b00};
  endfunction

  task automatic put(input logic [9:0] w);
    vid_data = w;
    @(negedge clk_vid);
  endtask

  task automatic code(input logic ff, input logic vv, input logic hh, input logic corrupt);
    put(10'h3FF); put(10'h000); put(10'h000);
    put(xy(ff, vv, hh) ^ (corrupt ? 10'h008 : 10'h000));
  endtask

  task automatic bt656_line(input int fld, input logic vv, input int l, input logic corrupt);
    code(fld[0], vv, 1'b1, 1'b0);
    for (int i = 0; i < HBLANK; i++) put(i[0] ? 10'h040 : 10'h200);
    code(fld[0], vv, 1'b0, corrupt);
    for (int x = 0; x < ACT_PIX; x += 2) begin
      int y0, y1, cr, cb;
      if (vv) begin
        put(10'h200); put(10'h040); put(10'h200); put(10'h040);
      end else begin
        picture(fld, l, x, y0, cr, cb);
        picture(fld, l, x + 1, y1, cr, cb);
        put(10'(cb)); put(10'(y0)); put(10'(cr)); put(10'(y1));
      end
    end
  endtask

  task automatic bt656_field(input int fld, input int lines, input logic corrupt_one);
    for (int i = 0; i < 4; i++) bt656_line(fld, 1'b1, 0, 1'b0);
    for (int l = 0; l < lines; l++) bt656_line(fld, 1'b0, l, corrupt_one && l == 100);
    for (int i = 0; i < 2; i++) bt656_line(fld, 1'b1, 0, 1'b0);
  endtask

  // ---------------- write-port monitor ----------------
  logic     got_line [576];
  int       lines_got = 0, px_got = 0;
  int       exp_x = 0;
  logic     phase2 = 1'b0;
  logic     hold_off = 1'b0;
  int       n_wr_stall = 0, n_overflow = 0, n_trs_err = 0, n_new_frame = 0;
  int       n_gate_open = 0, n_gate_shut = 0;
  int       phase2_lines = 0;

  always @(negedge clk_sys) mem_wr_ready = !hold_off && ($urandom % 100 < 85);

  always @(posedge clk_sys) if (!rst_sys) begin
    if (mem_wr_valid && !mem_wr_ready) n_wr_stall++;
    if (mem_wr_valid && mem_wr_ready) begin
      int fl, fld, l, x, y, cr, cb;
      real yf, crf, cbf;
      fl = int'(mem_wr_line); x = int'(mem_wr_x);
      fld = fl & 1; l = fl >> 1;
      checks++;
      if (x != exp_x) fail($sformatf("column %0d, expected %0d (line %0d)", x, exp_x, fl));
      if (mem_wr_last !== (x == ACT_PIX - 1)) fail("last flag");
      picture(fld, l, x, y, cr, cb);
      yf = real'(y) / 4.0 - 16.0; crf = real'(cr) / 4.0 - 128.0; cbf = real'(cb) / 4.0 - 128.0;
      if (!close(mem_wr_data.r, ref_chan(1.164 * yf + 1.596 * crf)) ||
          !close(mem_wr_data.g, ref_chan(1.164 * yf - 0.813 * crf - 0.391 * cbf)) ||
          !close(mem_wr_data.b, ref_chan(1.164 * yf + 2.018 * cbf)))
        fail($sformatf("pixel line %0d x %0d = %h", fl, x, mem_wr_data));
      px_got++;
      exp_x = (x == ACT_PIX - 1) ? 0 : x + 1;
      if (mem_wr_last) begin
        if (phase2) phase2_lines++;
        else begin
          if (got_line[fl]) fail($sformatf("frame line %0d twice", fl));
          got_line[fl] = 1'b1;
          lines_got++;
        end
      end
    end
  end

  always @(posedge clk_vid) if (!rst_vid) begin
    if (lb_overflow)   n_overflow++;
    if (vid_trs_err)   n_trs_err++;
    if (vid_new_frame) n_new_frame++;
    if (conv_clk_en) n_gate_open++; else n_gate_shut++;
  end

  // ---------------- zoom-in ----------------
  function automatic rgb_t zsrc(input int x, input int y);
    return rgb_t'({8'(x * 3 + y), 8'(x ^ (y * 5)), 8'(x + y * 7)});
  endfunction

  function automatic rgb_t mean2(input rgb_t a, input rgb_t b);
    rgb_t m;
    m.r = 8'((int'(a.r) + int'(b.r) + 1) / 2);
    m.g = 8'((int'(a.g) + int'(b.g) + 1) / 2);
    m.b = 8'((int'(a.b) + int'(b.b) + 1) / 2);
    return m;
  endfunction

  function automatic rgb_t widened(input int ox, input int y);
    case (ox % 3)
      0:       return zsrc(2 * (ox / 3), y);
      2:       return zsrc(2 * (ox / 3) + 1, y);
      default: return mean2(zsrc(2 * (ox / 3), y), zsrc(2 * (ox / 3) + 1, y));
    endcase
  endfunction

  int  zin_idx = 0, zout_idx = 0;
  int  n_zin_stall = 0, n_zout_stall = 0;
  int  n_kind [3] = '{0, 0, 0};
  logic zoom_on = 1'b0;

  always @(posedge clk_sys) begin
    int idx;
    idx = zin_idx;
    if (zin_valid && zin_ready) idx++;
    if (zin_valid && !zin_ready) n_zin_stall++;
    zin_idx <= idx;
    if (zoom_on && idx < ZW * ZH && ($urandom % 100 < 90)) begin
      zin_valid <= 1'b1;
      zin_data  <= zsrc(idx % ZW, idx / ZW);
    end else begin
      zin_valid <= 1'b0;
    end
  end

  always @(negedge clk_sys) zout_ready = ($urandom % 100 < 80);

  always @(posedge clk_sys) if (!rst_sys) begin
    if (zout_valid && !zout_ready) n_zout_stall++;
    if (zout_valid && zout_ready) begin
      int pair, k, ox;
      rgb_t e;
      pair = zout_idx / (3 * ZOW);
      k    = (zout_idx / ZOW) % 3;
      ox   = zout_idx % ZOW;
      e = (k == 0) ? widened(ox, 2 * pair) :
          (k == 2) ? widened(ox, 2 * pair + 1) :
                     mean2(widened(ox, 2 * pair), widened(ox, 2 * pair + 1));
      checks++;
      if (zout_data !== e || int'(zout_kind) !== k || zout_eol !== (ox == ZOW - 1))
        fail($sformatf("zoom pixel %0d: %h kind %0d, exp %h kind %0d", zout_idx, zout_data, zout_kind, e, k));
      n_kind[k]++;
      zout_idx++;
    end
  end

  // ---------------- sequence ----------------
  initial begin
    rst_vid = 1'b1; rst_sys = 1'b1; vid_data = 10'h200;
    zin_valid = 1'b0; zin_data = '0;
    foreach (got_line[i]) got_line[i] = 1'b0;
    repeat (4) @(negedge clk_vid);
    rst_vid = 1'b0;
    @(negedge clk_sys);
    rst_sys = 1'b0;
    zoom_on = 1'b1;
    // one full frame: field 0 then field 1
    bt656_field(0, FIELD_LINES, 1'b1);
    bt656_field(1, FIELD_LINES, 1'b0);
    repeat (100) @(negedge clk_vid);
    checks++;
    if (lines_got != 576 || px_got != 576 * ACT_PIX)
      fail($sformatf("frame: %0d lines, %0d pixels", lines_got, px_got));
    checks++;
    if (n_overflow != 0) fail("overflow while the write port kept up");
    // extra short field with the write port held off
    phase2 = 1'b1;
    hold_off = 1'b1;
    bt656_field(0, 6, 1'b0);
    hold_off = 1'b0;
    repeat (3000) @(negedge clk_vid);
    checks++;
    if (n_overflow != 4 || phase2_lines != 2)
      fail($sformatf("overflow test: %0d overflows, %0d lines kept", n_overflow, phase2_lines));
    // zoom completion
    while (zout_idx < ZOW * ZH * 3 / 2) @(negedge clk_sys);
    checks++;
    if (zin_idx != ZW * ZH) fail("zoom input not consumed");
    // mechanisms
    $display("converter clock: %0d cycles open, %0d shut (%0.1f %% of video clocks gated off)",
             n_gate_open, n_gate_shut, 100.0 * real'(n_gate_shut) / real'(n_gate_open + n_gate_shut));
    $display("write-port stalls %0d, line-buffer overflows %0d, protection errors %0d, new frames %0d",
             n_wr_stall, n_overflow, n_trs_err, n_new_frame);
    $display("zoom: input stalls %0d, output stalls %0d, lines n/new/n+1 pixels %0d/%0d/%0d",
             n_zin_stall, n_zout_stall, n_kind[0], n_kind[1], n_kind[2]);
    checks++; if (n_gate_open == 0 || n_gate_shut == 0) fail("clock gate never open or never shut");
    checks++; if (n_wr_stall == 0) fail("no write-port back-pressure");
    checks++; if (n_trs_err != 1) fail("protection error not seen once");
    checks++; if (n_new_frame != 2) fail("new_frame count");
    checks++; if (n_zin_stall == 0 || n_zout_stall == 0) fail("zoom stalls missing");
    checks++; if (n_kind[0] == 0 || n_kind[1] == 0 || n_kind[2] == 0) fail("zoom line kinds missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
