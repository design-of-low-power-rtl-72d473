// video_zoom_top: low-power video-in path and zoom-in core.
//
// Video-in path (27 MHz video clock): a CCIR 601/656 4:2:2 stream from the
// video decoder chip is split into timing codes and samples
// (bt656_decoder), tracked for new lines/fields/frames (video_timing),
// upsampled to 4:4:4 (chroma_422_to_444) and converted to RGB
// (ycrcb_to_rgb). The converter is clocked through clock_controller, which
// stops its clock while consecutive pixels are identical: this is the
// power-saving feature of the design. The RGB pixels get their place in the
// progressive frame (deinterlacer) and cross to the 100 MHz system clock in
// an asynchronous double line buffer (async_line_buffer). The mem_wr_*
// stream is the frame-store write port that a multiport memory controller
// would take; frame memory, processor, bus, display controller and DAC are
// outside this module.
//
// Zoom-in core (100 MHz system clock): zoom_in takes a region of interest
// read back from frame memory (zin_*) and returns it enlarged by 3/2 in
// both directions (zout_*), for the display path.
//
// Timing: a pixel reaches the converter output two video clocks after the
// 4:4:4 stage emits it (clock-controller register, then converter);
// p_valid/p_first are delayed by the same two clocks to stay aligned.
// Resets are synchronous, one per clock domain.
module video_zoom_top
  import vz_pkg::*;
#(
  parameter int LINE_PIX    = PAL_ACTIVE_PIX,
  parameter int FRAME_LINES = PAL_FRAME_LINES,
  parameter int ZOOM_LINE_W = 480,
  parameter int X_W         = $clog2(LINE_PIX),
  parameter int Y_W         = $clog2(FRAME_LINES)
) (
  // video clock domain
  input  logic                clk_vid,
  input  logic                rst_vid,
  input  logic [SAMPLE_W-1:0] vid_data,
  output logic                vid_trs_err,
  output logic                vid_field,
  output logic                vid_vblank,
  output logic                vid_new_line,
  output logic                vid_new_field,
  output logic                vid_new_frame,
  output logic                conv_clk_en,
  output logic                lb_overflow,
  // system clock domain
  input  logic                clk_sys,
  input  logic                rst_sys,
  output logic                mem_wr_valid,
  input  logic                mem_wr_ready,
  output rgb_t                mem_wr_data,
  output logic [X_W-1:0]      mem_wr_x,
  output logic [Y_W-1:0]      mem_wr_line,
  output logic                mem_wr_last,
  input  logic                zin_valid,
  output logic                zin_ready,
  input  rgb_t                zin_data,
  output logic                zout_valid,
  input  logic                zout_ready,
  output rgb_t                zout_data,
  output logic                zout_eol,
  output logic [1:0]          zout_kind
);

  // ---------------- line/field decoder ----------------
  logic                trs, trs_f, trs_v, trs_h;
  logic                s_valid, s_first;
  logic [SAMPLE_W-1:0] s_data;
  phase422_t           s_phase;

  bt656_decoder #(.W(SAMPLE_W), .ACTIVE_SAMPLES(2 * LINE_PIX)) u_decoder (
    .clk(clk_vid), .rst(rst_vid), .din(vid_data),
    .trs, .trs_err(vid_trs_err), .f(trs_f), .v(trs_v), .h(trs_h),
    .s_valid, .s_data, .s_phase, .s_first);

  // ---------------- timing generation ----------------
  logic [Y_W-2:0] line_idx;

  video_timing #(.LINE_IDX_W(Y_W - 1)) u_timing (
    .clk(clk_vid), .rst(rst_vid),
    .trs, .f(trs_f), .v(trs_v), .h(trs_h),
    .new_line(vid_new_line), .new_field(vid_new_field), .new_frame(vid_new_frame),
    .field(vid_field), .vblank(vid_vblank), .line_idx);

  // ---------------- 4:2:2 to 4:4:4 ----------------
  logic p_valid, p_first;
  ycc_t p_pix;

  chroma_422_to_444 #(.W(SAMPLE_W)) u_444 (
    .clk(clk_vid), .rst(rst_vid),
    .s_valid, .s_data, .s_phase, .s_first,
    .p_valid, .p_first, .p_pix);

  // ---------------- clock controller + YCrCb to RGB ----------------
  logic [SAMPLE_W-1:0] y_prev, cr_prev, cb_prev;
  logic                conv_clk;
  rgb_t                rgb;

  clock_controller #(.W(SAMPLE_W)) u_clkctl (
    .clk(clk_vid), .rst(rst_vid),
    .y_in(p_pix.y), .cr_in(p_pix.cr), .cb_in(p_pix.cb),
    .y_prev, .cr_prev, .cb_prev,
    .gclk(conv_clk), .clk_en(conv_clk_en));

  ycrcb_to_rgb #(.IN_W(SAMPLE_W), .OUT_W(COLOR_W)) u_conv (
    .clk(conv_clk), .rst(rst_vid),
    .y(y_prev), .cr(cr_prev), .cb(cb_prev),
    .r(rgb.r), .g(rgb.g), .b(rgb.b));

  // pixel strobes follow the two-clock path through controller and converter
  logic [1:0] pv_d, pf_d;

  always_ff @(posedge clk_vid) begin
    if (rst_vid) begin
      pv_d <= '0;
      pf_d <= '0;
    end else begin
      pv_d <= {pv_d[0], p_valid};
      pf_d <= {pf_d[0], p_first};
    end
  end

  // ---------------- deinterlacing ----------------
  logic           w_valid, w_last;
  logic [X_W-1:0] w_x;
  logic [Y_W-1:0] w_line;
  rgb_t           w_data;

  deinterlacer #(.LINE_PIX(LINE_PIX), .FRAME_LINES(FRAME_LINES), .X_W(X_W), .Y_W(Y_W)) u_deint (
    .clk(clk_vid), .rst(rst_vid),
    .p_valid(pv_d[1]), .p_first(pf_d[1]), .p_pix(rgb),
    .field(vid_field), .line_idx,
    .w_valid, .w_x, .w_line, .w_last, .w_data);

  // ---------------- clock-domain crossing ----------------
  async_line_buffer #(.DATA_W(PIX_W), .LINE_PIX(LINE_PIX), .X_W(X_W), .Y_W(Y_W)) u_linebuf (
    .wclk(clk_vid), .wrst(rst_vid),
    .w_valid, .w_x, .w_line, .w_last, .w_data, .w_overflow(lb_overflow),
    .rclk(clk_sys), .rrst(rst_sys),
    .r_valid(mem_wr_valid), .r_ready(mem_wr_ready), .r_data(mem_wr_data),
    .r_x(mem_wr_x), .r_line(mem_wr_line), .r_last(mem_wr_last));

  // ---------------- zoom-in ----------------
  zoom_in #(.NCH(3), .CH_W(COLOR_W), .LINE_W(ZOOM_LINE_W)) u_zoom (
    .clk(clk_sys), .rst(rst_sys),
    .in_valid(zin_valid), .in_ready(zin_ready), .in_data(zin_data),
    .out_valid(zout_valid), .out_ready(zout_ready), .out_data(zout_data),
    .out_eol(zout_eol), .out_kind(zout_kind));

endmodule
