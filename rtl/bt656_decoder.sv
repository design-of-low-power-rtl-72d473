// bt656_decoder: line/field decoder for a CCIR 601/656 (ITU-R BT.656)
// 4:2:2 sample stream, as delivered by the video decoder chip at 27 MHz.
//
// The stream carries, per line, an end-of-active-video (EAV) code, the
// horizontal blanking, a start-of-active-video (SAV) code and ACTIVE_SAMPLES
// multiplexed samples Cb Y Cr Y ... Each timing reference code is the word
// sequence 3FF 000 000 XY (10-bit levels); XY = 1 F V H P3 P2 P1 P0 0 0
// carries the field bit F, the vertical-blanking bit V, H (1 = EAV,
// 0 = SAV) and four protection bits. The decoder finds the preamble, latches
// F/V/H, flags an XY word whose protection bits are wrong, and after an SAV
// of a line with V = 0 passes the ACTIVE_SAMPLES following words on as
// active samples with their position in the Cb Y Cr Y multiplex. The code
// format and PAL line length come from BT.656; the design only names the
// decoder and its role of tracking H/V sync.
//
// Interface: din is one sample per clk. Outputs are registered.
//   trs      : one-clock strobe when an XY word was decoded (f, v, h valid)
//   trs_err  : with trs, the protection bits did not match F/V/H
//   s_valid  : s_data is an active sample, s_phase its multiplex position,
//              s_first marks the first sample (Cb) of the line
// Timing: each output lags din by one clock. Reset is synchronous.
module bt656_decoder
  import vz_pkg::*;
#(
  parameter int W              = SAMPLE_W,
  parameter int ACTIVE_SAMPLES = 2 * PAL_ACTIVE_PIX
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] din,
  output logic         trs,
  output logic         trs_err,
  output logic         f,
  output logic         v,
  output logic         h,
  output logic         s_valid,
  output logic [W-1:0] s_data,
  output phase422_t    s_phase,
  output logic         s_first
);

  localparam logic [W-1:0] ALL1 = '1;
  localparam int CNT_W = $clog2(ACTIVE_SAMPLES + 1);

  logic [W-1:0]     d1, d2, d3;      // previous three words
  logic             active;          // inside the active samples of a line
  logic [CNT_W-1:0] cnt;             // active samples still to come
  logic [1:0]       ph;
  logic             is_xy;
  logic             xf, xv, xh;
  logic [3:0]       prot_exp;

  assign is_xy    = (d3 == ALL1) && (d2 == '0) && (d1 == '0);
  assign xf       = din[W-2];
  assign xv       = din[W-3];
  assign xh       = din[W-4];
  assign prot_exp = {xv ^ xh, xf ^ xh, xf ^ xv, xf ^ xv ^ xh};

  always_ff @(posedge clk) begin
    if (rst) begin
      d1 <= '0; d2 <= '0; d3 <= '0;
      active  <= 1'b0;
      cnt     <= '0;
      ph      <= '0;
      trs     <= 1'b0;
      trs_err <= 1'b0;
      f <= 1'b0; v <= 1'b1; h <= 1'b1;
      s_valid <= 1'b0;
      s_data  <= '0;
      s_phase <= PH_CB;
      s_first <= 1'b0;
    end else begin
      d1 <= din; d2 <= d1; d3 <= d2;
      trs     <= 1'b0;
      trs_err <= 1'b0;
      s_valid <= 1'b0;
      s_first <= 1'b0;
      if (is_xy) begin
        trs     <= 1'b1;
        trs_err <= !din[W-1] || (din[W-5 -: 4] != prot_exp);
        f <= xf; v <= xv; h <= xh;
        // SAV of an active line starts the sample window; EAV closes it
        active  <= !xh && !xv;
        cnt     <= CNT_W'(ACTIVE_SAMPLES);
        ph      <= '0;
      end else if (active) begin
        s_valid <= 1'b1;
        s_data  <= din;
        s_phase <= phase422_t'(ph);
        s_first <= (cnt == CNT_W'(ACTIVE_SAMPLES));
        ph      <= ph + 2'd1;
        cnt     <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) active <= 1'b0;
      end
    end
  end

endmodule
