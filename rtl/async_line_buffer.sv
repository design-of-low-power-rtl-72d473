// async_line_buffer: asynchronous double line buffer between the 27 MHz
// video clock and the 100 MHz system clock.
//
// Two line-sized banks alternate. The video side writes one line into the
// current bank at its pixel columns; when the line's last pixel is written
// it stores the line number with the bank, hands the bank to the system
// side and moves to the other bank. The system side reads a handed-over bank
// out as a pixel stream in column order and gives it back. The hand-over
// uses one toggle flag per bank and per direction, each crossing the clock
// boundary through a two-flip-flop synchroniser; the bank contents and its
// line number are not re-synchronised because they are stable while the
// bank is owned by the reading side. If the video side reaches a bank that
// has not been given back yet, the whole line is dropped and w_overflow
// pulses. The design states that this buffer handles the domain crossing;
// the hand-over protocol is this implementation's choice.
//
// Interface (video side, wclk): w_valid/w_x/w_line/w_last/w_data, pixels
// of a line in column order with w_last on column LINE_PIX-1.
// Interface (system side, rclk): r_valid/r_ready stream of r_data with r_x,
// r_line and r_last; data holds while r_valid && !r_ready.
// Timing: a line becomes readable about three rclk cycles after its last
// pixel is written; once started, a line streams at one pixel per rclk
// while r_ready is high. Resets are synchronous to their own clocks.
module async_line_buffer
  import vz_pkg::*;
#(
  parameter int DATA_W   = PIX_W,
  parameter int LINE_PIX = PAL_ACTIVE_PIX,
  parameter int X_W      = $clog2(LINE_PIX),
  parameter int Y_W      = $clog2(PAL_FRAME_LINES)
) (
  // video clock domain
  input  logic              wclk,
  input  logic              wrst,
  input  logic              w_valid,
  input  logic [X_W-1:0]    w_x,
  input  logic [Y_W-1:0]    w_line,
  input  logic              w_last,
  input  logic [DATA_W-1:0] w_data,
  output logic              w_overflow,
  // system clock domain
  input  logic              rclk,
  input  logic              rrst,
  output logic              r_valid,
  input  logic              r_ready,
  output logic [DATA_W-1:0] r_data,
  output logic [X_W-1:0]    r_x,
  output logic [Y_W-1:0]    r_line,
  output logic              r_last
);

  localparam int DEPTH = 2 * LINE_PIX;
  localparam int A_W   = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [Y_W-1:0]    bank_line [2];

  // system side state
  logic [1:0]     rtog;        // toggled when a bank has been read out
  logic [1:0]     wtog_s1, wtog_s2;
  logic           rb;          // bank being read
  logic [X_W-1:0] rx;          // next column to fetch
  logic           fetch;
  logic           advance;

  // ---------------- video side ----------------
  logic [1:0] wtog;            // toggled when a bank is filled
  logic [1:0] rtog_s1, rtog_s2;
  logic       wb;              // bank being written
  logic       keep_q;          // current line is being kept
  logic       keep;
  logic       wbank_free;

  assign wbank_free = (wtog[wb] == rtog_s2[wb]);
  assign keep       = (w_x == '0) ? wbank_free : keep_q;

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wtog       <= '0;
      rtog_s1    <= '0;
      rtog_s2    <= '0;
      wb         <= 1'b0;
      keep_q     <= 1'b0;
      w_overflow <= 1'b0;
    end else begin
      rtog_s1    <= rtog;
      rtog_s2    <= rtog_s1;
      w_overflow <= 1'b0;
      if (w_valid) begin
        if (w_x == '0) begin
          keep_q     <= wbank_free;
          w_overflow <= !wbank_free;
        end
        if (keep && w_last) begin
          bank_line[wb] <= w_line;
          wtog[wb]      <= !wtog[wb];
          wb            <= !wb;
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (w_valid && keep)
      mem[A_W'(wb ? LINE_PIX : 0) + A_W'(w_x)] <= w_data;
  end

  // ---------------- system side ----------------

  assign advance = !r_valid || r_ready;
  assign fetch   = advance && (wtog_s2[rb] != rtog[rb]);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rtog    <= '0;
      wtog_s1 <= '0;
      wtog_s2 <= '0;
      rb      <= 1'b0;
      rx      <= '0;
      r_valid <= 1'b0;
      r_x     <= '0;
      r_line  <= '0;
      r_last  <= 1'b0;
    end else begin
      wtog_s1 <= wtog;
      wtog_s2 <= wtog_s1;
      if (fetch) begin
        r_valid <= 1'b1;
        r_x     <= rx;
        r_line  <= bank_line[rb];
        r_last  <= (rx == X_W'(LINE_PIX - 1));
        if (rx == X_W'(LINE_PIX - 1)) begin
          // last word is in the output register: give the bank back
          rx       <= '0;
          rtog[rb] <= !rtog[rb];
          rb       <= !rb;
        end else begin
          rx <= rx + 1'b1;
        end
      end else if (advance) begin
        r_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge rclk) begin
    if (fetch)
      r_data <= mem[A_W'(rb ? LINE_PIX : 0) + A_W'(rx)];
  end

endmodule
