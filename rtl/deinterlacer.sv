// deinterlacer: weave deinterlacing of the two PAL fields into one frame.
//
// An interlaced frame is sent as two fields; field 0 carries the even frame
// lines and field 1 the odd ones. The block gives each incoming RGB pixel
// its place in the progressive frame: frame line = 2 * line-in-field +
// field, and the pixel column x counted from the first pixel of the line.
// Lines that fall outside FRAME_LINES and pixels past LINE_PIX are
// dropped. Writing both fields into one frame store at these positions
// rebuilds the progressive frame ("weave"). The design names the
// deinterlacer only; weave is the simplest method and this block's choice.
//
// Interface: p_valid/p_first/p_pix from the colour converter (aligned with
// field and line_idx from video_timing). w_* is the pixel with its frame
// position; w_last marks the last pixel of a line. Timing: one clock from p_valid to w_valid.
// Reset is synchronous.
module deinterlacer
  import vz_pkg::*;
#(
  parameter int LINE_PIX    = PAL_ACTIVE_PIX,
  parameter int FRAME_LINES = PAL_FRAME_LINES,
  parameter int X_W         = $clog2(LINE_PIX),
  parameter int Y_W         = $clog2(FRAME_LINES)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           p_valid,
  input  logic           p_first,
  input  rgb_t           p_pix,
  input  logic           field,
  input  logic [Y_W-2:0] line_idx,
  output logic           w_valid,
  output logic [X_W-1:0] w_x,
  output logic [Y_W-1:0] w_line,
  output logic           w_last,
  output rgb_t           w_data
);

  logic [X_W:0]   x_next;     // column of the next pixel
  logic [X_W:0]   x_cur;
  logic [Y_W:0]   fline;
  logic           in_line;    // current line is inside the frame

  assign x_cur = p_first ? '0 : x_next;
  assign fline = {line_idx, 1'b0} + (Y_W+1)'(field);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_next        <= '0;
      in_line       <= 1'b0;
      w_valid       <= 1'b0;
      w_x           <= '0;
      w_line        <= '0;
      w_last        <= 1'b0;
      w_data        <= '0;
    end else begin
      w_valid       <= 1'b0;
      w_last        <= 1'b0;
      if (p_valid) begin
        if (p_first) in_line <= (fline < (Y_W+1)'(FRAME_LINES));
        if ((p_first ? (fline < (Y_W+1)'(FRAME_LINES)) : in_line)
            && x_cur < (X_W+1)'(LINE_PIX)) begin
          w_valid       <= 1'b1;
          w_x           <= X_W'(x_cur);
          w_line        <= Y_W'(fline);
          w_last        <= (x_cur == (X_W+1)'(LINE_PIX - 1));
          w_data        <= p_pix;
        end
        if (x_cur < (X_W+1)'(LINE_PIX)) x_next <= x_cur + 1'b1;
        else                            x_next <= (X_W+1)'(LINE_PIX);
      end
    end
  end

endmodule
