// video_timing: video timing generation from the decoded sync flags.
//
// The line decoder reports every timing reference code with its F (field),
// V (vertical blanking) and H (EAV/SAV) bits. This block keeps track of
// them to mark a new frame and a new line: at each SAV of an active line
// (V = 0) it emits new_line and the index of that line within its field,
// counted from 0 at the first active line after vertical blanking; the
// first active line of a field also raises new_field, and of field F = 0
// new_frame. vblank and field follow the last decoded code. This is the
// simplest logic that tracks HSync/VSync as the design requires; the design
// does not give the insides of its timing generator.
//
// Interface: trs/f/v/h from bt656_decoder. line_idx is valid from new_line
// until the next new_line. Timing: outputs register one clock after trs.
// Reset is synchronous.
module video_timing
  import vz_pkg::*;
#(
  parameter int LINE_IDX_W = $clog2(PAL_FIELD_LINES)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  trs,
  input  logic                  f,
  input  logic                  v,
  input  logic                  h,
  output logic                  new_line,
  output logic                  new_field,
  output logic                  new_frame,
  output logic                  field,
  output logic                  vblank,
  output logic [LINE_IDX_W-1:0] line_idx
);

  logic in_blank;   // no active line seen since the last vertical blanking

  always_ff @(posedge clk) begin
    if (rst) begin
      new_line  <= 1'b0;
      new_field <= 1'b0;
      new_frame <= 1'b0;
      field     <= 1'b0;
      vblank    <= 1'b1;
      line_idx  <= '0;
      in_blank  <= 1'b1;
    end else begin
      new_line  <= 1'b0;
      new_field <= 1'b0;
      new_frame <= 1'b0;
      if (trs) begin
        field  <= f;
        vblank <= v;
        if (v) begin
          in_blank <= 1'b1;
        end else if (!h) begin
          new_line <= 1'b1;
          in_blank <= 1'b0;
          if (in_blank) begin
            line_idx  <= '0;
            new_field <= 1'b1;
            new_frame <= !f;
          end else begin
            line_idx  <= line_idx + 1'b1;
          end
        end
      end
    end
  end

endmodule
