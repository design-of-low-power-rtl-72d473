// chroma_422_to_444: 4:2:2 to 4:4:4 format conversion.
//
// Active samples arrive in the multiplex order Cb0 Y0 Cr0 Y1 Cb2 Y2 Cr2 Y3 ...
// Each Cb/Cr pair is shared by two luma samples. The block collects Cb,
// then Y0, then Cr, and emits a full pixel (Y0, Cr, Cb) when Cr arrives and
// a second pixel (Y1, Cr, Cb) when Y1 arrives: chroma is repeated for the
// second luma sample (sample-and-hold upsampling), the simplest form of the
// conversion; the design names the conversion without fixing the filter.
//
// Interface: s_valid/s_data/s_phase/s_first from the line decoder.
// p_valid strobes a pixel, p_first marks the first pixel of a line; p_pix
// holds its value until the next pixel, so identical neighbours leave the
// downstream clock controller's inputs unchanged.
// Timing: a pixel appears one clock after the sample that completes it.
// Reset is synchronous.
module chroma_422_to_444
  import vz_pkg::*;
#(
  parameter int W = SAMPLE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         s_valid,
  input  logic [W-1:0] s_data,
  input  phase422_t    s_phase,
  input  logic         s_first,
  output logic         p_valid,
  output logic         p_first,
  output ycc_t         p_pix
);

  logic [W-1:0] cb_q, y0_q, cr_q;
  logic         first_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cb_q <= '0; y0_q <= '0; cr_q <= '0;
      first_q <= 1'b0;
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_pix   <= '0;
    end else begin
      p_valid <= 1'b0;
      p_first <= 1'b0;
      if (s_valid) begin
        unique case (s_phase)
          PH_CB: begin
            cb_q    <= s_data;
            first_q <= s_first;
          end
          PH_Y0: y0_q <= s_data;
          PH_CR: begin
            cr_q    <= s_data;
            p_valid <= 1'b1;
            p_first <= first_q;
            p_pix   <= '{y: y0_q, cr: s_data, cb: cb_q};
          end
          PH_Y1: begin
            p_valid <= 1'b1;
            p_pix   <= '{y: s_data, cr: cr_q, cb: cb_q};
          end
        endcase
      end
    end
  end

endmodule
