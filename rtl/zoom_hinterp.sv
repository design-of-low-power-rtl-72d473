// zoom_hinterp: horizontal interpolator of the zoom-in core.
//
// Reads the pixels of a line two at a time from its source FIFO and writes
// three to its destination FIFO: the first pixel, a new pixel that is the
// per-component mean of the two (rounded half up), then the second pixel.
// A line of 2K pixels therefore becomes a line of 3K pixels ("each two
// pixels of the same line contribute to the creation of a new pixel").
// A three-state sequencer (first, second, copy) drives the FIFOs.
//
// Interface: src_empty/src_pop/src_data face the source FIFO, dst_ok (room
// for one word)/dst_push/dst_data the destination FIFO.
// Timing: three clocks per pixel pair when both FIFOs allow it.
// Reset is synchronous.
module zoom_hinterp #(
  parameter int NCH  = 3,
  parameter int CH_W = 8,
  parameter int W    = NCH * CH_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         src_empty,
  output logic         src_pop,
  input  logic [W-1:0] src_data,
  input  logic         dst_ok,
  output logic         dst_push,
  output logic [W-1:0] dst_data
);

  typedef enum logic [1:0] {S_FIRST, S_SECOND, S_COPY} hstate_t;

  hstate_t      st;
  logic [W-1:0] hold;

  // Mean of two pixels, component by component
  function automatic logic [W-1:0] mean2(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] m;
    for (int c = 0; c < NCH; c++)
      m[c*CH_W +: CH_W] = CH_W'(({1'b0, a[c*CH_W +: CH_W]} + {1'b0, b[c*CH_W +: CH_W]} + 1'b1) >> 1);
    return m;
  endfunction

  always_comb begin
    src_pop  = 1'b0;
    dst_push = 1'b0;
    dst_data = src_data;
    unique case (st)
      S_FIRST: begin
        src_pop  = dst_ok && !src_empty;
        dst_push = src_pop;
        dst_data = src_data;
      end
      S_SECOND: begin
        src_pop  = dst_ok && !src_empty;
        dst_push = src_pop;
        dst_data = mean2(hold, src_data);
      end
      S_COPY: begin
        dst_push = dst_ok;
        dst_data = hold;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= S_FIRST;
      hold <= '0;
    end else begin
      unique case (st)
        S_FIRST:  if (src_pop)  begin hold <= src_data; st <= S_SECOND; end
        S_SECOND: if (src_pop)  begin hold <= src_data; st <= S_COPY;   end
        S_COPY:   if (dst_push) st <= S_FIRST;
        default:  st <= S_FIRST;
      endcase
    end
  end

endmodule
