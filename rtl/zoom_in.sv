// zoom_in: bilinear video zoom-in core, factor 3/2 in each direction.
//
// Pixels of the region of interest arrive line by line, LINE_W per line.
// Every 2x2 block of input pixels becomes a 3x3 block of output pixels: a
// new pixel between two neighbours of a line, a new line between two lines,
// each new value the mean of the two it lies between (bilinear
// interpolation at the midpoint; the centre pixel is the mean of the two
// horizontally interpolated lines). An ROI of LINE_W x H becomes
// 3*LINE_W/2 x 3*H/2 (480 x 384 fills a 720 x 576 PAL frame).
//
// Structure, as in the zoom-in datapath it implements:
//   input FIFO -> line demultiplexer -> FIFO1 (line n) / FIFO2 (line n+1)
//   FIFO1 -> horizontal interpolator -> FIFO3 (line n with new pixels)
//   FIFO2 -> horizontal interpolator -> FIFO4 (line n+1 with new pixels)
//   FIFO3 + FIFO4 -> vertical interpolator -> FIFO5 (new line)
//   FIFO3 / FIFO5 / FIFO4 -> output multiplexer
// An FSM sequences the output: once FIFO3 and FIFO4 each hold a whole
// widened line it sends line n from FIFO3 while the vertical interpolator
// fills FIFO5 and FIFO4 recirculates (pop and push back) so line n+1 is kept;
// then it sends the new line from FIFO5, then line n+1 from FIFO4. Lines are
// taken in disjoint pairs (n, n+1), (n+2, n+3), ... The FIFO layout, pairing
// and FSM follow the design; the 3/2 factor is read from its 2x2 -> 3x3
// illustration; FIFO depths, mean rounding (half up) and the handshakes are
// this implementation's choices. All NCH components (RGB, or Y/Cr/Cb) go
// through the same datapath side by side.
//
// Interface: in_valid/in_ready/in_data (LINE_W must be even, and the number
// of lines per ROI even); out_valid/out_ready/out_data with out_eol on the
// last pixel of each output line and out_kind telling which of the three
// lines of a pair it belongs to.
// Timing: the three output lines of a pair (3 * 3*LINE_W/2 pixels) leave
// back to back at one pixel per clock while out_ready is high.
// Reset is synchronous.
module zoom_in #(
  parameter int NCH      = 3,
  parameter int CH_W     = 8,
  parameter int LINE_W   = 480,
  parameter int IN_DEPTH = 16,
  parameter int W        = NCH * CH_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         out_eol,
  output logic [1:0]   out_kind
);

  localparam int OUT_W  = 3 * LINE_W / 2;      // widened line length
  localparam int XI_W   = $clog2(LINE_W);
  localparam int XO_W   = $clog2(OUT_W);

  typedef enum logic [1:0] {
    Z_IDLE,     // wait for two widened lines
    Z_LINE_N,   // send line n, build the new line
    Z_NEW,      // send the new line
    Z_LINE_N1   // send line n+1
  } zstate_t;

  function automatic logic [W-1:0] mean2(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W-1:0] m;
    for (int c = 0; c < NCH; c++)
      m[c*CH_W +: CH_W] = CH_W'(({1'b0, a[c*CH_W +: CH_W]} + {1'b0, b[c*CH_W +: CH_W]} + 1'b1) >> 1);
    return m;
  endfunction

  // FIFO ports
  logic         f0_push, f0_pop, f0_full, f0_empty;
  logic [W-1:0] f0_dout;
  logic         f1_push, f1_pop, f1_full, f1_empty;
  logic [W-1:0] f1_dout;
  logic         f2_push, f2_pop, f2_full, f2_empty;
  logic [W-1:0] f2_dout;
  logic         f3_push, f3_pop, f3_full, f3_empty;
  logic [W-1:0] f3_din, f3_dout;
  logic         f4_push, f4_pop, f4_full, f4_empty;
  logic [W-1:0] f4_din, f4_dout;
  logic         f5_push, f5_pop, f5_full, f5_empty;
  logic [W-1:0] f5_din, f5_dout;
  logic         h2_push;
  logic [W-1:0] h2_data;

  // ---------------- input FIFO ----------------
  assign in_ready = !f0_full;
  assign f0_push  = in_valid && in_ready;

  sync_fifo #(.W(W), .DEPTH(IN_DEPTH)) u_fifo_in (
    .clk, .rst, .push(f0_push), .din(in_data), .pop(f0_pop), .dout(f0_dout),
    .full(f0_full), .empty(f0_empty));

  // ---------------- line demultiplexer ----------------
  logic            dmx_sel;   // 0: FIFO1 (line n), 1: FIFO2 (line n+1)
  logic [XI_W-1:0] dmx_x;

  assign f0_pop  = !f0_empty && (dmx_sel ? !f2_full : !f1_full);
  assign f1_push = f0_pop && !dmx_sel;
  assign f2_push = f0_pop &&  dmx_sel;

  always_ff @(posedge clk) begin
    if (rst) begin
      dmx_sel <= 1'b0;
      dmx_x   <= '0;
    end else if (f0_pop) begin
      if (dmx_x == XI_W'(LINE_W - 1)) begin
        dmx_x   <= '0;
        dmx_sel <= !dmx_sel;
      end else begin
        dmx_x <= dmx_x + 1'b1;
      end
    end
  end

  sync_fifo #(.W(W), .DEPTH(LINE_W)) u_fifo1 (
    .clk, .rst, .push(f1_push), .din(f0_dout), .pop(f1_pop), .dout(f1_dout),
    .full(f1_full), .empty(f1_empty));

  sync_fifo #(.W(W), .DEPTH(LINE_W)) u_fifo2 (
    .clk, .rst, .push(f2_push), .din(f0_dout), .pop(f2_pop), .dout(f2_dout),
    .full(f2_full), .empty(f2_empty));

  // ---------------- horizontal interpolators ----------------
  zstate_t st;

  zoom_hinterp #(.NCH(NCH), .CH_W(CH_W)) u_hint1 (
    .clk, .rst,
    .src_empty(f1_empty), .src_pop(f1_pop), .src_data(f1_dout),
    .dst_ok(!f3_full), .dst_push(f3_push), .dst_data(f3_din));

  // FIFO4's write port belongs to the recirculation while line n is sent
  zoom_hinterp #(.NCH(NCH), .CH_W(CH_W)) u_hint2 (
    .clk, .rst,
    .src_empty(f2_empty), .src_pop(f2_pop), .src_data(f2_dout),
    .dst_ok(!f4_full && st != Z_LINE_N), .dst_push(h2_push), .dst_data(h2_data));

  sync_fifo #(.W(W), .DEPTH(OUT_W)) u_fifo3 (
    .clk, .rst, .push(f3_push), .din(f3_din), .pop(f3_pop), .dout(f3_dout),
    .full(f3_full), .empty(f3_empty));

  sync_fifo #(.W(W), .DEPTH(OUT_W)) u_fifo4 (
    .clk, .rst, .push(f4_push), .din(f4_din), .pop(f4_pop), .dout(f4_dout),
    .full(f4_full), .empty(f4_empty));

  // ---------------- vertical interpolator ----------------
  sync_fifo #(.W(W), .DEPTH(OUT_W)) u_fifo5 (
    .clk, .rst, .push(f5_push), .din(f5_din), .pop(f5_pop), .dout(f5_dout),
    .full(f5_full), .empty(f5_empty));

  // ---------------- output FSM and multiplexer ----------------
  logic            advance;
  logic [XO_W-1:0] ox;
  logic            last_px;

  assign advance = !out_valid || out_ready;
  assign last_px = (ox == XO_W'(OUT_W - 1));

  always_comb begin
    f3_pop  = 1'b0;
    f4_pop  = 1'b0;
    f5_pop  = 1'b0;
    f5_push = 1'b0;
    f5_din  = mean2(f3_dout, f4_dout);
    f4_push = h2_push;
    f4_din  = h2_data;
    if (advance) begin
      unique case (st)
        Z_LINE_N: begin
          f3_pop  = 1'b1;
          f5_push = 1'b1;
          f4_pop  = 1'b1;
          f4_push = 1'b1;       // recirculate line n+1
          f4_din  = f4_dout;
        end
        Z_NEW:     f5_pop = 1'b1;
        Z_LINE_N1: f4_pop = 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= Z_IDLE;
      ox        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_eol   <= 1'b0;
      out_kind  <= '0;
    end else begin
      if (advance) begin
        out_valid <= (st != Z_IDLE);
        out_eol   <= last_px;
        unique case (st)
          Z_IDLE:    begin out_kind <= 2'd0; out_data <= f3_dout; end
          Z_LINE_N:  begin out_kind <= 2'd0; out_data <= f3_dout; end
          Z_NEW:     begin out_kind <= 2'd1; out_data <= f5_dout; end
          Z_LINE_N1: begin out_kind <= 2'd2; out_data <= f4_dout; end
          default: ;
        endcase
      end
      unique case (st)
        Z_IDLE: if (f3_full && f4_full) begin
          st <= Z_LINE_N;
          ox <= '0;
        end
        Z_LINE_N, Z_NEW, Z_LINE_N1: if (advance) begin
          if (last_px) begin
            ox <= '0;
            st <= (st == Z_LINE_N) ? Z_NEW : (st == Z_NEW) ? Z_LINE_N1 : Z_IDLE;
          end else begin
            ox <= ox + 1'b1;
          end
        end
        default: st <= Z_IDLE;
      endcase
    end
  end

  a_new_line_room: assert property (@(posedge clk) disable iff (rst)
    (st == Z_IDLE && f3_full && f4_full) |-> f5_empty);

  // The output FSM only starts a pair with two whole widened lines, so the
  // FIFOs it reads never run dry and FIFO5 never overflows while it sends.
  a_no_underflow: assert property (@(posedge clk) disable iff (rst)
    advance |-> !((st == Z_LINE_N && (f3_empty || f4_empty)) ||
                  (st == Z_NEW && f5_empty) || (st == Z_LINE_N1 && f4_empty)));
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    f5_push |-> !f5_full);

endmodule
