// sync_fifo: single-clock first-word-fall-through FIFO.
//
// dout always shows the oldest entry while !empty; pop removes it. A push is
// accepted when the FIFO is not full, or when it is full and an entry is
// popped in the same cycle, which lets a caller recirculate a full FIFO
// (pop the head and push it back at the tail) without losing its contents.
// Storage is an array of DEPTH words read asynchronously.
//
// Interface: push/din, pop/dout, full, empty. An internal count of the
// entries held gives full and empty.
// Timing: a pushed word is visible at dout on the next cycle. Pushing an
// unaccepted word or popping an empty FIFO is an error (asserted).
// Reset is synchronous and empties the FIFO.
module sync_fifo #(
  parameter int W     = 24,
  parameter int DEPTH = 16,
  parameter int CNT_W = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic [W-1:0]     din,
  input  logic             pop,
  output logic [W-1:0]     dout,
  output logic             full,
  output logic             empty
);

  logic [CNT_W-1:0] count;

  localparam int P_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]   mem [DEPTH];
  logic [P_W-1:0] wp, rp;

  function automatic logic [P_W-1:0] inc(input logic [P_W-1:0] p);
    return (p == P_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full  = (count == CNT_W'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + CNT_W'(push) - CNT_W'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty);

endmodule
