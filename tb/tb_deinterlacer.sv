// tb_deinterlacer: checks the weave placement of field lines.
//
// Lines of both fields are applied with random gaps between pixels, with a
// few extra pixels at the end of some lines and one field line that falls
// outside the frame. Every pixel written must carry column x, frame line
// 2*line_idx + field, its data, and w_last on column LINE_PIX-1; extra
// pixels and out-of-frame lines must produce nothing.
module tb_deinterlacer;
  import vz_pkg::*;

  localparam int LINE_PIX = 12, FRAME_LINES = 10;

  logic clk = 1'b0;
  logic rst, p_valid, p_first, field;
  rgb_t p_pix, w_data;
  logic [3:0] line_idx;
  logic w_valid, w_last;
  logic [3:0] w_x;
  logic [4:0] w_line;
  int checks = 0, failures = 0;

  deinterlacer #(.LINE_PIX(LINE_PIX), .FRAME_LINES(FRAME_LINES), .X_W(4), .Y_W(5)) dut (
    .clk, .rst, .p_valid, .p_first, .p_pix, .field, .line_idx,
    .w_valid, .w_x, .w_line, .w_last, .w_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { rgb_t d; int x; int y; } wr_t;
  wr_t exp_q [$];
  int  nwr = 0;

  always @(posedge clk) if (!rst && w_valid) begin
    wr_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected write");
    end else begin
      e = exp_q.pop_front();
      if (w_data !== e.d || int'(w_x) !== e.x || int'(w_line) !== e.y || w_last !== (e.x == LINE_PIX - 1)) begin
        failures++;
        $display("FAIL write %0d: x %0d line %0d last %0d, exp x %0d line %0d", nwr, w_x, w_line, w_last, e.x, e.y);
      end
    end
    nwr++;
  end

  task automatic send_line(input logic fld, input int li, input int npix);
    field = fld; line_idx = 4'(li);
    for (int x = 0; x < npix; x++) begin
      rgb_t d;
      d = 24'($urandom);
      p_valid = 1'b1; p_first = (x == 0); p_pix = d;
      if (x < LINE_PIX && 2 * li + fld < FRAME_LINES) exp_q.push_back('{d: d, x: x, y: 2 * li + fld});
      @(negedge clk);
      p_valid = 1'b0; p_first = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1'b1; p_valid = 1'b0; p_first = 1'b0; p_pix = '0; field = 1'b0; line_idx = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int fld = 0; fld < 2; fld++)
      for (int l = 0; l < 6; l++)          // line 5 of each field is outside the frame
        send_line(fld[0], l, LINE_PIX + ((l == 2) ? 3 : 0));
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || nwr != FRAME_LINES * LINE_PIX) begin
      failures++; $display("FAIL %0d writes, %0d missing", nwr, exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
