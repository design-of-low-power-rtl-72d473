// tb_async_line_buffer: checks the double line buffer across two clocks.
//
// The video side writes lines at 27 MHz, the system side reads at 100 MHz
// with random back-pressure. Pass 1: every line must come out complete,
// in order, with its line number, columns and last flag. Pass 2: reading is
// held off while three lines are written, so both banks fill and the third
// line must be dropped with one overflow pulse; after reading resumes the
// two held lines and the next line must come out. Data must hold while
// r_valid is high and r_ready low.
module tb_async_line_buffer;

  localparam int LINE_PIX = 16;

  logic wclk = 1'b0, rclk = 1'b0;
  logic wrst, rrst;
  logic w_valid, w_last, w_overflow;
  logic [3:0] w_x, r_x;
  logic [9:0] w_line, r_line;
  logic [23:0] w_data, r_data;
  logic r_valid, r_ready, r_last;
  int checks = 0, failures = 0;
  int n_overflow = 0;

  async_line_buffer #(.LINE_PIX(LINE_PIX), .X_W(4), .Y_W(10)) dut (
    .wclk, .wrst, .w_valid, .w_x, .w_line, .w_last, .w_data, .w_overflow,
    .rclk, .rrst, .r_valid, .r_ready, .r_data, .r_x, .r_line, .r_last);

  always #18.5 wclk = ~wclk;
  always #5    rclk = ~rclk;

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [23:0] d; int x; int y; } px_t;
  px_t exp_q [$];
  int  ready_pct = 70;
  logic hold_off = 1'b0;
  logic [23:0] held_data;
  logic        was_stalled = 1'b0;
  int  nrd = 0;

  always @(negedge rclk) r_ready = !hold_off && (($urandom % 100) < ready_pct);

  always @(posedge rclk) if (!rrst) begin
    if (was_stalled) begin
      checks++;
      if (!r_valid || r_data !== held_data) begin failures++; $display("FAIL data changed during stall"); end
    end
    was_stalled = r_valid && !r_ready;
    held_data   = r_data;
    if (r_valid && r_ready) begin
      px_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected pixel");
      end else begin
        e = exp_q.pop_front();
        if (r_data !== e.d || int'(r_x) !== e.x || int'(r_line) !== e.y || r_last !== (e.x == LINE_PIX - 1)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d: line %0d x %0d, exp line %0d x %0d", nrd, r_line, r_x, e.y, e.x);
        end
      end
      nrd++;
    end
  end

  always @(posedge wclk) if (!wrst && w_overflow) n_overflow++;

  task automatic write_line(input int y, input logic expect_kept);
    for (int x = 0; x < LINE_PIX; x++) begin
      logic [23:0] d;
      d = 24'($urandom);
      w_valid = 1'b1; w_x = 4'(x); w_line = 10'(y); w_last = (x == LINE_PIX - 1); w_data = d;
      if (expect_kept) exp_q.push_back('{d: d, x: x, y: y});
      @(negedge wclk);
      w_valid = 1'b0; w_last = 1'b0;
      if ($urandom % 4 == 0) @(negedge wclk);
    end
    repeat (3) @(negedge wclk);
  endtask

  initial begin
    wrst = 1'b1; rrst = 1'b1;
    w_valid = 1'b0; w_x = '0; w_line = '0; w_last = 1'b0; w_data = '0;
    repeat (3) @(negedge wclk);
    wrst = 1'b0; rrst = 1'b0;
    repeat (2) @(negedge wclk);
    // pass 1: reader keeps up
    for (int y = 0; y < 20; y++) write_line(y, 1'b1);
    repeat (30) @(negedge wclk);
    checks++;
    if (exp_q.size() != 0 || n_overflow != 0) begin
      failures++; $display("FAIL pass 1: %0d pixels missing, %0d overflows", exp_q.size(), n_overflow);
    end
    // pass 2: reader held off, third line must be dropped
    hold_off = 1'b1;
    write_line(100, 1'b1);
    write_line(101, 1'b1);
    write_line(102, 1'b0);
    hold_off = 1'b0;
    repeat (40) @(negedge wclk);
    write_line(103, 1'b1);
    repeat (40) @(negedge wclk);
    checks++;
    if (exp_q.size() != 0 || n_overflow != 1) begin
      failures++; $display("FAIL pass 2: %0d pixels missing, %0d overflows", exp_q.size(), n_overflow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
