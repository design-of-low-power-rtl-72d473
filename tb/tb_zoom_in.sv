// tb_zoom_in: checks the zoom-in core against a reference model of the
// 3/2 bilinear enlargement.
//
// The core runs at its default line width (480 pixels). Frames of random
// RGB pixels, LINES lines each, are sent; the expected output is built in
// the testbench: each line widened (p0, mean(p0,p1), p1 per pixel pair),
// then for every line pair (n, n+1) the widened line n, the per-pixel mean
// of the two widened lines, and the widened line n+1; means round half up.
// Every output pixel, its end-of-line flag and its line kind are compared.
// Pass 1 streams without stalls and checks that the three lines of each
// pair leave back to back, one pixel per clock; pass 2 throttles the input
// and stalls the output at random.
module tb_zoom_in;

  localparam int LINE_W = 480;
  localparam int OUT_W  = 3 * LINE_W / 2;
  localparam int LINES  = 8;

  logic clk = 1'b0;
  logic rst;
  logic        in_valid, in_ready, out_valid, out_ready, out_eol;
  logic [23:0] in_data, out_data;
  logic [1:0]  out_kind;
  int checks = 0, failures = 0;

  zoom_in dut (.clk, .rst, .in_valid, .in_ready, .in_data,
               .out_valid, .out_ready, .out_data, .out_eol, .out_kind);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] mean2(input logic [23:0] a, input logic [23:0] b);
    logic [23:0] m;
    for (int c = 0; c < 3; c++)
      m[c*8 +: 8] = 8'((int'(a[c*8 +: 8]) + int'(b[c*8 +: 8]) + 1) / 2);
    return m;
  endfunction

  logic [23:0] src [LINES][LINE_W];
  logic [23:0] exp_q [$];
  logic        eol_q [$];
  logic [1:0]  kind_q [$];

  task automatic build_expected();
    logic [23:0] wide [LINES][OUT_W];
    for (int l = 0; l < LINES; l++)
      for (int k = 0; k < LINE_W / 2; k++) begin
        wide[l][3*k]     = src[l][2*k];
        wide[l][3*k + 1] = mean2(src[l][2*k], src[l][2*k + 1]);
        wide[l][3*k + 2] = src[l][2*k + 1];
      end
    for (int l = 0; l < LINES; l += 2) begin
      for (int x = 0; x < OUT_W; x++) begin
        exp_q.push_back(wide[l][x]); eol_q.push_back(x == OUT_W - 1); kind_q.push_back(2'd0);
      end
      for (int x = 0; x < OUT_W; x++) begin
        exp_q.push_back(mean2(wide[l][x], wide[l + 1][x]));
        eol_q.push_back(x == OUT_W - 1); kind_q.push_back(2'd1);
      end
      for (int x = 0; x < OUT_W; x++) begin
        exp_q.push_back(wide[l + 1][x]); eol_q.push_back(x == OUT_W - 1); kind_q.push_back(2'd2);
      end
    end
  endtask

  int in_stall_pct = 0, out_stall_pct = 0;
  int received = 0;
  int run_len = 0;            // consecutive output pixels of the current pair
  logic check_rate = 1'b0;

  // output monitor
  always @(posedge clk) begin
    if (!rst && out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        logic [23:0] e; logic el; logic [1:0] ek;
        e = exp_q.pop_front(); el = eol_q.pop_front(); ek = kind_q.pop_front();
        if (out_data !== e || out_eol !== el || out_kind !== ek) begin
          failures++;
          if (failures < 10)
            $display("FAIL out %0d: got %h eol %0d kind %0d, exp %h eol %0d kind %0d",
                     received, out_data, out_eol, out_kind, e, el, ek);
        end
      end
      received++;
    end
    // rate: inside a pair, the output must be valid on every clock
    if (!rst && check_rate) begin
      if (out_valid) run_len++;
      else if (run_len != 0) begin
        checks++;
        if (run_len != 3 * OUT_W) begin
          failures++;
          $display("FAIL pair left in a run of %0d pixels, expected %0d", run_len, 3 * OUT_W);
        end
        run_len = 0;
      end
    end
  end

  always @(posedge clk) out_ready <= ($urandom % 100) >= out_stall_pct;

  // input driver: a clocked process offers src pixels in raster order
  int  send_idx = 0;
  logic sending = 1'b0;
  always @(posedge clk) begin
    int idx;
    idx = send_idx;
    if (in_valid && in_ready) idx++;
    send_idx <= idx;
    if (sending && idx < LINES * LINE_W && (($urandom % 100) >= in_stall_pct)) begin
      in_valid <= 1'b1;
      in_data  <= src[idx / LINE_W][idx % LINE_W];
    end else begin
      in_valid <= 1'b0;
    end
  end

  task automatic send_frame();
    send_idx = 0;
    sending  = 1'b1;
    while (send_idx < LINES * LINE_W) @(posedge clk);
    sending  = 1'b0;
  endtask

  task automatic run_pass(input int in_pct, input int out_pct, input logic rate);
    for (int l = 0; l < LINES; l++)
      for (int x = 0; x < LINE_W; x++) src[l][x] = 24'($urandom);
    build_expected();
    in_stall_pct  = in_pct;
    out_stall_pct = out_pct;
    check_rate    = rate;
    send_frame();
    while (exp_q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check_rate = 1'b0;
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_data = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run_pass(0, 0, 1'b1);
    run_pass(30, 40, 1'b0);
    run_pass(0, 70, 1'b0);
    checks++;
    if (received != 3 * (3 * OUT_W * LINES / 2)) begin
      failures++;
      $display("FAIL received %0d pixels", received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
