// tb_bt656_decoder: checks the line/field decoder on a generated BT.656
// stream.
//
// A stream of lines is generated with EAV/SAV codes carrying F, V and
// correct protection bits, blanking words (Cb/Cr 200h, Y 040h) and, on
// lines with V = 0, ACTIVE random samples. The testbench checks every
// decoded code's F/V/H, that exactly the active samples come out with the
// right Cb/Y/Cr/Y phase and first-sample flag, in order, and that a code
// with corrupted protection bits is flagged.
module tb_bt656_decoder;
  import vz_pkg::*;

  localparam int ACTIVE = 32;      // samples per line (reduced)
  localparam int HBLANK = 12;

  logic clk = 1'b0;
  logic rst;
  logic [9:0] din;
  logic trs, trs_err, f, v, h, s_valid, s_first;
  logic [9:0] s_data;
  phase422_t s_phase;
  int checks = 0, failures = 0;

  bt656_decoder #(.ACTIVE_SAMPLES(ACTIVE)) dut (.clk, .rst, .din, .trs, .trs_err,
    .f, .v, .h, .s_valid, .s_data, .s_phase, .s_first);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [9:0] samp_q [$];
  logic [2:0] trs_q [$];     // {f, v, h}
  logic       err_q [$];
  int         sample_no = 0;
  int         n_trs = 0, n_err = 0;

  function automatic logic [9:0] xy(input logic ff, input logic vv, input logic hh);
    return {1'b1, ff, vv, hh, vv ^ hh, ff ^ hh, ff ^ vv, ff ^ vv ^ hh, 2'b00};
  endfunction

  task automatic put(input logic [9:0] w);
    din <= w;
    @(posedge clk);
  endtask

  task automatic code(input logic ff, input logic vv, input logic hh, input logic corrupt);
    put(10'h3FF); put(10'h000); put(10'h000);
    put(corrupt ? (xy(ff, vv, hh) ^ 10'h004) : xy(ff, vv, hh));
    trs_q.push_back({ff, vv, hh});
    err_q.push_back(corrupt);
  endtask

  task automatic line(input logic ff, input logic vv, input logic corrupt);
    code(ff, vv, 1'b1, 1'b0);
    for (int i = 0; i < HBLANK; i++) put(i[0] ? 10'h040 : 10'h200);
    code(ff, vv, 1'b0, corrupt);
    for (int i = 0; i < ACTIVE; i++) begin
      logic [9:0] s;
      s = 10'd4 + 10'($urandom % 1016);     // 3FF and 000 never occur in data
      if (!vv) samp_q.push_back(s);
      put(s);
    end
  endtask

  // decoded codes
  always @(posedge clk) if (!rst && trs) begin
    logic [2:0] e; logic ee;
    checks++;
    n_trs++;
    e = trs_q.pop_front();
    ee = err_q.pop_front();
    if ({f, v, h} !== e || trs_err !== ee) begin
      failures++;
      $display("FAIL code: got FVH %b err %0d exp %b err %0d", {f, v, h}, trs_err, e, ee);
    end
    if (trs_err) n_err++;
  end

  // decoded samples
  always @(posedge clk) if (!rst && s_valid) begin
    logic [9:0] e;
    checks++;
    e = samp_q.pop_front();
    if (s_data !== e || s_phase !== phase422_t'(sample_no % 4) || s_first !== (sample_no % ACTIVE == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL sample %0d: got %h ph %0d first %0d, exp %h", sample_no, s_data, s_phase, s_first, e);
    end
    sample_no++;
  end

  initial begin
    rst = 1'b1; din = 10'h200;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int fld = 0; fld < 2; fld++) begin
      for (int l = 0; l < 3; l++)  line(fld[0], 1'b1, 1'b0);   // vertical blanking
      for (int l = 0; l < 10; l++) line(fld[0], 1'b0, (l == 4)); // active
    end
    repeat (5) @(posedge clk);
    checks++;
    if (samp_q.size() != 0 || trs_q.size() != 0 || sample_no != 20 * ACTIVE || n_err != 2) begin
      failures++;
      $display("FAIL left %0d samples %0d codes, got %0d samples %0d errors",
               samp_q.size(), trs_q.size(), sample_no, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
