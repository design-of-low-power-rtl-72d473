// tb_video_timing: checks line/field/frame tracking from decoded timing
// codes.
//
// Sequences of codes (EAV/SAV with F and V) for two frames are applied:
// per field VBL blanking lines then ACT active lines. The testbench checks
// that new_line comes once per active SAV with the right line index,
// new_field once per field on its first active line, new_frame only for
// field 0, and that field/vblank follow the codes.
module tb_video_timing;

  localparam int VBL = 3, ACT = 7;

  logic clk = 1'b0;
  logic rst, trs, f, v, h;
  logic new_line, new_field, new_frame, field, vblank;
  logic [8:0] line_idx;
  int checks = 0, failures = 0;
  int n_line = 0, n_field = 0, n_frame = 0;
  int exp_idx = 0;

  video_timing dut (.clk, .rst, .trs, .f, .v, .h, .new_line, .new_field,
                    .new_frame, .field, .vblank, .line_idx);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic code(input logic ff, input logic vv, input logic hh);
    trs = 1'b1; f = ff; v = vv; h = hh;
    @(negedge clk);   // outputs of this code are now visible
    trs = 1'b0;
    checks++;
    if (field !== ff || vblank !== vv) begin
      failures++;
      $display("FAIL field/vblank %0d/%0d exp %0d/%0d", field, vblank, ff, vv);
    end
    if (!vv && !hh) begin
      checks++;
      if (!new_line || line_idx !== 9'(exp_idx) || new_field !== (exp_idx == 0)
          || new_frame !== (exp_idx == 0 && !ff)) begin
        failures++;
        $display("FAIL SAV: new_line %0d idx %0d (exp %0d) new_field %0d new_frame %0d",
                 new_line, line_idx, exp_idx, new_field, new_frame);
      end
      n_line++;
      if (new_field) n_field++;
      if (new_frame) n_frame++;
      exp_idx++;
    end else begin
      checks++;
      if (new_line || new_field || new_frame) begin
        failures++;
        $display("FAIL strobe outside an active SAV");
      end
    end
    repeat ($urandom % 4) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; trs = 1'b0; f = 1'b0; v = 1'b1; h = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int fr = 0; fr < 2; fr++)
      for (int fld = 0; fld < 2; fld++) begin
        for (int l = 0; l < VBL; l++) begin
          code(fld[0], 1'b1, 1'b1);
          code(fld[0], 1'b1, 1'b0);
        end
        exp_idx = 0;
        for (int l = 0; l < ACT; l++) begin
          code(fld[0], 1'b0, 1'b1);
          code(fld[0], 1'b0, 1'b0);
        end
      end
    checks++;
    if (n_line != 4 * ACT || n_field != 4 || n_frame != 2) begin
      failures++;
      $display("FAIL counts: lines %0d fields %0d frames %0d", n_line, n_field, n_frame);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
