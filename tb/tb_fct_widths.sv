// tb_fct_widths: runs the complete two-stage transform at sample widths other
// than the default 16 bits: 8-bit samples (the narrowest integer format) and
// 32-bit samples (the widest component width), each through its own fct_top, and
// checks every coefficient against the reference model.
module tb_fct_widths;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done8, done32;
  int   checks8, failures8, checks32, failures32;
  int   checks, failures;

  fct_width_run #(.W(8),  .NMB(24)) run8  (.clk, .rst_n, .done(done8),  .checks(checks8),  .failures(failures8));
  fct_width_run #(.W(32), .NMB(24)) run32 (.clk, .rst_n, .done(done32), .checks(checks32), .failures(failures32));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done8 && done32);
    checks   = checks8 + checks32 + 2;
    failures = failures8 + failures32;
    // both runs must have seen every stage-2 block
    if (checks8 < 24 * 17) failures++;
    if (checks32 < 24 * 17) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks32, failures8 + failures32 + 1);
    $finish;
  end
endmodule
