// tb_dclp_gather: self-checking testbench of dclp_gather.
// Random DC values are offered for 60 macroblocks with random idle clocks, and
// with some macroblocks following the previous one without any idle clock. The
// testbench checks blk_idx for every value, that out_valid pulses exactly one
// clock after the 16th value of each macroblock and at no other time, and that the
// gathered block holds the 16 values at positions 0..15 in arrival order.
module tb_dclp_gather;
  localparam int unsigned CW  = 18;
  localparam int unsigned NMB = 60;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [CW-1:0] dc_in;
  logic [3:0] blk_idx;
  logic out_valid;
  logic signed [CW-1:0] blk [16];

  int checks = 0, failures = 0;
  logic signed [CW-1:0] sent_vals [16];
  logic signed [CW-1:0] exp_vals [16];
  logic exp_pulse = 1'b0;
  int   pulses = 0;

  dclp_gather #(.CW(CW)) dut (.clk, .rst_n, .in_valid, .dc_in, .blk_idx, .out_valid, .blk);

  always #5 clk = ~clk;

  // out_valid must pulse exactly when expected, with the expected contents
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != exp_pulse) begin
        failures++;
        $display("FAIL: out_valid = %0b, expected %0b", out_valid, exp_pulse);
      end
      if (out_valid && exp_pulse) begin
        pulses++;
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (blk[k] != exp_vals[k]) begin
            failures++;
            $display("FAIL: blk[%0d] = %0d, expected %0d", k, blk[k], exp_vals[k]);
          end
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    dc_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < NMB; m++) begin
      bit no_gaps;
      no_gaps = (m % 3 == 1);
      for (int b = 0; b < 16; b++) begin
        // optional idle clocks
        while (!no_gaps && $urandom_range(2) == 0) begin
          in_valid = 1'b0;
          @(posedge clk);
          #1 exp_pulse = 1'b0;
        end
        in_valid = 1'b1;
        dc_in = CW'($urandom);
        sent_vals[b] = dc_in;
        #1;
        checks++;
        if (blk_idx != 4'(b)) begin
          failures++;
          $display("FAIL: blk_idx = %0d, expected %0d", blk_idx, b);
        end
        @(posedge clk);
        #1;
        exp_pulse = (b == 15);
        if (b == 15) exp_vals = sent_vals;
      end
    end
    in_valid = 1'b0;
    @(posedge clk);
    #1 exp_pulse = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (pulses != NMB) begin
      failures++;
      $display("FAIL: %0d blocks out, expected %0d", pulses, NMB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NMB * 16 * 6 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
