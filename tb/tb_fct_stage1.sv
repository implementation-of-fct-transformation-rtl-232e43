// tb_fct_stage1: self-checking testbench of fct_stage1 (four T2x2h on the pixels of a block).
// Random 4x4 blocks of W-bit values, extremes of the range included, are fed
// with random idle clocks in between. Each result block is compared position by
// position with the reference model (ref_stage1, written from the standard's
// unregrouped lifting sequences), and its arrival is checked to be exactly
// 4 clocks after the block was accepted.
module tb_fct_stage1;
  import fct_ref_pkg::*;

  localparam int unsigned W    = 16;
  localparam int unsigned NBLK = 2000;
  localparam int unsigned LAT  = 4;

  typedef logic signed [15:0][63:0] pb_t;   // one block, packed for the queue

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] din  [16];
  logic out_valid;
  logic signed [W+1:0] dout [16];

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  pb_t exp_q [$];
  int unsigned exp_t [$];

  fct_stage1 #(.W(W)) dut (.clk, .rst_n, .in_valid, .pix(din), .out_valid, .coef(dout));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      pb_t pe;
      int unsigned t;
      blk_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cycle);
      end else begin
        pe = exp_q.pop_front();
        t  = exp_t.pop_front();
        for (int k = 0; k < 16; k++) e[k] = longint'(pe[k]);
        e = ref_stage1(e);
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - t, LAT);
        end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (longint'(dout[k]) != e[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: position %0d = %0d, expected %0d", k, dout[k], e[k]);
          end
        end
      end
    end
  end

  initial begin
    pb_t pv;
    int unsigned sent = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    foreach (din[k]) din[k] = '0;
    pv = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (sent < NBLK) begin
      @(posedge clk);
      if (in_valid) begin
        exp_q.push_back(pv);
        exp_t.push_back(cycle);
      end
      #1;
      in_valid = ($urandom_range(3) != 0);
      for (int k = 0; k < 16; k++) begin
        pv[k]  = rand_val(W);
        din[k] = W'(pv[k]);
      end
      if (in_valid) sent++;
    end
    @(posedge clk);
    if (in_valid) begin
      exp_q.push_back(pv);
      exp_t.push_back(cycle);
    end
    #1 in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results never arrived", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NBLK * 3 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
