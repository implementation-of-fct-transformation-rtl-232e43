// tb_fct_top: end-to-end testbench of the two-stage FCT, fct_top at its default
// parameters (16-bit pixels).
// Random 16-bit pixel blocks (extremes included) are streamed as macroblocks of 16
// blocks each. Some macroblocks are sent with random idle clocks between blocks,
// some back to back, and some follow the previous macroblock without a single idle
// clock. The reference model computes the stage-1 result of every block and the
// stage-2 result of every macroblock's gathered DC/LP block. Checked: every stage-1
// coefficient and block index, stage-1 latency of 4 clocks, every stage-2 DC/LP
// coefficient and a stage-2 latency of 9 clocks after the macroblock's last block.
// Counted, and a failure if never seen: back-to-back blocks, idle clocks between
// blocks, a macroblock that starts on the clock right after the previous one
// ended, and the full-range extremes at the input.
module tb_fct_top;
  import fct_ref_pkg::*;
  import fct_pkg::NCOEF;

  localparam int unsigned W      = fct_pkg::PIX_W;
  localparam int unsigned NMB    = 48;
  localparam int unsigned LAT1   = 4;
  localparam int unsigned LAT2   = 9;   // from the last block's acceptance

  typedef logic signed [15:0][63:0] pb_t;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] pix [NCOEF];
  logic s1_valid;
  logic [3:0] s1_blk;
  logic signed [W+1:0] s1_coef [NCOEF];
  logic s2_valid;
  logic signed [W+3:0] s2_coef [NCOEF];

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  pb_t s1_q [$];          // stage-1 reference results, in order
  int unsigned s1_t [$];
  int unsigned s1_i [$];
  pb_t s2_q [$];          // stage-2 reference results, one per macroblock
  int unsigned s2_t [$];

  int n_back2back = 0, n_idle = 0, n_mb_chain = 0, n_extreme = 0, n_s2 = 0;

  fct_top dut (.clk, .rst_n, .in_valid, .pix, .s1_valid, .s1_blk, .s1_coef, .s2_valid, .s2_coef);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && s1_valid) begin
      pb_t e;
      checks++;
      if (s1_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected stage-1 output at cycle %0d", cycle);
      end else begin
        int unsigned t, i;
        e = s1_q.pop_front();
        t = s1_t.pop_front();
        i = s1_i.pop_front();
        if (cycle - t != LAT1 || s1_blk != 4'(i)) begin
          failures++;
          $display("FAIL: stage 1 latency %0d block %0d, expected %0d block %0d", cycle - t, s1_blk, LAT1, i);
        end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (longint'(s1_coef[k]) != longint'(e[k])) begin
            failures++;
            if (failures < 10) $display("FAIL: stage 1 position %0d = %0d, expected %0d", k, s1_coef[k], e[k]);
          end
        end
      end
    end
    if (rst_n && s2_valid) begin
      pb_t e;
      checks++;
      n_s2++;
      if (s2_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected stage-2 output at cycle %0d", cycle);
      end else begin
        int unsigned t;
        e = s2_q.pop_front();
        t = s2_t.pop_front();
        if (cycle - t != LAT2) begin
          failures++;
          $display("FAIL: stage 2 latency %0d, expected %0d", cycle - t, LAT2);
        end
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (longint'(s2_coef[k]) != longint'(e[k])) begin
            failures++;
            if (failures < 10) $display("FAIL: stage 2 position %0d = %0d, expected %0d", k, s2_coef[k], e[k]);
          end
        end
      end
    end
  end

  initial begin
    blk_t px, r1, dclp;
    bit   prev_valid;
    rst_n = 1'b0;
    in_valid = 1'b0;
    foreach (pix[k]) pix[k] = '0;
    prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < NMB; m++) begin
      int mode;
      mode = m % 3;   // 0: random idle clocks, 1: back to back, 2: back to back and no gap after the previous macroblock
      if (mode != 2 || m == 0) begin
        in_valid = 1'b0;
        @(posedge clk);
        #1 prev_valid = 1'b0;
      end else if (prev_valid) begin
        n_mb_chain++;
      end
      for (int b = 0; b < 16; b++) begin
        while (mode == 0 && $urandom_range(2) == 0) begin
          in_valid = 1'b0;
          @(posedge clk);
          #1 prev_valid = 1'b0;
          n_idle++;
        end
        for (int k = 0; k < 16; k++) begin
          px[k] = rand_val(W);
          if (px[k] == -(64'sd1 <<< (W - 1)) || px[k] == (64'sd1 <<< (W - 1)) - 1) n_extreme++;
          pix[k] = W'(px[k]);
        end
        in_valid = 1'b1;
        if (prev_valid) n_back2back++;
        r1 = ref_stage1(px);
        dclp[b] = r1[0];
        @(posedge clk);
        s1_q.push_back({r1[15], r1[14], r1[13], r1[12], r1[11], r1[10], r1[9], r1[8],
                        r1[7], r1[6], r1[5], r1[4], r1[3], r1[2], r1[1], r1[0]});
        s1_t.push_back(cycle);
        s1_i.push_back(b);
        if (b == 15) begin
          blk_t r2;
          r2 = ref_stage2(dclp);
          s2_q.push_back({r2[15], r2[14], r2[13], r2[12], r2[11], r2[10], r2[9], r2[8],
                          r2[7], r2[6], r2[5], r2[4], r2[3], r2[2], r2[1], r2[0]});
          s2_t.push_back(cycle);
        end
        #1 prev_valid = 1'b1;
      end
    end
    in_valid = 1'b0;
    repeat (LAT2 + 4) @(posedge clk);
    checks++;
    if (s1_q.size() != 0 || s2_q.size() != 0 || n_s2 != NMB) begin
      failures++;
      $display("FAIL: %0d stage-1 and %0d stage-2 results missing, %0d stage-2 outputs",
               s1_q.size(), s2_q.size(), n_s2);
    end
    $display("events: back-to-back blocks %0d, idle clocks %0d, chained macroblocks %0d, extreme pixels %0d, stage-2 blocks %0d",
             n_back2back, n_idle, n_mb_chain, n_extreme, n_s2);
    checks += 4;
    if (n_back2back == 0) begin failures++; $display("FAIL: no back-to-back blocks"); end
    if (n_idle == 0)      begin failures++; $display("FAIL: no idle clocks"); end
    if (n_mb_chain == 0)  begin failures++; $display("FAIL: no chained macroblocks"); end
    if (n_extreme == 0)   begin failures++; $display("FAIL: no extreme pixels"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (NMB * 16 * 6 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
