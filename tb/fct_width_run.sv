// fct_width_run: drives one fct_top of pixel width W with NMB random macroblocks
// and checks every stage-1 and stage-2 coefficient against the reference model.
// Blocks follow each other back to back, with an idle clock before every third
// macroblock. Used by tb_fct_widths to run the transform at several sample widths.
// Reports done, and its own check and failure counts, on its ports.
module fct_width_run #(
  parameter int unsigned W   = 8,
  parameter int unsigned NMB = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import fct_ref_pkg::*;

  typedef logic signed [15:0][63:0] pb_t;

  logic in_valid;
  logic signed [W-1:0] pix [16];
  logic s1_valid;
  logic [3:0] s1_blk;
  logic signed [W+1:0] s1_coef [16];
  logic s2_valid;
  logic signed [W+3:0] s2_coef [16];

  pb_t s1_q [$];
  pb_t s2_q [$];

  fct_top #(.W(W)) dut (.clk, .rst_n, .in_valid, .pix, .s1_valid, .s1_blk, .s1_coef, .s2_valid, .s2_coef);

  initial begin
    checks = 0;
    failures = 0;
  end

  always @(posedge clk) begin
    if (rst_n && s1_valid) begin
      pb_t e;
      checks++;
      if (s1_q.size() == 0) failures++;
      else begin
        e = s1_q.pop_front();
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (longint'(s1_coef[k]) != longint'(e[k])) begin
            failures++;
            if (failures < 5) $display("FAIL: W=%0d stage 1 position %0d = %0d, expected %0d", W, k, s1_coef[k], e[k]);
          end
        end
      end
    end
    if (rst_n && s2_valid) begin
      pb_t e;
      checks++;
      if (s2_q.size() == 0) failures++;
      else begin
        e = s2_q.pop_front();
        for (int k = 0; k < 16; k++) begin
          checks++;
          if (longint'(s2_coef[k]) != longint'(e[k])) begin
            failures++;
            if (failures < 5) $display("FAIL: W=%0d stage 2 position %0d = %0d, expected %0d", W, k, s2_coef[k], e[k]);
          end
        end
      end
    end
  end

  initial begin
    blk_t px, r1, r2, dclp;
    done = 1'b0;
    in_valid = 1'b0;
    foreach (pix[k]) pix[k] = '0;
    @(posedge rst_n);
    for (int m = 0; m < NMB; m++) begin
      if (m % 3 == 0) begin
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
      for (int b = 0; b < 16; b++) begin
        @(posedge clk);
        #1;
        for (int k = 0; k < 16; k++) begin
          px[k]  = rand_val(W);
          pix[k] = W'(px[k]);
        end
        in_valid = 1'b1;
        r1 = ref_stage1(px);
        dclp[b] = r1[0];
        s1_q.push_back({r1[15], r1[14], r1[13], r1[12], r1[11], r1[10], r1[9], r1[8],
                        r1[7], r1[6], r1[5], r1[4], r1[3], r1[2], r1[1], r1[0]});
        if (b == 15) begin
          r2 = ref_stage2(dclp);
          s2_q.push_back({r2[15], r2[14], r2[13], r2[12], r2[11], r2[10], r2[9], r2[8],
                          r2[7], r2[6], r2[5], r2[4], r2[3], r2[2], r2[1], r2[0]});
        end
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (14) @(posedge clk);
    checks++;
    if (s1_q.size() != 0 || s2_q.size() != 0) begin
      failures++;
      $display("FAIL: W=%0d results missing", W);
    end
    done = 1'b1;
  end
endmodule
