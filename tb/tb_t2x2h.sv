// tb_t2x2h: self-checking testbench of t2x2h, both valRound variants (0 and 1).
// Random W-bit quads, extremes of the range included, are fed with random idle
// clocks in between (about one clock in four idle, runs of back-to-back quads
// otherwise). Every result is compared with the reference model of the
// standard's lifting sequence, and its arrival is checked to be exactly 4
// clocks after the quad was accepted.
module tb_t2x2h;
  import fct_ref_pkg::*;

  localparam int unsigned W     = 16;
  localparam int unsigned NQUAD = 4000;
  localparam int unsigned LAT   = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] x [4];
  logic out_valid;
  logic signed [W+1:0] y [4];

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  typedef logic signed [3:0][63:0] pq_t;   // one quad, packed for the queue
  pq_t exp_q [$];
  int unsigned exp_t [$];

  logic out_valid_r1;
  logic signed [W+1:0] y_r1 [4];

  // the same input quads go through both variants: valRound = 0 (stage 1) and 1 (stage 2)
  t2x2h #(.W(W), .ROUND(1'b0)) dut    (.clk, .rst_n, .in_valid, .x, .out_valid, .y);
  t2x2h #(.W(W), .ROUND(1'b1)) dut_r1 (.clk, .rst_n, .in_valid, .x, .out_valid(out_valid_r1), .y(y_r1));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && (out_valid != out_valid_r1)) begin
      failures++;
      $display("FAIL: the two variants disagree on out_valid");
    end
    if (rst_n && out_valid) begin
      q4_t e, e1;
      int unsigned t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output at cycle %0d", cycle);
      end else begin
        begin
          pq_t pe;
          pe = exp_q.pop_front();
          for (int k = 0; k < 4; k++) e[k] = longint'(pe[k]);
          e1 = ref_t2x2h(e, 1);
          e  = ref_t2x2h(e, 0);
        end
        t = exp_t.pop_front();
        if (cycle - t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - t, LAT);
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (longint'(y[k]) != e[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: valRound=0 y[%0d] = %0d, expected %0d", k, y[k], e[k]);
          end
          checks++;
          if (longint'(y_r1[k]) != e1[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: valRound=1 y[%0d] = %0d, expected %0d", k, y_r1[k], e1[k]);
          end
        end
      end
    end
  end

  initial begin
    q4_t v;
    int unsigned sent = 0;
    rst_n = 1'b0;
    in_valid = 1'b0;
    foreach (x[k]) x[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (sent < NQUAD) begin
      @(posedge clk);
      if (in_valid) begin
        exp_q.push_back({v[3], v[2], v[1], v[0]});
        exp_t.push_back(cycle);
      end
      #1;
      in_valid = ($urandom_range(3) != 0);
      for (int k = 0; k < 4; k++) begin
        v[k] = rand_val(W);
        x[k] = W'(v[k]);
      end
      if (in_valid) sent++;
    end
    @(posedge clk);
    if (in_valid) begin
      exp_q.push_back({v[3], v[2], v[1], v[0]});
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
    repeat (NQUAD * 3 + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
