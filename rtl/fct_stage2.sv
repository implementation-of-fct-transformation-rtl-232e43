// fct_stage2: second stage of the Forward Core Transform, applied to the DC/LP
// block of a macroblock.
//
// The 16 values (raster order) are split into four 2x2 groups, each with its own
// transform, all four running in parallel:
//   (0,1,4,5)      T2x2h with valRound = 1
//   (2,3,6,7)      Todd
//   (8,12,9,13)    Todd
//   (10,11,14,15)  Toddodd
// Results are written back to the positions their inputs came from; position 0
// is the macroblock's DC coefficient, 1..15 its LP coefficients. Every
// sub-transform is a 4-clock pipeline, so the stage accepts a block every clock
// and returns it with out_valid 4 clocks after in_valid. Input W bits, output W+2.
// The grouping and the choice of transforms follow the reference design; the
// valid-only handshake is this design's choice.
module fct_stage2
  import fct_pkg::*;
#(
  parameter int unsigned W = PIX_W + GROW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  cin  [NCOEF],
  output logic                 out_valid,
  output logic signed [W+1:0]  cout [NCOEF]
);

  logic signed [W-1:0] qx [4][4];
  logic signed [W+1:0] qy [4][4];
  logic [3:0]          q_valid;

  for (genvar q = 0; q < 4; q++) begin : g_map
    for (genvar k = 0; k < 4; k++) begin : g_k
      assign qx[q][k]              = cin[S2_QUAD[q][k]];
      assign cout[S2_QUAD[q][k]]   = qy[q][k];
    end
  end

  t2x2h #(.W(W), .ROUND(1'b1)) u_t2x2h (
    .clk, .rst_n, .in_valid, .x(qx[0]), .out_valid(q_valid[0]), .y(qy[0])
  );
  todd #(.W(W)) u_todd_a (
    .clk, .rst_n, .in_valid, .x(qx[1]), .out_valid(q_valid[1]), .y(qy[1])
  );
  todd #(.W(W)) u_todd_b (
    .clk, .rst_n, .in_valid, .x(qx[2]), .out_valid(q_valid[2]), .y(qy[2])
  );
  toddodd #(.W(W)) u_toddodd (
    .clk, .rst_n, .in_valid, .x(qx[3]), .out_valid(q_valid[3]), .y(qy[3])
  );

  // all four transforms have the same latency and run in lock step
  assign out_valid = &q_valid;

  // every sub-transform has the same latency, so their valid bits never differ
  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
                                (q_valid == '0) || (q_valid == '1))
    else $error("sub-transform outputs out of step: %b", q_valid);

endmodule
