// fct_stage1: first stage of the Forward Core Transform - four T2x2h in parallel.
//
// One 4x4 block of W-bit pixels (raster order, positions 0..15) is accepted per
// clock. The pixels are split into the four 2x2 groups (0,3,12,15), (1,2,13,14),
// (4,7,8,11) and (5,6,9,10); each group goes through its own T2x2h with
// valRound = 0, and every result is written back to the position its input came
// from. Throughput is 16 pixels per clock; the transformed block appears with
// out_valid 4 clocks after in_valid. Position 0 of the result is the block's DC
// coefficient (it becomes a DC or LP value in the second stage); the other 15
// positions are its HP coefficients. Outputs are W+2 bits wide.
// The grouping, valRound, the four parallel T2x2h, the 16-pixel throughput and
// the 4-clock latency follow the reference design; the valid-only handshake is
// this design's choice.
module fct_stage1
  import fct_pkg::*;
#(
  parameter int unsigned W = PIX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  pix [NCOEF],
  output logic                 out_valid,
  output logic signed [W+1:0]  coef [NCOEF]
);

  logic [3:0] q_valid;

  for (genvar q = 0; q < 4; q++) begin : g_quad
    logic signed [W-1:0] qx [4];
    logic signed [W+1:0] qy [4];
    for (genvar k = 0; k < 4; k++) begin : g_map
      assign qx[k]                 = pix[S1_QUAD[q][k]];
      assign coef[S1_QUAD[q][k]]   = qy[k];
    end
    t2x2h #(.W(W), .ROUND(1'b0)) u_t2x2h (
      .clk, .rst_n, .in_valid,
      .x(qx), .out_valid(q_valid[q]), .y(qy)
    );
  end

  // all four quads run in lock step
  assign out_valid = &q_valid;

  // every sub-transform has the same latency, so their valid bits never differ
  a_lock_step: assert property (@(posedge clk) disable iff (!rst_n)
                                (q_valid == '0) || (q_valid == '1))
    else $error("sub-transform outputs out of step: %b", q_valid);

endmodule
