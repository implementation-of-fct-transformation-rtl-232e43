// fct_top: two-stage JPEG-XR Forward Core Transform (FCT) of 16x16 macroblocks.
//
// Pixels arrive one 4x4 block (16 W-bit values, raster order) per in_valid, the 16
// blocks of a macroblock in raster order. Stage 1 (four parallel T2x2h) transforms
// each block in 4 clocks at a rate of one block per clock and puts it out on
// s1_coef with s1_valid; s1_blk gives the block's index in its macroblock. Position 0
// of every stage-1 block is gathered into the DC/LP block; after the 16th block of a
// macroblock that block goes through stage 2 (T2x2h with rounding, two Todd, one
// Toddodd), and s2_valid pulses with the macroblock's DC (position 0) and 15 LP
// coefficients on s2_coef. Stage-1 coefficients are W+2 bits, stage-2 coefficients
// W+4 bits; s1_coef positions 1..15 of each block are its HP coefficients.
//
// Timing: s1_valid follows in_valid by 4 clocks; s2_valid follows the s1_valid of
// the 16th block of a macroblock by 1 + 4 = 5 clocks (gather register, then stage 2).
// Blocks may arrive back to back; there is no back-pressure. The block counter
// starts at 0 after the synchronous active-low reset.
// The two stages, their sub-transforms, groupings and 4-clock latencies follow the
// reference design; the gathering register, the handshake and the widths are this
// design's choices.
module fct_top
  import fct_pkg::*;
#(
  parameter int unsigned W = PIX_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  pix     [NCOEF],
  output logic                 s1_valid,
  output logic [3:0]           s1_blk,
  output logic signed [W+1:0]  s1_coef [NCOEF],
  output logic                 s2_valid,
  output logic signed [W+3:0]  s2_coef [NCOEF]
);

  logic                 g_valid;
  logic signed [W+1:0]  g_blk [NCOEF];

  fct_stage1 #(.W(W)) u_stage1 (
    .clk, .rst_n, .in_valid, .pix,
    .out_valid(s1_valid), .coef(s1_coef)
  );

  dclp_gather #(.CW(W + 2)) u_gather (
    .clk, .rst_n,
    .in_valid(s1_valid), .dc_in(s1_coef[0]),
    .blk_idx(s1_blk), .out_valid(g_valid), .blk(g_blk)
  );

  fct_stage2 #(.W(W + 2)) u_stage2 (
    .clk, .rst_n, .in_valid(g_valid), .cin(g_blk),
    .out_valid(s2_valid), .cout(s2_coef)
  );

endmodule
