// todd: the one-dimensional rotation Todd of the JPEG-XR second FCT stage, as a
// 4-stage pipeline.
//
// The standard defines Todd as a 12-step lifting sequence on iCoeff[0..3] = a,b,c,d
// that rotates the pairs by pi/8. Run as written it needs six clock steps; here the
// steps are regrouped so the whole transform takes four, with results identical to
// the standard sequence for every input:
//   1: b' = b - c;  c' = (b + c + 1) >> 1;  a' = a + d;  d' = (a - d + 1) >> 1
//   2: b' -= (3a' + 4) >> 3;           d' -= (3c' + 4) >> 3
//   3: a' += (3b' + 4) >> 3;           c' += (3d' + 4) >> 3
//   4: y3 = d' + (b' >> 1);            y1 = ((b' + 1) >> 1) - d'
//      y2 = c' - ((a' + 1) >> 1);      y0 = c' + (a' >> 1)
// Steps 1 and 4 fold the standard's dependent add/subtract pairs into single
// expressions (c + ((b - c + 1) >> 1) == (b + c + 1) >> 1, and so on).
// A quad is accepted every clock; its result appears with out_valid 4 clocks after
// in_valid. ">>" is an arithmetic shift. Outputs are W+2 bits wide.
// The 4-step grouping (six operations, then two steps for the four lifting
// operations, then the final six operations in one step) follows the reference
// design; the rounding terms of the final step are the ones that make the result
// equal to the standard sequence. Valid signal, reset and widths are this
// design's choices.
module todd #(
  parameter int unsigned W = fct_pkg::PIX_W + fct_pkg::GROW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x [4],
  output logic                 out_valid,
  output logic signed [W+1:0]  y [4]
);

  localparam int unsigned IW = W + 4;
  typedef logic signed [IW-1:0] ival_t;

  logic [fct_pkg::LAT-1:0] vld;
  ival_t xa, xb, xc, xd;
  ival_t s1_a, s1_b, s1_c, s1_d;
  ival_t s2_a, s2_b, s2_c, s2_d;
  ival_t s3_a, s3_b, s3_c, s3_d;
  typedef logic signed [W+1:0] oval_t;
  oval_t s4_a, s4_b, s4_c, s4_d;

  assign xa = ival_t'(x[0]);
  assign xb = ival_t'(x[1]);
  assign xc = ival_t'(x[2]);
  assign xd = ival_t'(x[3]);

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[fct_pkg::LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    // step 1
    s1_b <= xb - xc;
    s1_c <= (xc + xb + ival_t'(1)) >>> 1;
    s1_a <= xa + xd;
    s1_d <= (xa - xd + ival_t'(1)) >>> 1;
    // step 2
    s2_b <= s1_b - ((ival_t'(3) * s1_a + ival_t'(4)) >>> 3);
    s2_d <= s1_d - ((ival_t'(3) * s1_c + ival_t'(4)) >>> 3);
    s2_a <= s1_a;
    s2_c <= s1_c;
    // step 3
    s3_a <= s2_a + ((ival_t'(3) * s2_b + ival_t'(4)) >>> 3);
    s3_c <= s2_c + ((ival_t'(3) * s2_d + ival_t'(4)) >>> 3);
    s3_b <= s2_b;
    s3_d <= s2_d;
    // step 4
    s4_d <= oval_t'(s3_d + (s3_b >>> 1));
    s4_b <= oval_t'(((s3_b + ival_t'(1)) >>> 1) - s3_d);
    s4_c <= oval_t'(s3_c - ((s3_a + ival_t'(1)) >>> 1));
    s4_a <= oval_t'(s3_c + (s3_a >>> 1));
  end

  assign out_valid = vld[fct_pkg::LAT-1];
  assign y[0] = s4_a;
  assign y[1] = s4_b;
  assign y[2] = s4_c;
  assign y[3] = s4_d;

endmodule
