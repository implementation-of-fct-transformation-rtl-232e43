// toddodd: the two-dimensional rotation Toddodd of the JPEG-XR second FCT stage,
// as a 4-stage pipeline.
//
// The standard defines Toddodd on iCoeff[0..3] = a,b,c,d as
//   b = -b; c = -c; d += a; c -= b; a -= (t1 = d >> 1); b += (t2 = c >> 1);
//   a += (3b + 4) >> 3;  b -= (3a + 3) >> 2;  a += (3b + 3) >> 3;
//   b -= t2; a += t1; c += b; d -= a;
// Run one operation group per clock it needs seven steps. Here it takes four:
//   1: d' = d + a;  c' = b - c;  b' = (c' >> 1) - b;
//      a' = (a - (d' >> 1)) + ((3b' + 4) >> 3)
//   2: b' -= (3a' + 3) >> 2
//   3: a' += (3b' + 3) >> 3
//   4: y1 = b' - (c' >> 1);  y0 = a' + (d' >> 1);  y2 = c' + y1;  y3 = d' - y0
// t1 and t2 are not stored: d' and c' do not change until step 4, so they are
// recomputed there. The result equals the standard sequence bit for bit.
// A quad is accepted every clock; its result appears with out_valid 4 clocks after
// in_valid. ">>" is an arithmetic shift. Outputs are W+2 bits wide.
// The split (the opening operations with the first lifting step in step 1, the
// two remaining lifting steps in steps 2 and 3, the five closing operations in
// step 4) follows the reference design, which also merges the first lifting step
// into the opening operations; the arithmetic inside each step is this design's
// own, written to keep the standard's results. Valid signal, reset and widths are
// this design's choices.
module toddodd #(
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
  ival_t c1, d1, b1;                    // step-1 combinational values
  ival_t s1_a, s1_b, s1_c, s1_d;
  ival_t s2_a, s2_b, s2_c, s2_d;
  ival_t s3_a, s3_b, s3_c, s3_d;
  ival_t b4, a4;                        // step-4 combinational values
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

  always_comb begin
    d1 = xd + xa;
    c1 = xb - xc;
    b1 = (c1 >>> 1) - xb;
    b4 = s3_b - (s3_c >>> 1);
    a4 = s3_a + (s3_d >>> 1);
  end

  always_ff @(posedge clk) begin
    // step 1
    s1_d <= d1;
    s1_c <= c1;
    s1_b <= b1;
    s1_a <= (xa - (d1 >>> 1)) + ((ival_t'(3) * b1 + ival_t'(4)) >>> 3);
    // step 2
    s2_b <= s1_b - ((ival_t'(3) * s1_a + ival_t'(3)) >>> 2);
    s2_a <= s1_a;
    s2_c <= s1_c;
    s2_d <= s1_d;
    // step 3
    s3_a <= s2_a + ((ival_t'(3) * s2_b + ival_t'(3)) >>> 3);
    s3_b <= s2_b;
    s3_c <= s2_c;
    s3_d <= s2_d;
    // step 4
    s4_a <= oval_t'(a4);
    s4_b <= oval_t'(b4);
    s4_c <= oval_t'(s3_c + b4);
    s4_d <= oval_t'(s3_d - a4);
  end

  assign out_valid = vld[fct_pkg::LAT-1];
  assign y[0] = s4_a;
  assign y[1] = s4_b;
  assign y[2] = s4_c;
  assign y[3] = s4_d;

endmodule
