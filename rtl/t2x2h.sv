// t2x2h: the 2x2 Hadamard lifting transform T2x2h of JPEG-XR, as a 4-stage pipeline.
//
// Four W-bit signed values x[0..3] (iCoeff[0..3]) are transformed by the lifting
// sequence
//   a += d;  b -= c;  t1 = (a - b + ROUND) >> 1;  t2 = c;
//   c = t1 - d;  d = t1 - t2;  a -= d;  b += c;
// which is an exactly invertible integer version of 1/2 * H4 (H4 the 4x4 Hadamard
// matrix). ROUND is valRound: 0 in the first FCT stage, 1 in the second.
// The sequence is split over four register stages, one per clock step:
//   1: a += d, b -= c      2: t1      3: new c and d      4: new a and b.
// A new quad is accepted every clock; its result appears with out_valid exactly
// LAT = 4 clocks after in_valid. There is no back-pressure.
// The lifting sequence and the 4-clock latency follow the reference design; the
// exact split of the operations over the four stages, the valid signal, the active
// low synchronous reset (valid bits only) and the widths are this design's choices.
// ">>" is an arithmetic shift (floor division by 2). Outputs are W+2 bits wide.
module t2x2h #(
  parameter int unsigned W     = fct_pkg::PIX_W,
  parameter bit          ROUND = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x [4],
  output logic                 out_valid,
  output logic signed [W+1:0]  y [4]
);

  localparam int unsigned IW = W + 3;   // internal width, holds every intermediate
  typedef logic signed [IW-1:0] ival_t;

  logic [fct_pkg::LAT-1:0] vld;

  // stage registers
  ival_t s1_a, s1_b, s1_c, s1_d;
  ival_t s2_a, s2_b, s2_c, s2_d, s2_t1;
  ival_t s3_a, s3_b, s3_c, s3_d;
  typedef logic signed [W+1:0] oval_t;
  oval_t s4_a, s4_b, s4_c, s4_d;

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[fct_pkg::LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    // step 1: a += d, b -= c
    s1_a <= ival_t'(x[0]) + ival_t'(x[3]);
    s1_b <= ival_t'(x[1]) - ival_t'(x[2]);
    s1_c <= ival_t'(x[2]);
    s1_d <= ival_t'(x[3]);
    // step 2: t1 = (a - b + valRound) >> 1
    s2_t1 <= (s1_a - s1_b + ival_t'(ROUND)) >>> 1;
    s2_a  <= s1_a;
    s2_b  <= s1_b;
    s2_c  <= s1_c;               // kept as t2
    s2_d  <= s1_d;
    // step 3: c = t1 - d, d = t1 - t2
    s3_c <= s2_t1 - s2_d;
    s3_d <= s2_t1 - s2_c;
    s3_a <= s2_a;
    s3_b <= s2_b;
    // step 4: a -= d, b += c
    s4_a <= oval_t'(s3_a - s3_d);
    s4_b <= oval_t'(s3_b + s3_c);
    s4_c <= oval_t'(s3_c);
    s4_d <= oval_t'(s3_d);
  end

  assign out_valid = vld[fct_pkg::LAT-1];
  assign y[0] = s4_a;
  assign y[1] = s4_b;
  assign y[2] = s4_c;
  assign y[3] = s4_d;

endmodule
