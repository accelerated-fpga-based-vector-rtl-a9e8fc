// vdf_angle_unit -- angle between two RGB vectors, A(xi,xj) = arccos(xi.xj / (|xi||xj|)).
//
// This is the innermost operation of the Vector Directional Filter.  One pair
// of pixels enters per clock (initiation interval 1) and its angle leaves
// LATENCY = 6 clocks later together with the tag that came in with it; there
// is no back-pressure, so the unit suits a loop that issues one pair per
// cycle, as the pipelined pair loop of the filter does.
//
// Pipeline:
//   1  dot = xi.xj, ni2 = |xi|^2, nj2 = |xj|^2           (exact integers)
//   2  num = dot^2, den = ni2*nj2                           (exact integers)
//   3  cos^2 = num / den in Q0.48                           (one divider)
//   4  c = sqrt(cos^2) in Q0.24
//   5  s = sqrt(1 - c) and p(c) = a0 + a1 c + a2 c^2 + a3 c^3 in Q.24
//   6  angle = s * p(c), rounded to ANGLE_FRAC fractional bits
// Because RGB components are never negative, cos is in [0,1] and the
// arccos approximation arccos(c) ~ sqrt(1-c) p(c) (Abramowitz & Stegun
// 4.4.45, |error| < 7e-5 rad) covers the whole range.
//
// Stages 3 to 5 each hold a whole divider or square root and set the clock
// rate; they can be split into more stages without changing any other
// module, since the controller counts returned angles.
//
// Follows the filter definition: Eq. (3) for the angle.  Own choices: fixed
// point instead of floating point (see vdf_pkg), and the rule that a black
// pixel (0,0,0), whose direction is undefined, is at pi/2 from every pixel,
// so that it is never preferred over a coloured one.
module vdf_angle_unit
  import vdf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  idx_t   in_tag,     // carried along unchanged (index i of the pair)
  input  rgb_t   xi,
  input  rgb_t   xj,
  output logic   out_valid,
  output idx_t   out_tag,
  output angle_t angle
);
  localparam int unsigned LATENCY = 6;
  localparam int unsigned F = COS_FRAC;

  // Polynomial coefficients in Q.24, computed from the published constants.
  localparam longint A0 = longint'( 1.5707288 * 16777216.0);
  localparam longint A1 = longint'(-0.2121144 * 16777216.0);
  localparam longint A2 = longint'( 0.0742610 * 16777216.0);
  localparam longint A3 = longint'(-0.0187293 * 16777216.0);

  // valid / tag / zero-vector flag travel alongside the data
  logic [LATENCY-1:0] vld;
  idx_t               tag  [LATENCY];
  logic [LATENCY-1:0] zero;

  // stage 1
  logic [17:0] dot1, ni1, nj1;
  // stage 2
  logic [35:0] num2, den2;
  // stage 3
  logic [48:0] c2_3;
  // stage 4
  logic [24:0] c_4;
  // stage 5
  logic [24:0] s_5;
  logic signed [63:0] p_5;

  function automatic logic [17:0] dot3(input rgb_t a, input rgb_t b);
    return 18'(a.r * b.r) + 18'(a.g * b.g) + 18'(a.b * b.b);
  endfunction

  // Horner evaluation of p(c), everything in Q.24
  function automatic logic signed [63:0] poly(input logic [24:0] c);
    logic signed [63:0] cs, h;
    cs = 64'(c);
    h  = A3;
    h  = A2 + ((h * cs) >>> F);
    h  = A1 + ((h * cs) >>> F);
    h  = A0 + ((h * cs) >>> F);
    return h;
  endfunction

  logic [83:0] quot3;
  logic [63:0] prod6;
  logic [63:0] one_minus_c;

  assign quot3       = ({48'd0, num2} << (2 * F)) / {48'd0, den2};
  assign one_minus_c = (64'd1 << F) - 64'(c_4);
  assign prod6       = 64'(s_5) * 64'(p_5);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
    end else begin
      vld <= {vld[LATENCY-2:0], in_valid};
    end
  end

  always_ff @(posedge clk) begin
    tag[0]  <= in_tag;
    zero[0] <= (xi == '0) || (xj == '0);
    for (int k = 1; k < LATENCY; k++) begin
      tag[k]  <= tag[k-1];
      zero[k] <= zero[k-1];
    end
    // 1
    dot1 <= dot3(xi, xj);
    ni1  <= dot3(xi, xi);
    nj1  <= dot3(xj, xj);
    // 2
    num2 <= 36'(dot1) * 36'(dot1);
    den2 <= 36'(ni1) * 36'(nj1);
    // 3 (a zero denominator only occurs for a black pixel, flagged above)
    c2_3 <= (den2 == '0) ? '0 : quot3[48:0];
    // 4
    c_4  <= isqrt64(64'(c2_3))[24:0];
    // 5
    s_5  <= isqrt64(one_minus_c << F)[24:0];
    p_5  <= poly(c_4);
    // 6: Q.24 * Q.24 -> Q.48, rounded to Q.ANGLE_FRAC
    angle <= zero[LATENCY-2] ? ANGLE_HALF_PI
           : angle_t'((prod6 + (64'd1 << (2 * F - ANGLE_FRAC - 1))) >> (2 * F - ANGLE_FRAC));
  end

  assign out_valid = vld[LATENCY-1];
  assign out_tag   = tag[LATENCY-1];
endmodule
