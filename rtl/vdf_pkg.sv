// vdf_pkg -- types, number formats and helper functions shared by the
// Vector Directional Filter (VDF) coprocessor.
//
// A pixel is an RGB vector of three 8-bit components, packed R in the top
// byte, B in the bottom byte, which is also the layout of the 24-bit
// AXI-Stream words.  The angle between two pixels is carried as an unsigned
// fixed-point number with ANGLE_FRAC fractional bits (radians); the angular
// distance alpha_i, a sum of nine angles, has four more integer bits.
//
// The filter as published computes in single-precision floating point.  This
// RTL uses fixed point instead: the cosine is formed with COS_FRAC = 24
// fractional bits, which matches the 24-bit mantissa of a float, and the
// arccos is evaluated with a four-term polynomial (error below 7e-5 rad).
package vdf_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam int unsigned WIN      = 9;    // pixels in the 3x3 window
  localparam int unsigned IDX_W    = 4;    // width of a window index 0..8

  localparam int unsigned ANGLE_FRAC = 16; // fractional bits of an angle
  localparam int unsigned ANGLE_W    = 17; // angle in [0, pi/2] < 2.0
  localparam int unsigned ALPHA_W    = ANGLE_W + 4; // sum of 9 angles < 16.0

  localparam int unsigned COS_FRAC   = 24; // fractional bits of the cosine

  typedef logic [ANGLE_W-1:0] angle_t;
  typedef logic [ALPHA_W-1:0] alpha_t;
  typedef logic [IDX_W-1:0]   idx_t;

  // pi/2 in the angle format; used as the angle to a black (zero) vector.
  localparam angle_t ANGLE_HALF_PI = angle_t'(102944);

  // Integer square root, floor(sqrt(v)), bit by bit (restoring method).
  function automatic logic [31:0] isqrt64(input logic [63:0] v);
    logic [63:0] rem;
    logic [31:0] root;
    logic [63:0] trial;
    rem  = v;
    root = '0;
    for (int k = 31; k >= 0; k--) begin
      trial = ({32'd0, root} << (k + 1)) + (64'd1 << (2 * k));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (32'd1 << k);
      end
    end
    return root;
  endfunction

endpackage
