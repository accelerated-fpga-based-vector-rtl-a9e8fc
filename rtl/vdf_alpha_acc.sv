// vdf_alpha_acc -- the nine angular distances alpha_1..alpha_9.
//
// alpha_i = sum over j of A(x_i, x_j) (Eq. 2 of the filter definition).  The
// angle unit returns one angle per clock tagged with its i; this block adds
// it to accumulator i.  `clear` zeroes all nine at the start of a window (it
// takes priority over an add in the same clock).  Registered, one clock per
// add; the sums are read directly from `alpha`.  Accumulators are ALPHA_W
// bits wide, enough for nine angles of at most pi/2 without overflow.
// The sum follows the filter definition; accumulating tagged angles as they
// stream out of the angle pipeline, and the widths, are this design's own.
module vdf_alpha_acc
  import vdf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   add_valid,
  input  idx_t   add_idx,
  input  angle_t add_angle,
  output alpha_t alpha [WIN]
);
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 0; k < WIN; k++) alpha[k] <= '0;
    end else if (add_valid) begin
      for (int k = 0; k < WIN; k++)
        if (add_idx == idx_t'(k)) alpha[k] <= alpha[k] + alpha_t'(add_angle);
    end
  end
endmodule
