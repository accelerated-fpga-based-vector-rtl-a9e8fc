// vdf_window -- the 3x3 RGB filter window, kept in a small memory.
//
// Holds the nine pixels x1..x9 of the current window (x1 x2 x3 / x4 x5 x6 /
// x7 x8 x9, x5 in the centre, index 0..8 = x1..x9).  The storage is three
// memory banks, one per window row, of three words each, one word per
// window column.  A new window costs one column: when `shift` is high the
// three pixels of `col_in` (top first) are written, one per bank, into the
// slot of the oldest column, and a rotating pointer then names that slot the
// newest.  No pixel is ever moved.  Logical column l (0 = left) of the window
// lives in slot (oldest + l) mod 3.
//
// Two read ports, ra and rb, return any two window pixels in the same clock
// (combinational read, as in a distributed memory), which is what the
// pipelined pair loop needs: x_i and x_j for one pair per clock (an index
// above 8 reads x7..x9).  Writes take
// effect at the clock edge.  Reset only clears the pointer; the memory
// itself is not reset, and the first two columns of an image row are never
// read before they are written.
//
// Keeping the window in a memory block follows the configuration the design
// is based on; the bank-per-row organisation, the rotating pointer and the
// read ports are this design's own.
module vdf_window
  import vdf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  rgb_t col_in [3],
  input  idx_t ra_idx,
  output rgb_t ra,
  input  idx_t rb_idx,
  output rgb_t rb
);
  rgb_t       bank [3][3];   // [window row][slot]
  logic [1:0] oldest;        // slot holding the left column

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int row = 0; row < 3; row++) bank[row][oldest] <= col_in[row];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     oldest <= '0;
    else if (shift) oldest <= (oldest == 2'd2) ? 2'd0 : oldest + 2'd1;
  end

  // window index -> (bank, slot)
  function automatic logic [1:0] row_of(input idx_t idx);
    return (idx < 4'd3) ? 2'd0 : (idx < 4'd6) ? 2'd1 : 2'd2;
  endfunction

  function automatic logic [1:0] slot_of(input idx_t idx, input logic [1:0] base);
    logic [1:0] wcol;
    logic [2:0] sum;
    wcol = (idx < 4'd3) ? 2'(idx) : (idx < 4'd6) ? 2'(idx - 4'd3) : 2'(idx - 4'd6);
    sum  = {1'b0, base} + {1'b0, wcol};
    return (sum >= 3'd3) ? 2'(sum - 3'd3) : sum[1:0];
  endfunction

  assign ra = bank[row_of(ra_idx)][slot_of(ra_idx, oldest)];
  assign rb = bank[row_of(rb_idx)][slot_of(rb_idx, oldest)];
endmodule
