// vdf_filter_core -- the Vector Directional Filter engine and its loop control.
//
// Input is a stream of window columns: for window-top row r = 0..IMG_H-3 and
// column c = 0..IMG_W-1, the pixels (r,c), (r+1,c), (r+2,c) of the noisy
// image, delivered by the three line streams.  Output is a sequence of writes
// of restored pixels into the internal image memory (row-major, IMG_W*IMG_H
// words).
//
// Per column the controller runs these steps (state machine below):
//   TAKE    accept the column, write it into the window memory  1 clock
//   BORDER  copy the image-border pixels this column carries     3 clocks
//           (top row when r = 0, bottom row when r = IMG_H-3,
//           first and last column of row r+1) unfiltered
//   once the window is full (c >= 2), filter the pixel (r+1, c-1):
//   ISSUE   send the 81 pairs (x_i, x_j), i,j = 1..9, to the       81 clocks
//           pipelined angle unit, one per clock (the pipelined
//           pair loop)
//   DRAIN   wait for the last angles; alpha_i accumulates as       7 clocks
//           they arrive
//   WRITE   write the pixel with the smallest alpha_i              1 clock
// so an interior pixel costs 1 + 3 + 81 + 7 + 1 = 93 clocks and a
// border-only column (c < 2) 5.  After the last column the core pulses `frame_done`
// and waits until `out_busy` falls, so the image in memory is not
// overwritten while it is being sent.
//
// What follows the document: the window built from three image lines with
// three new pixels per window, angles for all pairs of the window, nine
// angular distances, argmin, restored pixel stored in internal memory, and a
// pipelined pair loop while the outer loops run in sequence, and the window
// held in a memory block (read through two ports: x_i and x_j in the pair
// loop, the border pixels and the chosen pixel otherwise).  This design's
// own choices: the border handling (the filter as published does not say
// what happens at the border; here border pixels are kept as they came), the
// fixed point format, and tie-breaking towards the lower window index.
module vdf_filter_core
  import vdf_pkg::*;
#(
  parameter int unsigned IMG_W  = 256,
  parameter int unsigned IMG_H  = 256,
  parameter int unsigned ADDR_W = $clog2(IMG_W * IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // window columns from the line streams
  input  rgb_t              col       [3],
  input  logic              col_valid,
  output logic              col_ready,
  // write port of the internal image memory
  output logic              we,
  output logic [ADDR_W-1:0] waddr,
  output rgb_t              wdata,
  // frame hand-over to the output stream
  output logic              frame_done,
  input  logic              out_busy,
  output logic              busy
);
  localparam int unsigned NPAIR     = WIN * WIN;

  typedef enum logic [2:0] {S_TAKE, S_BORDER, S_ISSUE, S_DRAIN, S_WRITE, S_DONE} state_t;
  state_t state;

  logic [$clog2(IMG_H)-1:0] r;      // window-top row of the current column
  logic [$clog2(IMG_W)-1:0] c;      // image column of the current column
  logic [1:0]               bstep;  // border step 0..2
  idx_t                     pi, pj; // pair being issued
  logic [6:0]               nres;   // angles received for this window
  logic                     started;

  alpha_t alpha [WIN];
  idx_t   min_idx;
  idx_t   ra_idx;
  rgb_t   xi, xj;

  logic   take, last_col, row_end;
  logic   au_valid, acc_clear;
  idx_t   au_tag;
  angle_t au_angle;

  assign col_ready = (state == S_TAKE) && !out_busy;
  assign take      = col_valid && col_ready;
  assign row_end   = (c == $bits(c)'(IMG_W - 1));
  assign last_col  = row_end && (r == $bits(r)'(IMG_H - 3));
  assign acc_clear = (state == S_BORDER) && (bstep == 2'd2);
  assign busy      = started || (state != S_TAKE);
  // decoded, not registered: the output stream turns busy in the very next
  // clock, before the core could take the first column of the next image
  assign frame_done = (state == S_DONE);

  // window read port a serves x_i during the pair loop and the chosen pixel
  // in the write step; port b serves x_j
  assign ra_idx = (state == S_WRITE) ? min_idx
                : (state == S_BORDER) ? idx_t'(3 * int'(bstep) + 2)
                : pi;

  vdf_window u_window (
    .clk, .rst_n, .shift(take), .col_in(col),
    .ra_idx, .ra(xi), .rb_idx(pj), .rb(xj)
  );

  vdf_angle_unit u_angle (
    .clk, .rst_n,
    .in_valid (state == S_ISSUE),
    .in_tag   (pi),
    .xi       (xi),
    .xj       (xj),
    .out_valid(au_valid),
    .out_tag  (au_tag),
    .angle    (au_angle)
  );

  vdf_alpha_acc u_acc (
    .clk, .rst_n, .clear(acc_clear),
    .add_valid(au_valid), .add_idx(au_tag), .add_angle(au_angle), .alpha
  );

  vdf_argmin u_argmin (.alpha, .min_idx);

  function automatic logic [ADDR_W-1:0] addr_of(input int unsigned row, input int unsigned column);
    return ADDR_W'(row * IMG_W + column);
  endfunction

  // memory writes: border copies and filtered pixels
  always_comb begin
    we    = 1'b0;
    waddr = '0;
    wdata = '0;
    if (state == S_BORDER) begin
      unique case (bstep)
        2'd0: begin
          we    = (r == '0);
          waddr = addr_of(0, int'(c));
          wdata = xi;                 // x3: top of the new column
        end
        2'd1: begin
          we    = (c == '0) || row_end;
          waddr = addr_of(int'(r) + 1, int'(c));
          wdata = xi;                 // x6: middle of the new column
        end
        default: begin
          we    = (r == $bits(r)'(IMG_H - 3));
          waddr = addr_of(IMG_H - 1, int'(c));
          wdata = xi;                 // x9: bottom of the new column
        end
      endcase
    end else if (state == S_WRITE) begin
      we    = (c >= 2);               // only a full window was filtered
      waddr = addr_of(int'(r) + 1, int'(c) - 1);
      wdata = xi;                     // the pixel with the smallest alpha
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_TAKE;
      r          <= '0;
      c          <= '0;
      bstep      <= '0;
      pi         <= '0;
      pj         <= '0;
      nres       <= '0;
      started    <= 1'b0;
    end else begin
      if (au_valid) nres <= nres + 1'b1;
      unique case (state)
        S_TAKE: begin
          if (take) begin
            state   <= S_BORDER;
            bstep   <= '0;
            started <= 1'b1;
          end
        end
        S_BORDER: begin
          bstep <= bstep + 1'b1;
          if (bstep == 2'd2) begin
            pi   <= '0;
            pj   <= '0;
            nres <= '0;
            if (c >= 2) state <= S_ISSUE;
            else        state <= S_WRITE;   // border-only column: nothing to filter
          end
        end
        S_ISSUE: begin
          if (pj == idx_t'(WIN - 1)) begin
            pj <= '0;
            if (pi == idx_t'(WIN - 1)) state <= S_DRAIN;
            else pi <= pi + 1'b1;
          end else begin
            pj <= pj + 1'b1;
          end
        end
        S_DRAIN: begin
          if (nres == 7'(NPAIR)) state <= S_WRITE;
        end
        S_WRITE: begin
          if (last_col) begin
            state <= S_DONE;
            r     <= '0;
            c     <= '0;
          end else begin
            state <= S_TAKE;
            if (row_end) begin
              c <= '0;
              r <= r + 1'b1;
            end else begin
              c <= c + 1'b1;
            end
          end
        end
        default: begin // S_DONE
          started    <= 1'b0;
          state      <= S_TAKE;
        end
      endcase
    end
  end
endmodule
