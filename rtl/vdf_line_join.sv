// vdf_line_join -- joins the three image-line streams into one window column.
//
// The coprocessor receives three lines of the image at the same time, one on
// each AXI-Stream input (fed by DMA1, DMA2 and DMA3 from consecutive image
// rows).  A window column is the three vertically adjacent pixels that are at
// the head of the three streams.  This block pops the three streams only in a
// clock in which all three hold a pixel, so they always stay aligned, and
// keeps the column in a one-entry register towards the filter.  The register
// is refilled in the same clock in which the filter takes its column, so one
// column per clock can pass; while the filter is busy with a pixel the next
// column already waits in it.
//
// Interface: s_tdata/s_tvalid/s_tready[k] for line k (0 = top line);
// col/col_valid/col_ready towards the filter, col and col_valid straight from
// flip-flops.  Per AXI-Stream, no s_tready[k] depends on s_tvalid[k] alone:
// each ready waits for the other two lines too.  Timing: a column is valid
// one clock after it is popped from the streams.  The join itself follows
// the document; the register stage and the exact handshake are this design's
// own.
module vdf_line_join
  import vdf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  rgb_t       s_tdata  [3],
  input  logic [2:0] s_tvalid,
  output logic [2:0] s_tready,
  output rgb_t       col      [3],
  output logic       col_valid,
  input  logic       col_ready
);
  logic load;

  // pop all three lines when all hold a pixel and the register is free or
  // being emptied in this clock
  assign load     = (&s_tvalid) && (!col_valid || col_ready);
  assign s_tready = {3{load}};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      for (int k = 0; k < 3; k++) col[k] <= '0;
    end else if (load) begin
      col_valid <= 1'b1;
      col       <= s_tdata;
    end else if (col_ready) begin
      col_valid <= 1'b0;
    end
  end

  // the three lines are popped together or not at all
  always_comb begin
    a_aligned: assert (s_tready == 3'b000 || (s_tready == 3'b111 && s_tvalid == 3'b111));
  end
endmodule
