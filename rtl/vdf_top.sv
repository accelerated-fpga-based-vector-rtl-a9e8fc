// vdf_top -- Vector Directional Filter coprocessor.
//
// Removes impulsive and Gaussian noise from an RGB image by replacing each
// pixel with the pixel of its 3x3 neighbourhood whose direction in RGB space
// is most typical: the one with the smallest sum of angles to the other
// eight.  The coprocessor sits between a processor's DDR memory and three
// AXI DMA engines:
//
//   s_axis_*[0]  line stream from DMA1: image rows 0 .. IMG_H-3
//   s_axis_*[1]  line stream from DMA2: image rows 1 .. IMG_H-2
//   s_axis_*[2]  line stream from DMA3: image rows 2 .. IMG_H-1
//   m_axis_*     restored image to DMA1 (write channel), IMG_W*IMG_H pixels,
//                TLAST on the last
//
// Each stream word is one pixel, R in bits 23:16, G 15:8, B 7:0, in row-major
// order, (IMG_H-2)*IMG_W words per input stream.  The three line streams are
// joined into window columns (vdf_line_join), the filter core builds the
// window and computes the restored pixel (vdf_filter_core), the result goes
// into the internal image memory (vdf_image_ram), and when the whole image is
// there it is streamed out (vdf_out_stream).  A new image is accepted as soon
// as the previous one has been sent.  `busy` is high while an image is being
// filtered or sent.
//
// Timing: 93 clocks per filtered pixel, 5 per border-only column, then one
// clock per output pixel; about 6.1 million clocks for a 256x256 image
// (61 ms at 100 MHz).
//
// The structure (three DMAs in, three lines in parallel, internal memory,
// result back through DMA1) follows the document; the stream word format,
// border handling and fixed point arithmetic are this design's choices.
// Assertions check that the stream sources keep an offered word until taken.
module vdf_top
  import vdf_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  rgb_t       s_axis_tdata  [3],
  input  logic [2:0] s_axis_tvalid,
  output logic [2:0] s_axis_tready,
  output rgb_t       m_axis_tdata,
  output logic       m_axis_tvalid,
  input  logic       m_axis_tready,
  output logic       m_axis_tlast,
  output logic       busy
);
  localparam int unsigned NPIX   = IMG_W * IMG_H;
  localparam int unsigned ADDR_W = $clog2(NPIX);

  rgb_t              col [3];
  logic              col_valid, col_ready;
  logic              we, re;
  logic [ADDR_W-1:0] waddr, raddr;
  rgb_t              wdata, rdata;
  logic              frame_done, out_busy, core_busy;

  vdf_line_join u_join (
    .clk, .rst_n,
    .s_tdata (s_axis_tdata),
    .s_tvalid(s_axis_tvalid),
    .s_tready(s_axis_tready),
    .col, .col_valid, .col_ready
  );

  vdf_filter_core #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ADDR_W(ADDR_W)) u_core (
    .clk, .rst_n, .col, .col_valid, .col_ready,
    .we, .waddr, .wdata,
    .frame_done, .out_busy, .busy(core_busy)
  );

  vdf_image_ram #(.DEPTH(NPIX), .ADDR_W(ADDR_W)) u_ram (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata
  );

  vdf_out_stream #(.NPIX(NPIX), .ADDR_W(ADDR_W)) u_out (
    .clk, .rst_n, .start(frame_done), .busy(out_busy),
    .re, .raddr, .rdata,
    .m_tdata (m_axis_tdata),
    .m_tvalid(m_axis_tvalid),
    .m_tready(m_axis_tready),
    .m_tlast (m_axis_tlast)
  );

  assign busy = core_busy || out_busy;

  // AXI-Stream rule for the DMA side: a line word once offered stays, unchanged,
  // until it is taken (the line join relies on it to keep the lines aligned)
  for (genvar k = 0; k < 3; k++) begin : g_in_rule
    a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
      s_axis_tvalid[k] && !s_axis_tready[k] |=> s_axis_tvalid[k] && $stable(s_axis_tdata[k]));
  end
endmodule
