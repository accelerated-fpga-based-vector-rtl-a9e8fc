// vdf_image_ram -- internal memory holding the restored image.
//
// One RGB pixel per word, DEPTH words (one per image pixel, row-major).
// Simple dual port: one synchronous write port used by the filter and one
// synchronous read port used by the output stream.  The read data appears
// one clock after `re` and is held while `re` is low, which lets the reader
// stall without losing a word.  Written as an array so that an FPGA flow maps
// it to block RAM.  Depth follows the 256x256 test images; word width, ports
// and read latency are this design's choices.
module vdf_image_ram
  import vdf_pkg::*;
#(
  parameter int unsigned DEPTH  = 65536,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  rgb_t              wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output rgb_t              rdata
);
  rgb_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
