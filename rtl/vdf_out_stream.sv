// vdf_out_stream -- sends the restored image from the internal memory to DMA1.
//
// A `start` pulse (given when the last pixel of the image has been written)
// makes the block read the NPIX words of the internal memory in address
// order and send them as one AXI-Stream packet: m_tdata is the RGB pixel,
// m_tlast marks the last one.  One word per clock when m_tready stays high.
// The memory read is issued in the clock in which the output register is
// empty or being taken, and its data lands in the memory's output register
// together with m_tvalid, so a stall simply holds both; no skid buffer is
// needed.  `busy` is high from `start` until the last word has been taken.
// The document specifies that the complete image goes back through DMA1;
// the packet format (one packet per image, TLAST on the last pixel) is this
// design's choice.
module vdf_out_stream
  import vdf_pkg::*;
#(
  parameter int unsigned NPIX   = 65536,
  parameter int unsigned ADDR_W = $clog2(NPIX)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  // memory read port
  output logic              re,
  output logic [ADDR_W-1:0] raddr,
  input  rgb_t              rdata,
  // AXI-Stream master
  output rgb_t              m_tdata,
  output logic              m_tvalid,
  input  logic              m_tready,
  output logic              m_tlast
);
  logic              reading;   // words left to read
  logic [ADDR_W-1:0] addr;
  logic              advance;

  assign advance = !m_tvalid || m_tready;
  assign re      = reading && advance;
  assign raddr   = addr;
  assign m_tdata = rdata;
  assign busy    = reading || m_tvalid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      addr     <= '0;
      m_tvalid <= 1'b0;
      m_tlast  <= 1'b0;
    end else begin
      if (start && !busy) begin
        reading <= 1'b1;
        addr    <= '0;
      end else if (re) begin
        addr <= addr + 1'b1;
        if (addr == ADDR_W'(NPIX - 1)) reading <= 1'b0;
      end
      if (advance) begin
        m_tvalid <= re;
        m_tlast  <= re && (addr == ADDR_W'(NPIX - 1));
      end
    end
  end

  // AXI-Stream rule: a word once offered stays until taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata) && $stable(m_tlast);
  endproperty
  a_hold: assert property (p_hold);
endmodule
