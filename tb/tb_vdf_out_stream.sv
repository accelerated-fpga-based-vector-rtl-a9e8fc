// tb_vdf_out_stream -- test of the AXI-Stream output of the restored image.
// The memory is a vdf_image_ram filled with a known pattern.  Three packets
// are requested; the sink's ready is always high for the first (the packet
// must then take exactly NPIX clocks, one word per clock) and random for the
// others.  Checks every word in order, TLAST only on the last, busy, and
// that a start while busy is ignored.
module tb_vdf_out_stream;
  import vdf_pkg::*;

  localparam int NPIX = 200, AW = 8;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy;
  logic re, we = 1'b0;
  logic [AW-1:0] raddr, waddr = '0;
  rgb_t rdata, wdata = '0;
  rgb_t m_tdata;
  logic m_tvalid, m_tready = 1'b0, m_tlast;

  int checks = 0, failures = 0;
  int cnt = 0, pkt = 0, first_cyc = 0, cyc = 0;

  vdf_image_ram #(.DEPTH(256), .ADDR_W(AW)) u_ram (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  vdf_out_stream #(.NPIX(NPIX), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic rgb_t pattern(input int a);
    return rgb_t'(24'(a * 40503 + 7));
  endfunction

  // sink
  always @(negedge clk) begin
    if (rst_n) begin
      // ready for the coming edge, then the word that edge will take
      m_tready = (pkt == 0) || ($urandom_range(0, 2) != 0);
      if (m_tvalid && m_tready) begin
        if (cnt == 0) first_cyc = cyc;
        check(m_tdata == pattern(cnt), $sformatf("packet %0d word %0d", pkt, cnt));
        check(m_tlast == (cnt == NPIX - 1), $sformatf("tlast at word %0d", cnt));
        cnt++;
        if (cnt == NPIX) begin
          if (pkt == 0) check(cyc - first_cyc == NPIX - 1, "full-rate packet length");
          cnt = 0;
          pkt++;
          m_tready = 1'b1;
        end
      end
    end
  end

  initial begin
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = pattern(a);
    end
    @(negedge clk);
    we = 1'b0;
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !m_tvalid, "idle after reset");
    for (int p = 0; p < 3; p++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      check(busy, "busy after start");
      repeat (20) @(negedge clk);
      start = 1'b1;           // ignored: already busy
      @(negedge clk);
      start = 1'b0;
      wait (pkt == p + 1);
      @(negedge clk);
      @(negedge clk);
      check(!busy && !m_tvalid, $sformatf("idle after packet %0d: busy %0d valid %0d cnt %0d", p, busy, m_tvalid, cnt));
    end
    repeat (10) @(negedge clk);
    check(pkt == 3, "number of packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
