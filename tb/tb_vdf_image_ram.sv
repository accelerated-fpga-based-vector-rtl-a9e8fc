// tb_vdf_image_ram -- test of the internal image memory.
// Writes random pixels to random addresses of a shadow copy, reads random
// addresses back (one-clock latency), including reads in the same clock as
// a write to another address, and checks that the read data is held while
// the read enable is low.
module tb_vdf_image_ram;
  import vdf_pkg::*;

  localparam int DEPTH = 1024, AW = 10;

  logic clk = 1'b0, we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  rgb_t wdata = '0, rdata;
  rgb_t shadow [DEPTH];
  bit   written [DEPTH];

  int checks = 0, failures = 0;

  vdf_image_ram #(.DEPTH(DEPTH), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    rgb_t expect_q;
    foreach (written[a]) written[a] = 0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(a); wdata = rgb_t'($urandom);
      shadow[a] = wdata; written[a] = 1;
    end
    @(negedge clk);
    we = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      re = 1'b1; raddr = AW'($urandom_range(0, DEPTH - 1));
      we = $urandom_range(0, 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      if (waddr == raddr) waddr = waddr + 1'b1;
      wdata = rgb_t'($urandom);
      expect_q = shadow[raddr];
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      check(rdata == expect_q, $sformatf("read %0d", n));
      // hold: no read for a clock, data must stay
      re = 1'b0; we = 1'b0; raddr = ~raddr;
      @(negedge clk);
      check(rdata == expect_q, $sformatf("hold %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
