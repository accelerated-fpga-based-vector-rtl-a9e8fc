// tb_vdf_top_full -- one full-size image through the VDF coprocessor.
//
// The coprocessor runs at its default size (256x256).  One noisy 256x256
// test image (3% impulses plus additive noise) is streamed in on the three
// line streams with no gaps and taken out with the output always ready.
// Every output pixel is checked (border pixels unchanged, interior pixels
// acceptable VDF choices), and the clock count is checked twice: exactly
// 93 per filtered pixel + 5 per border-only column + 3 + one per output
// pixel, and within 7.2 million clocks, i.e. 72 ms at 100 MHz, the
// processing time the published coprocessor achieves for this image size.
// Finally the PSNR against the clean image must be higher after filtering
// than before.
module tb_vdf_top_full;
  import vdf_pkg::*;
  import vdf_ref_pkg::*;

  localparam int W = 256, H = 256;
  localparam int NPIX = W * H;

  logic clk = 1'b0, rst_n = 1'b0;
  rgb_t s_axis_tdata [3];
  logic [2:0] s_axis_tvalid = '0, s_axis_tready;
  rgb_t m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 1'b1, m_axis_tlast, busy;

  int checks = 0, failures = 0;
  int cyc = 0;

  vdf_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  rgb_t img [];
  rgb_t clean [];
  int   nin = 0;          // words taken from each line stream
  int   first_in_cyc = -1, last_out_cyc = -1;
  rgb_t got [$];
  bit   done = 0;

  always @(negedge clk) begin
    if (rst_n && !done) begin
      if (nin < (H - 2) * W) begin
        s_axis_tvalid = 3'b111;
        for (int k = 0; k < 3; k++) s_axis_tdata[k] = img[(k + nin / W) * W + nin % W];
      end else begin
        s_axis_tvalid = 3'b000;
      end
      #1;
      if (s_axis_tready == 3'b111) begin
        if (first_in_cyc < 0) first_in_cyc = cyc;
        nin++;
      end
      if (m_axis_tvalid) begin
        got.push_back(m_axis_tdata);
        check(m_axis_tlast == (got.size() == NPIX), "TLAST position");
        if (got.size() == NPIX) begin
          last_out_cyc = cyc;
          done = 1;
        end
      end
    end
  end

  initial begin
    rgb_t w9 [9];
    int t_exp;
    gen_image(img, clean, W, H, 2024);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    t_exp = 93 * (H - 2) * (W - 2) + 5 * 2 * (H - 2) + 3 + (NPIX - 1);
    $display("image filtered and sent in %0d clocks (%0.2f ms at 100 MHz)",
             last_out_cyc - first_in_cyc, real'(last_out_cyc - first_in_cyc) / 1.0e5);
    check(last_out_cyc - first_in_cyc == t_exp,
          $sformatf("%0d clocks, expected %0d", last_out_cyc - first_in_cyc, t_exp));
    check(last_out_cyc - first_in_cyc <= 7200000, "slower than 72 ms at 100 MHz");
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (y == 0 || y == H - 1 || x == 0 || x == W - 1)
          check(got[y * W + x] == img[y * W + x], $sformatf("border (%0d,%0d)", y, x));
        else begin
          window_at(img, W, y, x, w9);
          check(pick_ok(w9, got[y * W + x]), $sformatf("pixel (%0d,%0d)", y, x));
        end
    begin
      rgb_t outimg [];
      real  p_in, p_out;
      outimg = new[NPIX];
      foreach (outimg[n]) outimg[n] = got[n];
      p_in  = psnr(img, clean);
      p_out = psnr(outimg, clean);
      $display("PSNR against the clean image: noisy %0.2f dB, filtered %0.2f dB", p_in, p_out);
      check(p_out > p_in, "filtering did not raise the PSNR");
    end
    repeat (5) @(negedge clk);
    check(!busy, "busy after the image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
