// tb_vdf_top_workloads -- the coprocessor on the noise types and the second
// image size it is evaluated with.
//
// The coprocessor is built for 176x144 images.  Two images go through it:
// one with 3% salt-and-pepper impulses, one with Gaussian noise of sigma 5.
// For each: every output pixel is checked (border unchanged, interior an
// acceptable VDF choice), the clock count must equal 93 per filtered pixel +
// 5 per border-only column + 3 + one per output pixel and stay within
// 3.1 million clocks (31 ms at 100 MHz, the published time for this size),
// and the PSNR against the clean image is reported; for impulsive noise it
// must rise.
module tb_vdf_top_workloads;
  import vdf_pkg::*;
  import vdf_ref_pkg::*;

  localparam int W = 176, H = 144;
  localparam int NPIX = W * H;

  logic clk = 1'b0, rst_n = 1'b0;
  rgb_t s_axis_tdata [3];
  logic [2:0] s_axis_tvalid = '0, s_axis_tready;
  rgb_t m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 1'b1, m_axis_tlast, busy;

  int checks = 0, failures = 0;
  int cyc = 0;

  vdf_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (6000000) @(posedge clk);
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

  rgb_t img [], clean [];
  int   nin = 0;
  int   first_in_cyc = -1, last_out_cyc = -1;
  rgb_t got [$];
  bit   running = 0, done = 0;

  always @(negedge clk) begin
    if (rst_n && running && !done) begin
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

  task automatic run(input noise_t mode, input string name);
    rgb_t w9 [9];
    rgb_t outimg [];
    real  p_in, p_out;
    int   t_exp;
    gen_image(img, clean, W, H, 5, mode);
    nin = 0; first_in_cyc = -1; got.delete(); done = 0;
    @(negedge clk);
    running = 1;
    wait (done);
    running = 0;
    s_axis_tvalid = '0;
    t_exp = 93 * (H - 2) * (W - 2) + 5 * 2 * (H - 2) + 3 + (NPIX - 1);
    check(last_out_cyc - first_in_cyc == t_exp,
          $sformatf("%s: %0d clocks, expected %0d", name, last_out_cyc - first_in_cyc, t_exp));
    check(last_out_cyc - first_in_cyc <= 3100000, {name, ": slower than 31 ms at 100 MHz"});
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (y == 0 || y == H - 1 || x == 0 || x == W - 1)
          check(got[y * W + x] == img[y * W + x], $sformatf("%s border (%0d,%0d)", name, y, x));
        else begin
          window_at(img, W, y, x, w9);
          check(pick_ok(w9, got[y * W + x]), $sformatf("%s pixel (%0d,%0d)", name, y, x));
        end
    outimg = new[NPIX];
    foreach (outimg[n]) outimg[n] = got[n];
    p_in  = psnr(img, clean);
    p_out = psnr(outimg, clean);
    $display("%s: %0d clocks (%0.2f ms at 100 MHz), PSNR noisy %0.2f dB, filtered %0.2f dB",
             name, last_out_cyc - first_in_cyc, real'(last_out_cyc - first_in_cyc) / 1.0e5, p_in, p_out);
    if (mode == NOISE_IMPULSE) check(p_out > p_in, {name, ": filtering did not raise the PSNR"});
    repeat (5) @(negedge clk);
    check(!busy, {name, ": busy after the image"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(NOISE_IMPULSE, "3% impulsive noise");
    run(NOISE_GAUSS, "Gaussian noise sigma 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
