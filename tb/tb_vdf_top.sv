// tb_vdf_top -- end-to-end test of the VDF coprocessor on small images.
//
// Three frames of a 12x9 noisy test image pass through the coprocessor:
//   frame 0  all streams always valid, output always ready: the clock count
//            from the first input word to the first output word must equal
//            93 per filtered pixel + 5 per border-only column + 3 (one
//            clock in the line join register,
//            one in the done state, one to read the first word);
//   frame 1  each line stream drops its valid at random and the output is
//            back-pressured at random; its input is offered while frame 0 is
//            still being sent, so the coprocessor must hold it back;
//   frame 2  as frame 1, a different image.
// Every output pixel is checked: border pixels must be the noisy input,
// interior ones an acceptable VDF choice (vdf_ref_pkg::pick_ok), and TLAST
// must mark exactly the last pixel.  Counted mechanisms (each must occur):
// line-stream misalignment wait, output back-pressure, input held while the
// previous image is sent, windows holding a black pixel, border copies.
module tb_vdf_top;
  import vdf_pkg::*;
  import vdf_ref_pkg::*;

  localparam int W = 12, H = 9, NFRAMES = 3;
  localparam int NPIX = W * H;

  logic clk = 1'b0, rst_n = 1'b0;
  rgb_t s_axis_tdata [3];
  logic [2:0] s_axis_tvalid = '0, s_axis_tready;
  rgb_t m_axis_tdata;
  logic m_axis_tvalid, m_axis_tready = 1'b0, m_axis_tlast, busy;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_linewait = 0, n_backpressure = 0, n_hold = 0, n_black = 0, n_border = 0;

  vdf_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
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

  rgb_t img [NFRAMES][];
  rgb_t clean [];
  rgb_t q [3][$];
  int   in_frame = 0;   // frame whose words are being queued
  bit   stall_in = 0, stall_out = 0;
  bit   hs [3] = '{0, 0, 0};
  int   first_in_cyc = -1, first_out_cyc = -1;

  // stream drivers and output sink, all acting at the falling edge
  rgb_t got [$];
  int   out_frame = 0;
  bit   done = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 3; k++) begin
        if (hs[k]) void'(q[k].pop_front());
        if (!s_axis_tvalid[k] || hs[k]) begin
          s_axis_tvalid[k] = (q[k].size() > 0) && (!stall_in || $urandom_range(0, 3) != 0);
          if (s_axis_tvalid[k]) s_axis_tdata[k] = q[k][0];
        end
      end
      m_axis_tready = !stall_out || ($urandom_range(0, 2) != 0);
      #1;
      for (int k = 0; k < 3; k++) hs[k] = s_axis_tvalid[k] && s_axis_tready[k];
      if (hs[0] && first_in_cyc < 0) first_in_cyc = cyc;
      if (m_axis_tvalid && first_out_cyc < 0) first_out_cyc = cyc;
      if (s_axis_tvalid != 3'b000 && s_axis_tvalid != 3'b111) n_linewait++;
      if (m_axis_tvalid && !m_axis_tready) n_backpressure++;
      if (s_axis_tvalid == 3'b111 && s_axis_tready == 3'b000 && dut.out_busy) n_hold++;
      check(hs[0] == hs[1] && hs[1] == hs[2], "line streams taken out of step");
      if (m_axis_tvalid && m_axis_tready) begin
        got.push_back(m_axis_tdata);
        check(m_axis_tlast == (got.size() == NPIX), "TLAST position");
        if (got.size() == NPIX) begin
          check_frame(out_frame);
          got.delete();
          out_frame++;
          if (out_frame == NFRAMES) done = 1;
        end
      end
    end
  end

  task automatic check_frame(input int f);
    rgb_t w9 [9];
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        if (y == 0 || y == H - 1 || x == 0 || x == W - 1) begin
          n_border++;
          check(got[y * W + x] == img[f][y * W + x],
                $sformatf("frame %0d border pixel (%0d,%0d) got %h want %h", f, y, x, got[y*W+x], img[f][y*W+x]));
        end else begin
          window_at(img[f], W, y, x, w9);
          foreach (w9[i]) if (w9[i] == '0) begin n_black++; break; end
          check(pick_ok(w9, got[y * W + x]),
                $sformatf("frame %0d pixel (%0d,%0d) = %h", f, y, x, got[y * W + x]));
        end
      end
    end
  endtask

  task automatic queue_frame(input int f);
    for (int k = 0; k < 3; k++)
      for (int n = 0; n < (H - 2) * W; n++)
        q[k].push_back(img[f][(k + n / W) * W + n % W]);
  endtask

  initial begin
    int t_core;
    for (int f = 0; f < NFRAMES; f++) gen_image(img[f], clean, W, H, 17 * f + 3);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // frame 0, no stalls: exact timing
    queue_frame(0);
    wait (q[0].size() == 0);
    // frame 1 offered while frame 0 is still being computed / sent
    stall_in = 1; stall_out = 1;
    queue_frame(1);
    wait (out_frame == 1);
    t_core = 93 * (H - 2) * (W - 2) + 5 * 2 * (H - 2);
    check(first_out_cyc - first_in_cyc == t_core + 3,
          $sformatf("frame 0 latency %0d, expected %0d", first_out_cyc - first_in_cyc, t_core + 3));
    wait (q[0].size() == 0);
    queue_frame(2);
    wait (done);
    repeat (5) @(negedge clk);
    check(!busy, "busy after the last frame");
    $display("line waits %0d, output back-pressure %0d, input held %0d, black windows %0d, border pixels %0d",
             n_linewait, n_backpressure, n_hold, n_black, n_border);
    check(n_linewait > 0, "line-stream wait never happened");
    check(n_backpressure > 0, "output back-pressure never happened");
    check(n_hold > 0, "input never held during output");
    check(n_black > 0, "no window with a black pixel");
    check(n_border > 0, "no border pixel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
