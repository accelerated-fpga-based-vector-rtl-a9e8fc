// tb_vdf_filter_core -- test of the filter engine and its loop controller.
// Two frames of a 10x7 noisy image are fed as window columns (always
// available for frame 0, with random gaps for frame 1).  The memory writes
// are captured in a shadow image.  Checks: every address is written exactly
// once per frame; border pixels equal the noisy input; interior pixels are
// acceptable VDF outputs (vdf_ref_pkg::pick_ok); with no gaps, consecutive
// columns are taken 93 clocks apart when the window is full and 5 clocks
// apart for the first two columns of a row; frame_done pulses once per
// frame; no column is taken while out_busy is high.
module tb_vdf_filter_core;
  import vdf_pkg::*;
  import vdf_ref_pkg::*;

  localparam int W = 10, H = 7, AW = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  rgb_t col [3];
  logic col_valid = 1'b0, col_ready;
  logic we, frame_done, out_busy = 1'b0, busy;
  logic [AW-1:0] waddr;
  rgb_t wdata;

  int checks = 0, failures = 0, cyc = 0;

  vdf_filter_core #(.IMG_W(W), .IMG_H(H), .ADDR_W(AW)) dut (.*);

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
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  rgb_t img [];
  rgb_t clean [];
  rgb_t shadow [W * H];
  int   nwrite [W * H];
  int   ndone = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (we) begin
        check(int'(waddr) < W * H, "write address out of range");
        if (int'(waddr) < W * H) begin
          shadow[waddr] = wdata;
          nwrite[waddr]++;
        end
      end
      if (frame_done) ndone++;
      if (out_busy) check(!col_ready, "column offered while out_busy");
    end
  end

  task automatic run_frame(input bit gaps, input int f);
    rgb_t w9 [9];
    int last_take = -1, n = 0, dt;
    foreach (nwrite[a]) nwrite[a] = 0;
    gen_image(img, clean, W, H, 11 + f);
    for (int r = 0; r <= H - 3; r++) begin
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 2) == 0) @(negedge clk);
        for (int k = 0; k < 3; k++) col[k] = img[(r + k) * W + c];
        col_valid = 1'b1;
        #1;
        while (!col_ready) begin
          @(negedge clk);
          #1;
        end
        if (!gaps && last_take >= 0) begin
          // the gap is the processing time of the previous column, which
          // is (r-1, W-1) when c = 0 and (r, c-1) otherwise; that column was
          // filtered when its own column index was 2 or more
          dt = cyc - last_take;
          check(dt == ((c == 0 || c - 1 >= 2) ? 93 : 5),
                $sformatf("column (%0d,%0d) taken %0d clocks after the previous", r, c, dt));
        end
        last_take = cyc;
        @(negedge clk);
        col_valid = 1'b0;
        n++;
      end
    end
    wait (ndone == f + 1);
    // hold the memory as if it were being sent
    out_busy = 1'b1;
    col_valid = 1'b1;
    repeat (30) @(negedge clk);
    col_valid = 1'b0;
    out_busy = 1'b0;
    foreach (nwrite[a]) check(nwrite[a] == 1, $sformatf("address %0d written %0d times", a, nwrite[a]));
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (y == 0 || y == H - 1 || x == 0 || x == W - 1)
          check(shadow[y * W + x] == img[y * W + x], $sformatf("border (%0d,%0d)", y, x));
        else begin
          window_at(img, W, y, x, w9);
          check(pick_ok(w9, shadow[y * W + x]), $sformatf("pixel (%0d,%0d)", y, x));
        end
  endtask

  initial begin
    for (int k = 0; k < 3; k++) col[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(0, 0);
    run_frame(1, 1);
    check(ndone == 2, "frame_done count");
    check(!busy, "busy after the last frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
