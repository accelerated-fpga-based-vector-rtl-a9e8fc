// tb_vdf_window -- test of the 3x3 window memory.
// Shifts random columns in, with random idle clocks, and after every clock
// reads all nine window positions through both read ports (port b in the
// reverse order, so the two ports are compared at different positions in
// the same clock).  The expected window is a model that keeps the last three
// columns: x(3*row + 2) is the newest column, x(3*row) the oldest.
module tb_vdf_window;
  import vdf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  rgb_t col_in [3];
  idx_t ra_idx = '0, rb_idx = '0;
  rgb_t ra, rb;
  rgb_t model [3][3];   // [row][column], column 2 newest
  int   nshift = 0;

  int checks = 0, failures = 0;

  vdf_window dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    for (int k = 0; k < 3; k++) col_in[k] = '0;
    foreach (model[r, c]) model[r][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);   // the reads below take part of a clock
      shift = $urandom_range(0, 3) != 0;
      for (int k = 0; k < 3; k++) col_in[k] = rgb_t'($urandom);
      @(negedge clk);
      // model update for the edge just passed
      if (shift) begin
        nshift++;
        for (int r = 0; r < 3; r++) begin
          model[r][0] = model[r][1];
          model[r][1] = model[r][2];
          model[r][2] = col_in[r];
        end
      end
      shift = 1'b0;
      // only positions written since reset are defined
      if (nshift >= 3) begin
        for (int i = 0; i < WIN; i++) begin
          ra_idx = idx_t'(i);
          rb_idx = idx_t'(WIN - 1 - i);
          #1;
          check(ra == model[i / 3][i % 3], $sformatf("step %0d port a x%0d", n, i + 1));
          check(rb == model[(WIN - 1 - i) / 3][(WIN - 1 - i) % 3], $sformatf("step %0d port b x%0d", n, WIN - i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
