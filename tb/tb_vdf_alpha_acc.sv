// tb_vdf_alpha_acc -- test of the nine angular-distance accumulators.
// For many windows: clear, add 81 random angles (nine per index, in random
// order, with idle clocks between) and compare the nine sums with sums kept
// in the testbench.  Also adds maximal angles to show there is no overflow,
// and checks that clear wins over an add in the same clock.
module tb_vdf_alpha_acc;
  import vdf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, add_valid = 1'b0;
  idx_t add_idx = '0;
  angle_t add_angle = '0;
  alpha_t alpha [WIN];
  longint sum [WIN];

  int checks = 0, failures = 0;

  vdf_alpha_acc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 200; w++) begin
      // clear together with an add: clear must win
      clear = 1'b1; add_valid = 1'b1; add_idx = idx_t'(w % 9); add_angle = angle_t'(1234);
      @(negedge clk);
      clear = 1'b0; add_valid = 1'b0;
      foreach (sum[k]) sum[k] = 0;
      for (int n = 0; n < 81; n++) begin
        add_valid = 1'b1;
        add_idx   = idx_t'($urandom_range(0, 8));
        add_angle = (w % 10 == 0) ? ANGLE_HALF_PI : angle_t'($urandom_range(0, 102944));
        sum[add_idx] += longint'(add_angle);
        @(negedge clk);
        add_valid = 1'b0;
        if ($urandom_range(0, 4) == 0) @(negedge clk);
      end
      for (int k = 0; k < WIN; k++) begin
        checks++;
        if (longint'(alpha[k]) != sum[k]) begin
          failures++;
          if (failures < 10) $display("FAIL: window %0d alpha%0d = %0d, expected %0d", w, k + 1, alpha[k], sum[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
