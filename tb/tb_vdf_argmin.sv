// tb_vdf_argmin -- test of the minimum-angular-distance comparator.
// Random alphas, drawn from a small range so that ties are frequent, and
// from the full range; the expected result is the first index holding the
// smallest alpha, found by a scan in the testbench.
module tb_vdf_argmin;
  import vdf_pkg::*;

  alpha_t alpha [WIN];
  idx_t   min_idx;

  int checks = 0, failures = 0, ties = 0;

  vdf_argmin dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best, n_best;
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < WIN; k++) begin
        alpha[k] = (n % 2) ? alpha_t'($urandom_range(0, 5)) : alpha_t'($urandom);
      end
      #1;
      best = 0; n_best = 1;
      for (int k = 1; k < WIN; k++) begin
        if (alpha[k] < alpha[best]) begin best = k; n_best = 1; end
        else if (alpha[k] == alpha[best]) n_best++;
      end
      if (n_best > 1) ties++;
      checks++;
      if (min_idx != idx_t'(best)) begin
        failures++;
        if (failures < 10) $display("FAIL: case %0d got index %0d expected %0d", n, min_idx, best);
      end
      #9;
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL: no ties tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
