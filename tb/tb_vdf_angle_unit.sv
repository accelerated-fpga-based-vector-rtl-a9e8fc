// tb_vdf_angle_unit -- self-checking test of the pipelined angle unit.
// Feeds one pixel pair per clock (directed corner cases, then random pairs,
// some of them nearly parallel) and compares every result with an
// independent real-valued arccos, to within 1.5e-3 rad.  It also checks that
// each result appears exactly 6 clocks after its pair and that the tag
// travels with it.
module tb_vdf_angle_unit;
  import vdf_pkg::*;

  localparam int N_RAND  = 4000;
  localparam int LAT     = 6;
  localparam real TOL    = 1.5e-3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  idx_t in_tag, out_tag;
  rgb_t xi, xj;
  logic out_valid;
  angle_t angle;

  int checks = 0, failures = 0;

  vdf_angle_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real ref_angle(input rgb_t a, input rgb_t b);
    real dp, na, nb, c;
    if (a == '0 || b == '0) return 1.5707963267948966;
    dp = real'(a.r) * b.r + real'(a.g) * b.g + real'(a.b) * b.b;
    na = $sqrt(real'(a.r) * a.r + real'(a.g) * a.g + real'(a.b) * a.b);
    nb = $sqrt(real'(b.r) * b.r + real'(b.g) * b.g + real'(b.b) * b.b);
    c  = dp / (na * nb);
    if (c > 1.0) c = 1.0;
    return $acos(c);
  endfunction

  // expected results, indexed by issue cycle
  real  exp_a   [$];
  idx_t exp_tag [$];
  int   exp_cyc [$];
  int   cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real got, want;
      int  c0;
      checks++;
      if (exp_a.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        want = exp_a.pop_front();
        c0   = exp_cyc.pop_front();
        got  = real'(angle) / real'(1 << ANGLE_FRAC);
        if ((got - want > TOL) || (want - got > TOL) || out_tag != exp_tag.pop_front()
            || cyc - c0 != LAT) begin
          failures++;
          if (failures < 10)
            $display("mismatch: got %f want %f latency %0d", got, want, cyc - c0);
        end
      end
    end
  end

  task automatic issue(input rgb_t a, input rgb_t b);
    in_valid <= 1'b1;
    xi <= a; xj <= b;
    in_tag <= idx_t'($urandom_range(0, 8));
    @(posedge clk);
    // the pair is sampled at this edge: record after the NBA update
    exp_a.push_back(ref_angle(a, b));
    exp_tag.push_back(in_tag);
    exp_cyc.push_back(cyc);
  endtask

  initial begin
    rgb_t a, b;
    in_valid = 1'b0; xi = '0; xj = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // directed cases
    issue('{255, 255, 255}, '{255, 255, 255});   // identical: 0
    issue('{255, 0, 0},     '{0, 255, 0});       // orthogonal: pi/2
    issue('{255, 0, 0},     '{255, 255, 0});     // pi/4
    issue('{0, 0, 0},       '{10, 20, 30});      // black pixel
    issue('{0, 0, 0},       '{0, 0, 0});
    issue('{255, 255, 255}, '{255, 255, 254});   // nearly parallel
    issue('{1, 1, 1},       '{255, 255, 255});   // parallel, different norm
    issue('{255, 255, 255}, '{0, 0, 1});
    for (int n = 0; n < N_RAND; n++) begin
      a = rgb_t'($urandom);
      if (n % 3 == 0) begin
        // a neighbour of a: small angle
        b.r = 8'(a.r + $urandom_range(0, 4));
        b.g = 8'(a.g + $urandom_range(0, 4));
        b.b = 8'(a.b + $urandom_range(0, 4));
      end else begin
        b = rgb_t'($urandom);
      end
      if ($urandom_range(0, 9) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      issue(a, b);
    end
    in_valid <= 1'b0;
    repeat (LAT + 3) @(posedge clk);
    if (exp_a.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_a.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
