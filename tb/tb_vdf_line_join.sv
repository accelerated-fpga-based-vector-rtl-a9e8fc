// tb_vdf_line_join -- test of the three-line stream join.
// Three queues of numbered words are offered with independent random valid
// gaps while the consumer's ready also toggles at random; a last phase keeps
// everything valid and ready.  A reference model of the one-entry column
// register runs alongside.  Checks: a stream is popped only when all three
// are and the register is free or being emptied, col_valid follows the
// model, the columns come out complete, aligned and in order, a held column
// does not change, and with no gaps one column passes per clock.
module tb_vdf_line_join;
  import vdf_pkg::*;

  localparam int N      = 2000;   // columns in the random phase
  localparam int NSTEAD = 200;    // columns in the gap-free phase

  logic       clk = 1'b0, rst_n = 1'b0;
  rgb_t       s_tdata [3];
  logic [2:0] s_tvalid, s_tready;
  rgb_t       col [3];
  logic       col_valid, col_ready;

  int  checks = 0, failures = 0;
  int  sent [3] = '{0, 0, 0};
  int  taken = 0;
  bit  model_full = 1'b0;
  bit  steady = 1'b0;
  int  cyc = 0, t_steady = 0;
  bit  popped [3] = '{0, 0, 0};   // handshake seen at the last rising edge

  vdf_line_join dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic rgb_t word(int k, int n);
    // word n of line k carries k in R and n in G/B
    return '{8'(k), 8'(n >> 8), 8'(n)};
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive at the falling edge; a valid word stays until it is popped
  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < 3; k++) begin
        if (!s_tvalid[k] || popped[k]) begin
          s_tvalid[k] = steady || $urandom_range(0, 3) != 0;
          s_tdata[k]  = word(k, sent[k]);
        end
      end
      col_ready = steady || $urandom_range(0, 3) != 0;
    end
  end

  // check just before the rising edge, then update the model
  always @(posedge clk) begin
    if (rst_n) begin
      bit load;
      cyc++;
      load = (&s_tvalid) && (!model_full || col_ready);
      check(col_valid == model_full, "col_valid differs from the model");
      for (int k = 0; k < 3; k++)
        check(s_tready[k] == load, $sformatf("line %0d ready", k));
      if (col_valid && col_ready) begin
        for (int k = 0; k < 3; k++)
          check(col[k] == word(k, taken), $sformatf("column %0d line %0d", taken, k));
        taken++;
      end else if (col_valid) begin
        for (int k = 0; k < 3; k++)
          check(col[k] == word(k, taken), $sformatf("held column %0d line %0d", taken, k));
      end
      for (int k = 0; k < 3; k++) begin
        popped[k] = s_tvalid[k] && s_tready[k];
        if (popped[k]) sent[k]++;
      end
      if (load) model_full = 1'b1;
      else if (col_ready) model_full = 1'b0;
    end
  end

  initial begin
    s_tvalid = '0; col_ready = 1'b0;
    for (int k = 0; k < 3; k++) s_tdata[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (taken >= N);
    @(negedge clk);
    steady = 1'b1;
    t_steady = cyc;
    wait (taken >= N + NSTEAD);
    // one clock to refill the register, then one column per clock
    check(cyc - t_steady <= NSTEAD + 2,
          $sformatf("%0d columns took %0d clocks without gaps", NSTEAD, cyc - t_steady));
    check(sent[0] == sent[1] && sent[1] == sent[2], "streams popped unequally");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
