// tb_thermal_compare: peak temperature of the cache with dynamic permutation
// against the same cache that never permutes (threshold out of reach, the
// in-order "original" placement), on the same bzip2-like request stream and
// the same thermal model (see thermal_env). Both run 40 intervals of 4000
// clocks; the first 4 are warm-up. The check: the permuting cache permutes,
// the baseline never does, all read data is right in both, and the mean of
// the per-interval peak readings is lower with permutation. Both means and
// the reduction are printed.
module tb_thermal_compare;
  localparam int NT = 40;
  logic clk = 0, rst_n = 0;
  logic done_d, done_b;
  int sum_d, max_d, m_d, perm_d, req_d, fail_d;
  int sum_b, max_b, m_b, perm_b, req_b, fail_b;
  int checks = 0, failures = 0;

  thermal_env #(.THRESH(20),   .N_TICKS(NT)) u_dyn  (.clk, .rst_n, .done(done_d), .peak_sum(sum_d), .peak_max(max_d),
    .n_measured(m_d), .n_perm(perm_d), .n_req(req_d), .failures(fail_d));
  thermal_env #(.THRESH(1023), .N_TICKS(NT)) u_base (.clk, .rst_n, .done(done_b), .peak_sum(sum_b), .peak_max(max_b),
    .n_measured(m_b), .n_perm(perm_b), .n_req(req_b), .failures(fail_b));

  always #5 clk = ~clk;

  initial begin
    repeat (4000 * (NT + 5)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_d && done_b);
    @(negedge clk);
    $display("dynamic : mean peak %0d.%02d C, max %0d.%02d C, %0d permutations, %0d requests",
             sum_d / m_d / 4, 25 * ((sum_d / m_d) % 4), max_d / 4, 25 * (max_d % 4), perm_d, req_d);
    $display("original: mean peak %0d.%02d C, max %0d.%02d C, %0d permutations, %0d requests",
             sum_b / m_b / 4, 25 * ((sum_b / m_b) % 4), max_b / 4, 25 * (max_b % 4), perm_b, req_b);
    $display("mean peak reduction: %0.2f C", (real'(sum_b) / m_b - real'(sum_d) / m_d) / 4.0);
    checks++; if (fail_d != 0 || fail_b != 0) begin failures++; $display("FAIL read data %0d/%0d", fail_d, fail_b); end
    checks++; if (perm_d == 0) begin failures++; $display("FAIL no permutation"); end
    checks++; if (perm_b != 0) begin failures++; $display("FAIL baseline permuted"); end
    checks++; if (!(real'(sum_d) / m_d < real'(sum_b) / m_b)) begin failures++; $display("FAIL no peak reduction"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
