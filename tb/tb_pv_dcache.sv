// tb_pv_dcache: end-to-end run of the permutable data cache with a 4000-cycle
// control interval (the design default is 4,000,000).
//
// The testbench closes the thermal loop: it counts the accesses of every
// physical subarray (logical subarray of each lookup ^ that way's SEL) and,
// shortly before each tick, sets each sensor reading to a first-order step
// towards 60 C + a fixed leakage offset per position + 150 C times the
// position's access rate (accesses per clock). The leakage map makes positions 0 and 3 the
// leakiest and 6 the coolest, as in a typical process-variation sample.
// Phase 1 (busy, bzip2-like) hammers logical subarrays 5 and 6; phase 2 is a
// near-idle, leakage-dominated phase. Checks:
//   - every read returns the reference data, before and after flushes;
//   - read hits answer two clocks after the request;
//   - each permutation moves the subarray the testbench expects (hottest, or
//     second hottest when the hottest is idle, onto the coolest) and is
//     applied with a flush of that way only;
//   - permutations happen only above the 5 C threshold, keeps only when the
//     peak fell;
//   - every mechanism (hit, miss, permutation, flush, request stall for a
//     grant, keep, second-hottest choice) happens at least once.
module tb_pv_dcache;
  import pvc_pkg::*;
  localparam int IV = 4000, TH = 20, NINT = 16;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, resp_valid;
  addr_t req_addr = '0; word_t req_wdata = '0, resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  addr_t mem_req_addr; word_t mem_req_wdata; line_t mem_resp_line;
  temp_t temp [NUM_WAYS][NUM_SUB];
  sub_idx_t sel [NUM_WAYS];
  logic evt_tick, evt_hit, evt_miss;
  logic [NUM_WAYS-1:0] evt_perm, evt_kept, evt_alt, evt_flush;
  int n_reads, n_writes;

  pv_dcache #(.INTERVAL_CYCLES(IV), .THRESH(TH), .RATE_PCT(5)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_resp_valid, .mem_resp_line,
    .temp, .sel, .evt_tick, .evt_perm, .evt_kept, .evt_alt, .evt_flush, .evt_hit, .evt_miss);

  l2_model #(.LATENCY(6)) u_l2 (.clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_resp_valid, .mem_resp_line, .n_reads, .n_writes);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_perm = 0, n_flush = 0, n_stall = 0, n_kept = 0, n_alt = 0, n_ticks = 0;
  int acc [NUM_WAYS][NUM_SUB];
  int prev_peak [NUM_WAYS];
  int exp_sel [NUM_WAYS];
  logic [NUM_WAYS-1:0] exp_pending = '0;
  int phase = 1;
  int peak_sum = 0;
  word_t ref_mem [addr_t];
  const int leak_c [NUM_SUB] = '{12, 6, 5, 10, 4, 3, 0, 2};   // C above 60 C at idle

  initial begin
    repeat (IV * (NINT + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- access accounting by physical position ----
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready)
      for (int w = 0; w < NUM_WAYS; w++) acc[w][int'(req_addr[13:11]) ^ int'(sel[w])]++;
    if (dut.u_ctrl.perm_grant && req_valid) n_stall++;
  end

  // ---- thermal model: update readings 20 clocks before each tick ----
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= (cyc == IV - 1) ? 0 : cyc + 1;
    if (cyc == IV - 21)
      for (int w = 0; w < NUM_WAYS; w++)
        for (int p = 0; p < NUM_SUB; p++) begin
          automatic int t_ss = 4 * (60 + leak_c[p]) + (4 * 150 * acc[w][p]) / IV;
          temp[w][p] <= temp_t'((int'(temp[w][p]) + t_ss) / 2);
          acc[w][p] = 0;
        end
  end

  // ---- check every decision against the readings the testbench drove ----
  always @(negedge clk) if (rst_n && evt_tick) begin
    n_ticks++;
    for (int w = 0; w < NUM_WAYS; w++) begin
      automatic int h = 0, c = 0, h2 = -1, pk;
      for (int p = 1; p < NUM_SUB; p++) begin
        if (temp[w][p] > temp[w][h]) h = p;
        if (temp[w][p] < temp[w][c]) c = p;
      end
      for (int p = 0; p < NUM_SUB; p++) if (p != h && (h2 < 0 || temp[w][p] > temp[w][h2])) h2 = p;
      pk = int'(temp[w][h]);
      if (w == 0) peak_sum += pk;
      if (evt_perm[w]) begin
        n_perm++;
        checks++;
        if (pk - int'(temp[w][c]) <= TH || pk < prev_peak[w]) begin
          failures++; $display("FAIL way %0d permuted without cause", w);
        end
        exp_sel[w] = (exp_pending[w] ? exp_sel[w] : int'(sel[w])) ^ ((evt_alt[w] ? h2 : h) ^ c);
        exp_pending[w] = 1;
      end
      if (evt_kept[w]) begin
        n_kept++;
        checks++;
        if (!(pk < prev_peak[w])) begin failures++; $display("FAIL way %0d kept though peak rose", w); end
      end
      if (evt_alt[w]) n_alt++;
      checks++;
      if (pk - int'(temp[w][c]) > TH && pk >= prev_peak[w] && !evt_perm[w] && (evt_alt[w] ? h2 : h) != c) begin
        failures++; $display("FAIL way %0d missed a permutation", w);
      end
      prev_peak[w] = pk;
    end
  end

  always @(negedge clk) if (rst_n && |evt_flush) begin
    n_flush++;
    checks++;
    if (evt_flush != exp_pending) begin failures++; $display("FAIL flush %b exp %b", evt_flush, exp_pending); end
    @(posedge clk); #1;
    for (int w = 0; w < NUM_WAYS; w++) if (exp_pending[w]) begin
      checks++;
      if (int'(sel[w]) != exp_sel[w]) begin failures++; $display("FAIL way %0d sel %0d exp %0d", w, sel[w], exp_sel[w]); end
    end
    exp_pending = '0;
  end

  function automatic word_t ref_read(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : u_l2.init_word(a);
  endfunction

  task automatic access(addr_t a, logic we);
    automatic int lat = 1;
    automatic logic hit = 0;
    req_valid = 1; req_addr = a; req_we = we; req_wdata = $urandom;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) begin
      @(negedge clk); lat++;
    end
    hit = evt_hit;
    if (we) ref_mem[a] = req_wdata;
    else begin
      checks++;
      if (resp_rdata !== ref_read(a)) begin failures++; $display("FAIL read %h got %h exp %h", a, resp_rdata, ref_read(a)); end
      if (hit) begin
        n_hit++;
        checks++;
        if (lat != 2) begin failures++; $display("FAIL hit latency %0d", lat); end
      end else n_miss++;
    end
  endtask

  initial begin
    for (int w = 0; w < NUM_WAYS; w++) begin
      prev_peak[w] = 0; exp_sel[w] = 0;
      for (int p = 0; p < NUM_SUB; p++) begin temp[w][p] = temp_t'(4 * (60 + leak_c[p])); acc[w][p] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: busy, logical subarrays 5 and 6 take most accesses
    while (n_ticks < 10) begin
      automatic int s = ($urandom % 8 < 7) ? 5 + $urandom % 2 : $urandom % 8;
      automatic addr_t a = {18'($urandom % 5), 3'(s), 6'($urandom % 8), 3'($urandom), 2'b00};
      access(a, $urandom % 5 == 0);
    end
    // phase 2: near idle, leakage dominates
    phase = 2;
    while (n_ticks < NINT) begin
      automatic addr_t a = {18'($urandom % 5), 3'($urandom), 6'($urandom % 8), 3'($urandom), 2'b00};
      repeat (60) @(negedge clk);
      access(a, 0);
    end
    $display("hits %0d misses %0d permutations %0d flushes %0d stalls %0d kept %0d second-hottest %0d",
             n_hit, n_miss, n_perm, n_flush, n_stall, n_kept, n_alt);
    $display("mean way-0 peak reading at ticks: %0d.%0d C", peak_sum / n_ticks / 4, 25 * ((peak_sum / n_ticks) % 4));
    checks++; if (n_hit == 0)   begin failures++; $display("FAIL no hit"); end
    checks++; if (n_miss == 0)  begin failures++; $display("FAIL no miss"); end
    checks++; if (n_perm == 0)  begin failures++; $display("FAIL no permutation"); end
    checks++; if (n_flush == 0) begin failures++; $display("FAIL no flush"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no request stalled by a grant"); end
    checks++; if (n_kept == 0)  begin failures++; $display("FAIL keep rule never applied"); end
    checks++; if (n_alt == 0)   begin failures++; $display("FAIL second-hottest rule never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
