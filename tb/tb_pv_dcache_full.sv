// tb_pv_dcache_full: one complete control interval of the cache at its
// default parameters (1 ms = 4,000,000 clocks, 5 C threshold, 5 % rate).
//
// A working set of lines in logical subarray 5 is written and then read over
// and over for the whole interval, so that subarray is far busier than 5 %
// of the clocks. The sensor readings put physical position 5 of every way at
// 80 C and position 6 at 62 C, the rest at 70 C. At the tick every way must
// decide to permute, the cache must flush all four ways, SEL must become
// 0 ^ (5 ^ 6) = 3, the tick must come exactly 4,000,000 clocks after reset,
// and all data must still read back correctly afterwards (now as misses).
module tb_pv_dcache_full;
  import pvc_pkg::*;
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

  pv_dcache dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_resp_valid, .mem_resp_line,
    .temp, .sel, .evt_tick, .evt_perm, .evt_kept, .evt_alt, .evt_flush, .evt_hit, .evt_miss);

  l2_model #(.LATENCY(6)) u_l2 (.clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_resp_valid, .mem_resp_line, .n_reads, .n_writes);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, tick_cyc = -1, n_hit = 0, n_miss = 0, n_flush = 0;
  logic done = 0;
  word_t ref_mem [addr_t];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (evt_tick && tick_cyc < 0) tick_cyc <= cyc + 1;
    if (evt_flush != 0) begin
      n_flush++;
      checks++;
      if (evt_flush != 4'hF) begin failures++; $display("FAIL flush %b", evt_flush); end
    end
  end

  initial begin
    repeat (4_300_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t line_addr(int i, int word);
    return {18'(i % 4), 3'd5, 6'(i / 4), 3'(word), 2'b00};
  endfunction

  task automatic access(addr_t a, logic we, word_t d);
    req_valid = 1; req_addr = a; req_we = we; req_wdata = d;
    do @(posedge clk); while (!req_ready);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (we) ref_mem[a] = d;
    else begin
      checks++;
      if (resp_rdata !== ref_mem[a]) begin failures++; $display("FAIL read %h", a); end
      if (evt_hit) n_hit++; else n_miss++;
    end
  endtask

  initial begin
    for (int w = 0; w < NUM_WAYS; w++)
      for (int p = 0; p < NUM_SUB; p++) temp[w][p] = temp_t'(4 * (p == 5 ? 80 : p == 6 ? 62 : 70));
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      access(line_addr(i, 0), 1, $urandom);
      access(line_addr(i, 0), 0, 0);           // fill the line
    end
    // read the working set until the interval ends
    for (int k = 0; tick_cyc < 0; k++) access(line_addr(k % 32, 0), 0, 0);
    checks++;
    if (evt_perm != 4'hF && dut.u_perm.pending != 4'hF && n_flush == 0) begin
      failures++; $display("FAIL no permutation decided");
    end
    repeat (4) @(negedge clk);
    for (int w = 0; w < NUM_WAYS; w++) begin
      checks++;
      if (sel[w] != 3'd3) begin failures++; $display("FAIL way %0d sel %0d", w, sel[w]); end
    end
    checks++;
    if (tick_cyc != 4_000_000) begin failures++; $display("FAIL tick at clock %0d", tick_cyc); end
    n_miss = 0;
    for (int i = 0; i < 32; i++) access(line_addr(i, 0), 0, 0);
    checks++;
    if (n_miss != 32) begin failures++; $display("FAIL %0d misses after flush, expected 32", n_miss); end
    checks++;
    if (n_flush != 1) begin failures++; $display("FAIL %0d flushes", n_flush); end
    $display("hits during the interval %0d, tick at clock %0d", n_hit, tick_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
