// thermal_env: a closed-loop environment around one pv_dcache, for comparing
// the cache with and without dynamic permutation on the same traffic.
//
// It holds the cache, a next-level model, a CPU traffic generator and the
// same first-order thermal model as tb_pv_dcache: each interval every sensor
// reading moves half-way towards 60 C + a per-position leakage offset +
// 150 C x the position's access rate. The traffic is a deterministic
// pseudo-random stream (xorshift, fixed seed), so two environments see the
// same sequence of requests. HOT_PCT percent of the requests go to logical
// subarrays 5 and 6, the rest anywhere. After WARMUP ticks it sums, per tick,
// the hottest reading of the whole cache, and raises `done` after N_TICKS.
// Read data is checked against a reference; `failures` counts mismatches.
module thermal_env
  import pvc_pkg::*;
#(
  parameter int unsigned THRESH  = 20,
  parameter int unsigned IV      = 4000,
  parameter int unsigned N_TICKS = 40,
  parameter int unsigned WARMUP  = 4,
  parameter int unsigned HOT_PCT = 85
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   peak_sum,     // sum of per-tick peaks after warm-up, 0.25 C units
  output int   peak_max,
  output int   n_measured,
  output int   n_perm,
  output int   n_req,
  output int   failures
);
  logic req_valid, req_ready, req_we, resp_valid;
  addr_t req_addr; word_t req_wdata, resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  addr_t mem_req_addr; word_t mem_req_wdata; line_t mem_resp_line;
  temp_t temp [NUM_WAYS][NUM_SUB];
  sub_idx_t sel [NUM_WAYS];
  logic evt_tick, evt_hit, evt_miss;
  logic [NUM_WAYS-1:0] evt_perm, evt_kept, evt_alt, evt_flush;
  int n_reads, n_writes;

  pv_dcache #(.INTERVAL_CYCLES(IV), .THRESH(THRESH), .RATE_PCT(5)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_resp_valid, .mem_resp_line,
    .temp, .sel, .evt_tick, .evt_perm, .evt_kept, .evt_alt, .evt_flush, .evt_hit, .evt_miss);

  l2_model #(.LATENCY(6)) u_l2 (.clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_resp_valid, .mem_resp_line, .n_reads, .n_writes);

  const int leak_c [NUM_SUB] = '{12, 6, 5, 10, 4, 3, 0, 2};
  int acc [NUM_WAYS][NUM_SUB];
  int cyc, n_ticks;
  logic [31:0] rng;
  word_t ref_mem [addr_t];

  function automatic logic [31:0] xs(logic [31:0] x);
    x ^= x << 13; x ^= x >> 17; x ^= x << 5;
    return x;
  endfunction

  initial begin
    done = 0; peak_sum = 0; peak_max = 0; n_measured = 0; n_perm = 0; n_req = 0; failures = 0;
    cyc = 0; n_ticks = 0; rng = 32'h1234_5678;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    for (int w = 0; w < NUM_WAYS; w++)
      for (int p = 0; p < NUM_SUB; p++) begin temp[w][p] = temp_t'(4 * (60 + leak_c[p])); acc[w][p] = 0; end
  end

  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready)
      for (int w = 0; w < NUM_WAYS; w++) acc[w][int'(req_addr[13:11]) ^ int'(sel[w])]++;
    cyc <= (cyc == int'(IV) - 1) ? 0 : cyc + 1;
    if (cyc == int'(IV) - 21)
      for (int w = 0; w < NUM_WAYS; w++)
        for (int p = 0; p < NUM_SUB; p++) begin
          automatic int t_ss = 4 * (60 + leak_c[p]) + (4 * 150 * acc[w][p]) / int'(IV);
          temp[w][p] <= temp_t'((int'(temp[w][p]) + t_ss) / 2);
          acc[w][p] = 0;
        end
    if (evt_tick) begin
      automatic int pk = 0;
      for (int w = 0; w < NUM_WAYS; w++) for (int p = 0; p < NUM_SUB; p++) if (int'(temp[w][p]) > pk) pk = int'(temp[w][p]);
      n_ticks <= n_ticks + 1;
      if (n_ticks >= int'(WARMUP)) begin
        peak_sum   <= peak_sum + pk;
        n_measured <= n_measured + 1;
        if (pk > peak_max) peak_max <= pk;
      end
      if (n_ticks + 1 >= int'(N_TICKS)) done <= 1;
    end
    for (int w = 0; w < NUM_WAYS; w++) if (evt_perm[w]) n_perm <= n_perm + 1;
  end

  initial begin
    @(posedge rst_n);
    while (!done) begin
      automatic int s;
      automatic addr_t a;
      automatic logic we;
      rng = xs(rng);
      s  = (rng[6:0] % 100 < HOT_PCT) ? 5 + int'(rng[7]) : int'(rng[10:8]);
      a  = {18'(rng[13:11] % 5), 3'(s), 6'(rng[19:14] % 8), 3'(rng[22:20]), 2'b00};
      we = rng[27:25] == 0;
      @(negedge clk);
      req_valid = 1; req_addr = a; req_we = we; req_wdata = rng;
      do @(posedge clk); while (!req_ready);
      @(negedge clk);
      req_valid = 0;
      n_req++;
      while (!resp_valid) @(negedge clk);
      if (we) ref_mem[a] = rng;
      else if (resp_rdata !== (ref_mem.exists(a) ? ref_mem[a] : u_l2.init_word(a))) failures++;
    end
  end
endmodule
