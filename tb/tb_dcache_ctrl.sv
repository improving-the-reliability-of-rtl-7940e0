// tb_dcache_ctrl: the cache controller with the real tag and data arrays and
// a behavioural next level. Random word reads and writes on a small address
// pool (several tags per set, so lines get evicted) are checked against a
// reference memory. Read hits must answer exactly two clocks after the
// request. The testbench raises "permutation pending" at random; the grant
// must come only between requests, hold requests off, and is answered by
// flushing one way and changing that way's crossbar setting, after which
// data must still read back correctly.
module tb_dcache_ctrl;
  import pvc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0, resp_valid;
  addr_t req_addr = '0;
  word_t req_wdata = '0, resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  addr_t mem_req_addr; word_t mem_req_wdata; line_t mem_resp_line;
  logic tag_rd_en, tag_wr_en; logic [1:0] tag_wr_way; tag_t tag_wtag;
  tag_t rtag [4]; logic [3:0] rvalid;
  logic arr_en, arr_we; logic [3:0] arr_way_en; index_t arr_index; wmask_t arr_wmask; line_t arr_wline;
  line_t rline [4]; sub_oh_t phys_act [4]; sub_idx_t sel [4];
  logic perm_pending = 0, perm_grant, evt_hit, evt_miss;
  logic [3:0] flush_way = '0;
  int n_reads, n_writes;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_grant = 0, n_whit = 0, n_evict = 0;
  word_t ref_mem [addr_t];

  dcache_ctrl dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata, .mem_resp_valid, .mem_resp_line,
    .tag_rd_en, .tag_wr_en, .tag_wr_way, .tag_wtag, .rtag, .rvalid,
    .arr_en, .arr_we, .arr_way_en, .arr_index, .arr_wmask, .arr_wline, .rline,
    .perm_pending, .perm_grant, .evt_hit, .evt_miss);

  tag_array u_tags (.clk, .rst_n, .rd_en(tag_rd_en), .index(arr_index), .wr_en(tag_wr_en),
    .wr_way(tag_wr_way), .wtag(tag_wtag), .flush(perm_grant ? flush_way : 4'b0), .rtag, .rvalid);
  data_array u_data (.clk, .rst_n, .en(arr_en), .we(arr_we), .way_en(arr_way_en), .index(arr_index),
    .wmask(arr_wmask), .wline(arr_wline), .sel, .phys_act, .rline);
  l2_model #(.LATENCY(6)) u_l2 (.clk, .rst_n, .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr,
    .mem_req_wdata, .mem_resp_valid, .mem_resp_line, .n_reads, .n_writes);

  always #5 clk = ~clk;

  function automatic word_t ref_read(addr_t a);
    return ref_mem.exists(a) ? ref_mem[a] : u_l2.init_word(a);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hit and full-set flags of the request in flight
  logic saw_hit = 0, saw_full = 0;
  always @(posedge clk) begin
    if (evt_hit) saw_hit <= 1;
    if (dut.state == dut.S_LOOKUP && &rvalid) saw_full <= 1;
  end

  // permutation requests and their effect
  always @(posedge clk) begin
    if (perm_grant) begin
      n_grant++;
      checks++;
      if (req_ready) begin failures++; $display("FAIL request accepted during grant"); end
      for (int w = 0; w < 4; w++) if (flush_way[w]) sel[w] <= sel[w] + 3'd3;
    end
  end
  always @(negedge clk) begin
    if (perm_grant) perm_pending <= 0;
    else if (!perm_pending && $urandom % 60 == 0) begin
      perm_pending <= 1;
      flush_way    <= 4'(1) << ($urandom % 4);
    end
  end

  initial begin
    for (int w = 0; w < 4; w++) sel[w] = 3'(w);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      automatic addr_t a = {18'($urandom % 6), 9'(($urandom % 12) * 37), 3'($urandom), 2'b00};
      automatic int lat = 0;
      @(negedge clk);
      req_valid = 1; req_addr = a; req_we = ($urandom % 4 == 0); req_wdata = $urandom;
      do @(posedge clk); while (!req_ready);
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      saw_hit = 0; saw_full = 0;
      while (!resp_valid) begin @(negedge clk); lat++; end
      if (!(saw_hit || evt_hit) && !req_we && saw_full) n_evict++;
      if (req_we) begin
        ref_mem[a] = req_wdata;
        if (saw_hit) n_whit++;
      end else begin
        checks++;
        if (resp_rdata !== ref_read(a)) begin
          failures++; $display("FAIL read %h got %h exp %h", a, resp_rdata, ref_read(a));
        end
        if (saw_hit || evt_hit) begin
          n_hit++;
          checks++;
          if (lat != 2) begin failures++; $display("FAIL hit latency %0d", lat); end
        end else n_miss++;
      end
    end
    checks++; if (n_hit == 0)   begin failures++; $display("FAIL no read hit"); end
    checks++; if (n_miss == 0)  begin failures++; $display("FAIL no read miss"); end
    checks++; if (n_whit == 0)  begin failures++; $display("FAIL no write hit"); end
    checks++; if (n_grant == 0) begin failures++; $display("FAIL no permutation grant"); end
    checks++; if (n_evict == 0) begin failures++; $display("FAIL no eviction"); end
    $display("read hits %0d misses %0d write hits %0d grants %0d evictions %0d", n_hit, n_miss, n_whit, n_grant, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
