// tb_tag_array: random tag writes and reads against a reference, plus way
// flushes. A read returns tag and valid one clock later; a flush must clear
// every valid bit of the flushed way and no other.
module tb_tag_array;
  import pvc_pkg::*;
  logic clk = 0, rst_n = 0, rd_en = 0, wr_en = 0;
  index_t index = '0;
  logic [1:0] wr_way = '0;
  tag_t wtag = '0;
  logic [3:0] flush = '0;
  tag_t rtag [4];
  logic [3:0] rvalid;
  tag_t ref_tag [4][SETS];
  logic ref_v   [4][SETS];
  int checks = 0, failures = 0, flushes = 0;

  tag_array dut (.clk, .rst_n, .rd_en, .index, .wr_en, .wr_way, .wtag, .flush, .rtag, .rvalid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 4; w++) for (int s = 0; s < SETS; s++) ref_v[w][s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      automatic int op = $urandom % 20;
      @(negedge clk);
      index = index_t'($urandom % 64);
      if (op < 9) begin
        wr_en = 1; wr_way = 2'($urandom); wtag = tag_t'($urandom);
        ref_tag[wr_way][index] = wtag; ref_v[wr_way][index] = 1;
      end else if (op == 19) begin
        flush = 4'(1) << ($urandom % 4); flushes++;
        for (int w = 0; w < 4; w++) if (flush[w]) for (int s = 0; s < SETS; s++) ref_v[w][s] = 0;
      end else rd_en = 1;
      @(negedge clk);
      if (rd_en)
        for (int w = 0; w < 4; w++) begin
          checks++;
          if (rvalid[w] !== ref_v[w][index] || (ref_v[w][index] && rtag[w] !== ref_tag[w][index])) begin
            failures++; $display("FAIL way %0d set %0d v=%0b/%0b", w, index, rvalid[w], ref_v[w][index]);
          end
        end
      rd_en = 0; wr_en = 0; flush = '0;
    end
    checks++;
    if (flushes == 0) begin failures++; $display("FAIL no flush exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
