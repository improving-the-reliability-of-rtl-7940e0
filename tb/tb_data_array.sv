// tb_data_array: four ways with different crossbar settings. Checks that a
// read activates, in every way, the physical subarray (index[8:6] ^ sel[w]),
// that writes touch only the enabled ways, and that data read back matches a
// reference kept by way, physical subarray and row.
module tb_data_array;
  import pvc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [3:0] way_en = '0;
  index_t index = '0;
  wmask_t wmask = '0;
  line_t  wline = '0;
  sub_idx_t sel [4];
  sub_oh_t  phys_act [4];
  line_t    rline [4];
  line_t    ref_mem [4][8][64];
  logic     ref_ok  [4][8][64];
  int checks = 0, failures = 0;

  data_array dut (.clk, .rst_n, .en, .we, .way_en, .index, .wmask, .wline, .sel, .phys_act, .rline);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 4; w++) begin
      sel[w] = 3'(w * 3 + 1);
      for (int s = 0; s < 8; s++) for (int r = 0; r < 64; r++) ref_ok[w][s][r] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      int l, r;
      @(negedge clk);
      l = $urandom % 8; r = $urandom % 4;
      index = index_t'({3'(l), 6'(r)});
      en = 1; we = ($urandom % 3) == 0; way_en = 4'($urandom);
      wmask = '1;
      for (int q = 0; q < LINE_WORDS; q++) wline[q*WORD_W +: WORD_W] = $urandom;
      if (($urandom % 50) == 0) for (int w = 0; w < 4; w++) sel[w] = 3'($urandom);
      #1;
      for (int w = 0; w < 4; w++) begin
        automatic int p = l ^ int'(sel[w]);
        automatic logic active = !we || way_en[w];
        checks++;
        if (phys_act[w] != (active ? 8'(1) << p : 8'h00)) begin
          failures++; $display("FAIL phys_act way %0d", w);
        end
        if (we && way_en[w]) begin ref_mem[w][p][r] = wline; ref_ok[w][p][r] = 1; end
      end
      @(negedge clk);
      en = 0;
      if (!we)
        for (int w = 0; w < 4; w++) begin
          automatic int p = l ^ int'(sel[w]);
          if (ref_ok[w][p][r]) begin
            checks++;
            if (rline[w] !== ref_mem[w][p][r]) begin failures++; $display("FAIL read way %0d", w); end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
