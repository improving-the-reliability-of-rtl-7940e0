// tb_access_counters: random activation patterns are counted in the testbench
// and compared with the counters before every clear; a clear must restart
// all counters at zero.
module tb_access_counters;
  import pvc_pkg::*;
  localparam int CW = 12;
  logic clk = 0, rst_n = 0, clear = 0;
  sub_oh_t phys_act [4];
  logic [CW-1:0] count [4][NUM_SUB];
  int ref_cnt [4][NUM_SUB];
  int checks = 0, failures = 0;

  access_counters #(.N_WAYS(4), .CNT_W(CW)) dut (.clk, .rst_n, .clear, .phys_act, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int w = 0; w < 4; w++) for (int p = 0; p < NUM_SUB; p++) begin
      checks++;
      if (int'(count[w][p]) != ref_cnt[w][p]) begin
        failures++; $display("FAIL count[%0d][%0d]=%0d exp %0d", w, p, count[w][p], ref_cnt[w][p]);
      end
    end
  endtask

  initial begin
    for (int w = 0; w < 4; w++) begin phys_act[w] = '0; for (int p = 0; p < NUM_SUB; p++) ref_cnt[w][p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int k = 0; k < 300 + 100 * round; k++) begin
        @(negedge clk);
        for (int w = 0; w < 4; w++) begin
          phys_act[w] = ($urandom % 3 == 0) ? '0 : sub_oh_t'(1) << ($urandom % (2 + round));
          for (int p = 0; p < NUM_SUB; p++) if (phys_act[w][p]) ref_cnt[w][p]++;
        end
      end
      @(negedge clk);
      for (int w = 0; w < 4; w++) phys_act[w] = '0;
      compare();
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int w = 0; w < 4; w++) for (int p = 0; p < NUM_SUB; p++) ref_cnt[w][p] = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
