// tb_subarray_predecoder: every index, with and without enable, must give the
// one sorted line (index 0 -> line 0) or no line at all.
module tb_subarray_predecoder;
  logic       en;
  logic [2:0] idx;
  logic [7:0] lines;
  int checks = 0, failures = 0;

  subarray_predecoder #(.SEL_W(3)) dut (.en, .idx, .lines);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 8; i++) begin
        en = e[0]; idx = 3'(i);
        #1;
        checks++;
        if (lines != (e[0] ? 8'(1) << i : 8'h00)) begin
          failures++;
          $display("FAIL en=%0d idx=%0d lines=%b", e, i, lines);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
