// tb_data_subarray: random masked writes and reads against a reference copy.
// Reads must return the line one clock after the request, and a write or an
// inactive subarray must leave the read register unchanged.
module tb_data_subarray;
  localparam int ROWS = 64, LW = 8, WW = 32;
  logic clk = 0, act = 0, we = 0;
  logic [5:0] row = '0;
  logic [LW-1:0] wmask = '0;
  logic [LW*WW-1:0] wline = '0, rline, ref_mem [ROWS], last;
  int checks = 0, failures = 0;

  data_subarray #(.ROWS(ROWS), .LINE_WORDS(LW), .WORD_W(WW)) dut (.clk, .act, .we, .row, .wmask, .wline, .rline);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      act = 1; we = 1; row = 6'(r); wmask = '1;
      for (int w = 0; w < LW; w++) wline[w*WW +: WW] = $urandom;
      ref_mem[r] = wline;
    end
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      act = ($urandom % 8) != 0; we = $urandom % 2; row = 6'($urandom); wmask = LW'($urandom);
      for (int w = 0; w < LW; w++) wline[w*WW +: WW] = $urandom;
      last = rline;
      if (act && we)
        for (int w = 0; w < LW; w++) if (wmask[w]) ref_mem[row][w*WW +: WW] = wline[w*WW +: WW];
      @(negedge clk);
      checks++;
      if (act && !we) begin
        if (rline !== ref_mem[row]) begin failures++; $display("FAIL read row %0d", row); end
      end else if (rline !== last) begin
        failures++; $display("FAIL read register changed without a read");
      end
      act = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
