// tb_data_way: one way with its crossbar. Checks that the active physical
// subarray is logical ^ sel, that data written under one setting is found at
// the same physical place under another (logical' = physical ^ sel'), and
// that reads return the line one clock later. The reference is a model of
// the way's storage indexed by physical position and row.
module tb_data_way;
  localparam int LW = 8, WW = 32;
  logic clk = 0, rst_n = 0, way_en = 0, we = 0;
  logic [2:0] sel = '0;
  logic [7:0] logical_lines = '0, phys_act;
  logic [5:0] row = '0;
  logic [LW-1:0] wmask = '0;
  logic [LW*WW-1:0] wline = '0, rline;
  logic [LW*WW-1:0] ref_mem [8][64];
  int checks = 0, failures = 0;

  data_way dut (.clk, .rst_n, .way_en, .we, .sel, .logical_lines, .row, .wmask, .wline, .phys_act, .rline);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic w, input int l, input int r);
    int p;
    @(negedge clk);
    way_en = 1; we = w; logical_lines = 8'(1) << l; row = 6'(r); wmask = '1;
    for (int k = 0; k < LW; k++) wline[k*WW +: WW] = $urandom;
    p = l ^ int'(sel);
    #1;
    checks++;
    if (phys_act != 8'(1) << p) begin failures++; $display("FAIL phys_act %b sel %0d l %0d", phys_act, sel, l); end
    if (w) ref_mem[p][r] = wline;
    @(negedge clk);
    way_en = 0;
    if (!w) begin
      checks++;
      if (rline !== ref_mem[p][r]) begin failures++; $display("FAIL read l=%0d p=%0d r=%0d", l, p, r); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill row 0..3 of all positions with sel = 0
    for (int l = 0; l < 8; l++) for (int r = 0; r < 4; r++) access(1, l, r);
    // read everything back under every setting
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      for (int l = 0; l < 8; l++) for (int r = 0; r < 4; r++) access(0, l, r);
    end
    // random mix
    for (int k = 0; k < 500; k++) begin
      sel = 3'($urandom);
      access($urandom % 2, $urandom % 8, $urandom % 4);
    end
    // disabled way: no activation
    @(negedge clk); way_en = 0; logical_lines = 8'h10; #1;
    checks++; if (phys_act != 0) begin failures++; $display("FAIL disabled way active"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
