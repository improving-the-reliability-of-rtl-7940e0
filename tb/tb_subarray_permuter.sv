// tb_subarray_permuter: for every crossbar setting and every single active
// predecoded line, the line must come out at position logical ^ sel; random
// multi-line patterns must be permuted the same way. Also checks the worked
// example of setting 101: odd and even swap and the lower four move to top.
module tb_subarray_permuter;
  logic [2:0] sel;
  logic [7:0] lin, lout, exp_out;
  int checks = 0, failures = 0;

  subarray_permuter #(.SEL_W(3)) dut (.sel, .logical_lines(lin), .physical_lines(lout));

  task automatic check(string what);
    exp_out = '0;
    for (int i = 0; i < 8; i++) exp_out[i ^ int'(sel)] = lin[i];
    #1;
    checks++;
    if (lout !== exp_out) begin
      failures++;
      $display("FAIL %s sel=%b in=%b out=%b exp=%b", what, sel, lin, lout, exp_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int l = 0; l < 8; l++) begin
        sel = 3'(s); lin = 8'(1) << l;
        check("onehot");
      end
    for (int k = 0; k < 200; k++) begin
      sel = 3'($urandom); lin = 8'($urandom);
      check("random");
    end
    // setting 101: logical 0 -> physical 5, logical 7 -> physical 2
    sel = 3'b101; lin = 8'b0000_0001; #1;
    checks++; if (lout != 8'b0010_0000) begin failures++; $display("FAIL example 0->5"); end
    lin = 8'b1000_0000; #1;
    checks++; if (lout != 8'b0000_0100) begin failures++; $display("FAIL example 7->2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
