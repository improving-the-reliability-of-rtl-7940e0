// tb_xbar_cell: exhaustive check of the mini-crossbar. For every select and
// input pair it expects a straight pass with sel = 0 and a swap with sel = 1.
module tb_xbar_cell;
  logic sel, in0, in1, out0, out1;
  int checks = 0, failures = 0;

  xbar_cell dut (.sel, .in0, .in1, .out0, .out1);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      checks++;
      if ({out1, out0} != (sel ? {in0, in1} : {in1, in0})) begin
        failures++;
        $display("FAIL sel=%0b in=%0b%0b out=%0b%0b", sel, in1, in0, out1, out0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
