// tb_hot_cool_finder: random temperature sets (with deliberate ties) against
// a reference that sorts positions by temperature, lower position first.
module tb_hot_cool_finder;
  logic [9:0] temp [8];
  logic [2:0] hot, hot2, cool;
  int checks = 0, failures = 0;

  hot_cool_finder #(.N(8), .TEMP_W(10)) dut (.temp, .hot, .hot2, .cool);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int eh, eh2, ec;
      for (int i = 0; i < 8; i++) temp[i] = (k % 4 == 0) ? 10'(300 + $urandom % 4) : 10'($urandom);
      eh = 0; ec = 0;
      for (int i = 1; i < 8; i++) begin
        if (temp[i] > temp[eh]) eh = i;
        if (temp[i] < temp[ec]) ec = i;
      end
      eh2 = -1;
      for (int i = 0; i < 8; i++)
        if (i != eh && (eh2 < 0 || temp[i] > temp[eh2])) eh2 = i;
      #1;
      checks++;
      if (int'(hot) != eh || int'(hot2) != eh2 || int'(cool) != ec) begin
        failures++;
        $display("FAIL hot %0d/%0d hot2 %0d/%0d cool %0d/%0d", hot, eh, hot2, eh2, cool, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
