// tb_interval_timer: with a short interval the tick must be one clock wide and
// come exactly every INTERVAL_CYCLES clocks, the first INTERVAL_CYCLES clocks
// after reset.
module tb_interval_timer;
  localparam int IV = 37;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0, cyc = 0, last = 0, ticks = 0;

  interval_timer #(.INTERVAL_CYCLES(IV)) dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (ticks < 20) begin
      @(posedge clk);
      cyc++;
      if (tick) begin
        ticks++;
        checks++;
        if (cyc - last != IV) begin failures++; $display("FAIL tick period %0d", cyc - last); end
        last = cyc;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
