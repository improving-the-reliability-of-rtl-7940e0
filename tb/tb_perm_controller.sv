// tb_perm_controller: the controller with a 100-cycle interval. The testbench
// drives sensor readings and a stream of subarray activations, and checks at
// each tick the decision of every way, that SEL changes only when the change
// is granted, that the grant flushes exactly the pending ways, the keep rule
// (peak fell), the second-hottest rule, and a tick that coincides with a grant.
module tb_perm_controller;
  import pvc_pkg::*;
  localparam int IV = 100;
  logic clk = 0, rst_n = 0, grant = 0, tick;
  temp_t temp [4][NUM_SUB];
  sub_oh_t phys_act [4];
  sub_idx_t sel [4];
  logic [3:0] pending, flush, evt_perm, evt_kept, evt_alt;
  int checks = 0, failures = 0, ticks = 0;

  perm_controller #(.N_WAYS(4), .INTERVAL_CYCLES(IV), .THRESH(20), .RATE_PCT(5)) dut (
    .clk, .rst_n, .temp, .phys_act, .grant, .sel, .pending, .flush, .tick,
    .evt_perm, .evt_kept, .evt_alt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // way 0: logical 3 busy every other cycle; way 1: logical 1 busy
  always @(negedge clk) begin
    phys_act[0] <= ($urandom % 2) ? sub_oh_t'(1) << (3 ^ int'(sel[0])) : '0;
    phys_act[1] <= ($urandom % 2) ? sub_oh_t'(1) << (1 ^ int'(sel[1])) : '0;
    phys_act[2] <= '0;
    phys_act[3] <= '0;
  end

  task automatic flat();
    for (int w = 0; w < 4; w++) for (int p = 0; p < NUM_SUB; p++) temp[w][p] = temp_t'(320);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  task automatic to_tick();
    do @(negedge clk); while (!tick);
    ticks++;
  endtask

  initial begin
    flat();
    for (int w = 0; w < 4; w++) phys_act[w] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // interval 1: way 0 physical 3 hot and busy, physical 6 cool
    temp[0][3] = temp_t'(360); temp[0][6] = temp_t'(300);
    to_tick();
    expect_eq("evt_perm i1", evt_perm, 4'b0001);
    @(negedge clk);
    expect_eq("pending i1", pending, 4'b0001);
    expect_eq("sel unchanged before grant", sel[0], 0);
    grant = 1; #1;
    expect_eq("flush", flush, 4'b0001);
    @(negedge clk); grant = 0;
    expect_eq("sel after grant", sel[0], 3 ^ 6);
    expect_eq("pending cleared", pending, 0);
    // interval 2: logical 3 now sits on physical 6; peak fell -> keep
    flat(); temp[0][6] = temp_t'(350); temp[0][1] = temp_t'(300);
    to_tick();
    expect_eq("evt_kept i2", evt_kept, 4'b0001);
    expect_eq("no perm i2", evt_perm, 0);
    // interval 3: way 1 physical 0 hottest but idle -> second hottest 1 moves to cool 7
    flat(); temp[1][0] = temp_t'(380); temp[1][1] = temp_t'(370); temp[1][7] = temp_t'(300);
    to_tick();
    expect_eq("evt_alt i3", evt_alt, 4'b0010);
    expect_eq("evt_perm i3", evt_perm, 4'b0010);
    @(negedge clk);
    // leave it pending; interval 4 ticks while the grant is given in the same clock
    flat(); temp[1][1] = temp_t'(390); temp[1][2] = temp_t'(300);  // logical 1 still at 1
    do @(negedge clk); while (!(dut.u_timer.cnt == IV - 1));
    grant = 1;
    #1;
    expect_eq("tick with grant", tick, 1);
    @(negedge clk); grant = 0;
    // after the grant sel[1] = 1 ^ 7 = 6; the new decision starts from it: 6 ^ (1 ^ 2) = 5
    expect_eq("sel1 after grant", sel[1], 6);
    expect_eq("pending again", pending, 4'b0010);
    grant = 1; @(negedge clk); grant = 0;
    expect_eq("sel1 second grant", sel[1], 5);
    expect_eq("ticks seen", ticks, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
