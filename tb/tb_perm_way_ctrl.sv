// tb_perm_way_ctrl: directed cases for each rule of the control algorithm
// (below threshold, permutation, peak falling, leakage-driven hot spot by
// count and by rate) and random cases against a reference model.
module tb_perm_way_ctrl;
  localparam int TH = 20, RM = 100;
  logic [9:0]  temp [8];
  logic [15:0] count [8];
  logic [2:0]  sel_old, sel_new;
  logic [9:0]  prev_peak, peak;
  logic        do_perm, kept, alt_used;
  int checks = 0, failures = 0;

  perm_way_ctrl #(.N(8), .TEMP_W(10), .CNT_W(16), .THRESH(TH), .RATE_MIN(RM)) dut (
    .temp, .count, .sel_old, .prev_peak, .do_perm, .kept, .alt_used, .sel_new, .peak);

  function automatic void model(output logic e_perm, output logic e_kept, output logic e_alt,
                                output logic [2:0] e_sel, output logic [9:0] e_peak);
    int h = 0, c = 0, h2 = -1, t;
    for (int i = 1; i < 8; i++) begin
      if (temp[i] > temp[h]) h = i;
      if (temp[i] < temp[c]) c = i;
    end
    for (int i = 0; i < 8; i++) if (i != h && (h2 < 0 || temp[i] > temp[h2])) h2 = i;
    e_peak = temp[h];
    e_kept = 0; e_alt = 0; e_perm = 0; e_sel = sel_old;
    if (int'(temp[h]) - int'(temp[c]) > TH) begin
      if (temp[h] < prev_peak) e_kept = 1;
      else begin
        t = h;
        if (count[h] < count[c] || count[h] < RM) begin t = h2; e_alt = 1; end
        if (t != c) begin e_perm = 1; e_sel = sel_old ^ 3'(t ^ c); end
      end
    end
  endfunction

  task automatic check(string what);
    logic e_perm, e_kept, e_alt; logic [2:0] e_sel; logic [9:0] e_peak;
    model(e_perm, e_kept, e_alt, e_sel, e_peak);
    #1;
    checks++;
    if (do_perm !== e_perm || kept !== e_kept || alt_used !== e_alt || sel_new !== e_sel || peak !== e_peak) begin
      failures++;
      $display("FAIL %s: perm %0b/%0b kept %0b/%0b alt %0b/%0b sel %0d/%0d", what,
               do_perm, e_perm, kept, e_kept, alt_used, e_alt, sel_new, e_sel);
    end
  endtask

  task automatic base();
    for (int i = 0; i < 8; i++) begin temp[i] = 10'(320); count[i] = 16'(500); end
    sel_old = 3'b010; prev_peak = '0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // difference exactly 5 C: no permutation
    base(); temp[5] = 10'(340); #1;
    checks++; if (do_perm) begin failures++; $display("FAIL 5 C must not trigger"); end
    // hot 5 (busy), cool 2: sel = 010 ^ (101 ^ 010) = 101
    base(); temp[5] = 10'(360); temp[2] = 10'(300); count[5] = 16'(900); #1;
    checks++; if (!do_perm || sel_new != 3'b101) begin failures++; $display("FAIL plain swap sel=%b", sel_new); end
    // same but peak fell since last interval: keep
    prev_peak = 10'(370); #1;
    checks++; if (do_perm || !kept) begin failures++; $display("FAIL keep rule"); end
    // hot subarray idle (leakage): second hottest 6 moves instead
    base(); temp[5] = 10'(360); temp[6] = 10'(350); temp[2] = 10'(300); count[5] = 16'(10); #1;
    checks++; if (!alt_used || sel_new != (3'b010 ^ 3'(6 ^ 2))) begin failures++; $display("FAIL second hottest by rate"); end
    // hot busier than rate minimum but less than the cool one
    count[5] = 16'(400); count[2] = 16'(800); #1;
    checks++; if (!alt_used) begin failures++; $display("FAIL second hottest by comparison"); end
    for (int k = 0; k < 3000; k++) begin
      for (int i = 0; i < 8; i++) begin temp[i] = 10'(280 + $urandom % 60); count[i] = 16'($urandom % 400); end
      sel_old = 3'($urandom); prev_peak = 10'(280 + $urandom % 80);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
