// perm_controller: the thermal-aware dynamic subarray permutation controller.
//
// It owns the interval timer, the per-subarray access counters, one decision
// unit per way and the registers the algorithm keeps: the crossbar setting
// SEL of every way and the peak temperature each way had in the previous
// interval. At every interval tick (1 ms by default) it samples the sensor
// temperatures and the counters, runs the decision of every way, stores the
// new peaks, and for each way that must be permuted records the new SEL as
// pending. The cache then grants the change when it is idle (`grant`, one
// clock): in that clock the pending SELs take effect and `flush` tells the
// tag array to drop the contents of those ways, whose data no longer sits
// where the new mapping looks for it. A tick that arrives while a change is
// still pending replaces it. Event outputs pulse once per way and tick.
// The hand-shake with the cache is this design's own.
module perm_controller
  import pvc_pkg::*;
#(
  parameter int unsigned N_WAYS          = 4,
  parameter int unsigned INTERVAL_CYCLES = 4_000_000,  // 1 ms at 4 GHz
  parameter int unsigned THRESH          = 20,         // 5 C in 0.25 C steps
  parameter int unsigned RATE_PCT        = 5           // minimum access rate, %
) (
  input  logic              clk,
  input  logic              rst_n,
  input  temp_t             temp     [N_WAYS][NUM_SUB],
  input  sub_oh_t           phys_act [N_WAYS],
  input  logic              grant,
  output sub_idx_t          sel      [N_WAYS],
  output logic [N_WAYS-1:0] pending,
  output logic [N_WAYS-1:0] flush,
  output logic              tick,
  output logic [N_WAYS-1:0] evt_perm,   // permutation decided
  output logic [N_WAYS-1:0] evt_kept,   // over threshold, kept because peak fell
  output logic [N_WAYS-1:0] evt_alt     // second hottest subarray chosen
);
  localparam int unsigned CNT_W    = $clog2(INTERVAL_CYCLES + 1);
  localparam int unsigned RATE_MIN = (INTERVAL_CYCLES / 100) * RATE_PCT;

  logic [CNT_W-1:0] count [N_WAYS][NUM_SUB];
  sub_idx_t         sel_pend [N_WAYS];
  temp_t            prev_peak[N_WAYS];

  interval_timer #(.INTERVAL_CYCLES(INTERVAL_CYCLES)) u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick)
  );

  access_counters #(.N_WAYS(N_WAYS), .CNT_W(CNT_W)) u_cnt (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (tick),
    .phys_act (phys_act),
    .count    (count)
  );

  assign flush = grant ? pending : '0;

  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    logic     do_perm, kept, alt_used;
    sub_idx_t sel_new;
    temp_t    peak;
    sub_idx_t sel_eff;

    // the mapping in force after this clock: a grant in the same clock as a
    // tick must be taken into account, or Eq. (5) would start from a stale SEL
    assign sel_eff = (grant && pending[w]) ? sel_pend[w] : sel[w];

    perm_way_ctrl #(
      .N(NUM_SUB), .TEMP_W(TEMP_W), .CNT_W(CNT_W),
      .THRESH(THRESH), .RATE_MIN(RATE_MIN)
    ) u_dec (
      .temp      (temp[w]),
      .count     (count[w]),
      .sel_old   (sel_eff),
      .prev_peak (prev_peak[w]),
      .do_perm   (do_perm),
      .kept      (kept),
      .alt_used  (alt_used),
      .sel_new   (sel_new),
      .peak      (peak)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sel[w]       <= '0;
        sel_pend[w]  <= '0;
        pending[w]   <= 1'b0;
        prev_peak[w] <= '0;
      end else begin
        if (grant && pending[w]) begin
          sel[w]     <= sel_pend[w];
          pending[w] <= 1'b0;
        end
        if (tick) begin
          prev_peak[w] <= peak;
          if (do_perm) begin
            sel_pend[w] <= sel_new;
            pending[w]  <= 1'b1;
          end
        end
      end
    end

    assign evt_perm[w] = tick && do_perm;
    assign evt_kept[w] = tick && kept;
    assign evt_alt[w]  = tick && alt_used;
  end
endmodule
