// access_counters: performance counters logging how often each physical
// subarray of each way is activated during the current control interval.
//
// One counter per (way, physical subarray) adds one in every clock its
// activation line is high. `clear` (the interval tick) restarts all counters
// from zero, so at the tick they hold the full count of the interval that just
// ended. Counters saturate at their maximum. Counters reset to zero.
module access_counters
  import pvc_pkg::*;
#(
  parameter int unsigned N_WAYS = 4,
  parameter int unsigned CNT_W  = 22
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  sub_oh_t           phys_act [N_WAYS],
  output logic [CNT_W-1:0]  count    [N_WAYS][NUM_SUB]
);
  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    for (genvar p = 0; p < NUM_SUB; p++) begin : g_sub
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)                     count[w][p] <= '0;
        else if (clear)                 count[w][p] <= '0;
        else if (phys_act[w][p] && count[w][p] != '1)
                                        count[w][p] <= count[w][p] + 1'b1;
      end
    end
  end
endmodule
