// interval_timer: sets the pace of the thermal control loop.
//
// Counts clock cycles and raises `tick` for one clock at the end of every
// interval of INTERVAL_CYCLES cycles; the default is 1 ms at a 4 GHz clock.
// The first tick comes INTERVAL_CYCLES cycles after reset.
module interval_timer #(
  parameter int unsigned INTERVAL_CYCLES = 4_000_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = $clog2(INTERVAL_CYCLES);
  localparam logic [CW-1:0] LAST = CW'(INTERVAL_CYCLES - 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cnt <= '0;
    else if (cnt == LAST) cnt <= '0;
    else                  cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == LAST);
endmodule
