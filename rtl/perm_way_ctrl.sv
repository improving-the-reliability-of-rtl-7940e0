// perm_way_ctrl: the control algorithm's decision for one cache way.
//
// Given the way's subarray temperatures and access counts of the interval
// that just ended (both by physical position), its current crossbar setting
// and the peak temperature it had one interval earlier, it decides:
//   1. find the hottest and the coolest subarray;
//   2. permute only if hottest - coolest exceeds THRESH (5 C by default);
//   3. keep the old setting if the peak has dropped since the last interval;
//   4. if the hottest subarray was accessed less than the coolest, or less
//      than RATE_MIN times (5 % of the interval), its heat is leakage, so swap
//      the second hottest subarray instead;
//   5. new setting = old ^ (hot position ^ cool position), which moves the
//      logical subarray at the hot position to the cool one and back.
// Steps 1-5 are the published algorithm; reading "temperature reduced since
// last interval" as "peak now below last interval's peak" and the
// no-op check when the chosen pair is the same position are this design's.
// Combinational; `peak` is the value to store for the next interval.
module perm_way_ctrl #(
  parameter int unsigned N        = 8,
  parameter int unsigned TEMP_W   = 10,
  parameter int unsigned CNT_W    = 22,
  parameter int unsigned THRESH   = 20,       // 5 C in 0.25 C steps
  parameter int unsigned RATE_MIN = 200_000   // 5 % of a 4,000,000-cycle interval
) (
  input  logic [TEMP_W-1:0]     temp  [N],
  input  logic [CNT_W-1:0]      count [N],
  input  logic [$clog2(N)-1:0]  sel_old,
  input  logic [TEMP_W-1:0]     prev_peak,
  output logic                  do_perm,
  output logic                  kept,      // over threshold but peak already falling
  output logic                  alt_used,  // second hottest chosen
  output logic [$clog2(N)-1:0]  sel_new,
  output logic [TEMP_W-1:0]     peak
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] hot, hot2, cool, target;
  logic          over, falling, leak_hot;

  hot_cool_finder #(.N(N), .TEMP_W(TEMP_W)) u_find (
    .temp (temp),
    .hot  (hot),
    .hot2 (hot2),
    .cool (cool)
  );

  always_comb begin
    peak     = temp[hot];
    over     = (TEMP_W+1)'(temp[hot]) > (TEMP_W+1)'(temp[cool]) + (TEMP_W+1)'(THRESH);
    falling  = temp[hot] < prev_peak;
    leak_hot = (count[hot] < count[cool]) || (count[hot] < CNT_W'(RATE_MIN));
    target   = leak_hot ? hot2 : hot;
    kept     = over && falling;
    alt_used = over && !falling && leak_hot;
    do_perm  = over && !falling && (target != cool);
    sel_new  = do_perm ? (sel_old ^ (target ^ cool)) : sel_old;
  end
endmodule
