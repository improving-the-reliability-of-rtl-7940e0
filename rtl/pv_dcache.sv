// pv_dcache: L1 data cache with thermal-aware dynamic subarray permutation.
//
// A 64 KB, 4-way, 32-byte-line data cache whose data array is split into
// eight subarrays per way. A crossbar network on the predecoded subarray
// lines of each way (setting SEL, 3 bits per way) maps logical subarray L to
// physical position L ^ SEL. Once per control interval (1 ms at 4 GHz by
// default) the permutation controller reads one temperature sensor per
// physical subarray and the access counters, and for each way whose hottest
// and coolest subarrays differ by more than 5 C it moves the busy logical
// subarray onto the cool position, unless the peak is already falling or the
// hot spot is leakage-driven (then the second hottest is moved). The cache
// applies a change when idle, flushing the affected way.
//
// Ports: a valid/ready CPU request port (word reads and writes, a one-clock
// response pulse, two clocks after the request on a hit), a valid/ready port
// to the next cache level (line reads, word write-through), the sensor
// readings (unsigned, 0.25 C per step, by way and physical subarray) and
// status: current SEL of each way and one-clock event pulses.
module pv_dcache
  import pvc_pkg::*;
#(
  parameter int unsigned INTERVAL_CYCLES = 4_000_000,  // 1 ms at 4 GHz
  parameter int unsigned THRESH          = 20,         // 5 C in 0.25 C steps
  parameter int unsigned RATE_PCT        = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  // CPU
  input  logic          req_valid,
  output logic          req_ready,
  input  logic          req_we,
  input  addr_t         req_addr,
  input  word_t         req_wdata,
  output logic          resp_valid,
  output word_t         resp_rdata,
  // next level (L2)
  output logic          mem_req_valid,
  input  logic          mem_req_ready,
  output logic          mem_req_we,
  output addr_t         mem_req_addr,
  output word_t         mem_req_wdata,
  input  logic          mem_resp_valid,
  input  line_t         mem_resp_line,
  // thermal sensors, by way and physical subarray
  input  temp_t         temp [NUM_WAYS][NUM_SUB],
  // status
  output sub_idx_t      sel  [NUM_WAYS],
  output logic          evt_tick,
  output logic [NUM_WAYS-1:0] evt_perm,
  output logic [NUM_WAYS-1:0] evt_kept,
  output logic [NUM_WAYS-1:0] evt_alt,
  output logic [NUM_WAYS-1:0] evt_flush,
  output logic          evt_hit,
  output logic          evt_miss
);
  localparam int unsigned WW = $clog2(NUM_WAYS);

  logic                tag_rd_en, tag_wr_en;
  logic [WW-1:0]       tag_wr_way;
  tag_t                tag_wtag;
  tag_t                rtag [NUM_WAYS];
  logic [NUM_WAYS-1:0] rvalid;

  logic                arr_en, arr_we;
  logic [NUM_WAYS-1:0] arr_way_en;
  index_t              arr_index;
  wmask_t              arr_wmask;
  line_t               arr_wline;
  line_t               rline    [NUM_WAYS];
  sub_oh_t             phys_act [NUM_WAYS];

  logic                grant;
  logic [NUM_WAYS-1:0] pending, flush;

  dcache_ctrl #(.N_WAYS(NUM_WAYS)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_line,
    .tag_rd_en, .tag_wr_en, .tag_wr_way, .tag_wtag, .rtag, .rvalid,
    .arr_en, .arr_we, .arr_way_en, .arr_index, .arr_wmask, .arr_wline, .rline,
    .perm_pending (|pending),
    .perm_grant   (grant),
    .evt_hit, .evt_miss
  );

  tag_array #(.N_WAYS(NUM_WAYS)) u_tags (
    .clk, .rst_n,
    .rd_en  (tag_rd_en),
    .index  (arr_index),
    .wr_en  (tag_wr_en),
    .wr_way (tag_wr_way),
    .wtag   (tag_wtag),
    .flush  (flush),
    .rtag   (rtag),
    .rvalid (rvalid)
  );

  data_array #(.N_WAYS(NUM_WAYS)) u_data (
    .clk, .rst_n,
    .en       (arr_en),
    .we       (arr_we),
    .way_en   (arr_way_en),
    .index    (arr_index),
    .wmask    (arr_wmask),
    .wline    (arr_wline),
    .sel      (sel),
    .phys_act (phys_act),
    .rline    (rline)
  );

  perm_controller #(
    .N_WAYS(NUM_WAYS), .INTERVAL_CYCLES(INTERVAL_CYCLES),
    .THRESH(THRESH), .RATE_PCT(RATE_PCT)
  ) u_perm (
    .clk, .rst_n,
    .temp     (temp),
    .phys_act (phys_act),
    .grant    (grant),
    .sel      (sel),
    .pending  (pending),
    .flush    (flush),
    .tick     (evt_tick),
    .evt_perm (evt_perm),
    .evt_kept (evt_kept),
    .evt_alt  (evt_alt)
  );

  assign evt_flush = flush;
endmodule
