// data_array: the cache's full data array, four ways of eight subarrays.
//
// One predecoder in the middle turns the subarray index into logical lines
// shared by all ways; each way permutes them with its own SEL, so the same
// logical subarray can sit at a different physical position in every way.
// Reads enable all ways at once (parallel lookup, this design's choice);
// writes enable only the ways in `way_en`. Read data appears one clock later.
module data_array
  import pvc_pkg::*;
#(
  parameter int unsigned N_WAYS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 we,
  input  logic [N_WAYS-1:0]    way_en,
  input  index_t               index,
  input  wmask_t               wmask,
  input  line_t                wline,
  input  sub_idx_t             sel     [N_WAYS],
  output sub_oh_t              phys_act[N_WAYS],
  output line_t                rline   [N_WAYS]
);
  sub_oh_t logical_lines;

  subarray_predecoder #(.SEL_W(SEL_W)) u_predec (
    .en    (en),
    .idx   (index[INDEX_W-1 -: SEL_W]),
    .lines (logical_lines)
  );

  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    data_way #(.SEL_W(SEL_W), .ROWS(ROWS), .LINE_WORDS(LINE_WORDS), .WORD_W(WORD_W)) u_way (
      .clk           (clk),
      .rst_n         (rst_n),
      .way_en        (en && (!we || way_en[w])),
      .we            (we),
      .sel           (sel[w]),
      .logical_lines (logical_lines),
      .row           (index[ROW_W-1:0]),
      .wmask         (wmask),
      .wline         (wline),
      .phys_act      (phys_act[w]),
      .rline         (rline[w])
    );
  end
endmodule
