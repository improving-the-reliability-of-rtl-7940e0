// data_way: the data array of one cache way with its subarray permutation.
//
// The shared predecoder's one-hot logical lines pass through this way's
// crossbar permuter, set by `sel`, and the resulting physical line activates
// one of the 2**SEL_W data subarrays; the row, write mask and write data go to
// all of them. `phys_act` shows which physical subarray works this cycle (the
// access counters watch it). A read returns the line one clock later; the
// way remembers which subarray it read and selects that one's output.
// The way only takes part in an access when `way_en` is high.
module data_way #(
  parameter int unsigned SEL_W      = 3,
  parameter int unsigned ROWS       = 64,
  parameter int unsigned LINE_WORDS = 8,
  parameter int unsigned WORD_W     = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          way_en,
  input  logic                          we,
  input  logic [SEL_W-1:0]              sel,
  input  logic [(1<<SEL_W)-1:0]         logical_lines,
  input  logic [$clog2(ROWS)-1:0]       row,
  input  logic [LINE_WORDS-1:0]         wmask,
  input  logic [LINE_WORDS*WORD_W-1:0]  wline,
  output logic [(1<<SEL_W)-1:0]         phys_act,
  output logic [LINE_WORDS*WORD_W-1:0]  rline
);
  localparam int unsigned N = 1 << SEL_W;
  localparam int unsigned LW = LINE_WORDS * WORD_W;

  logic [N-1:0] phys_lines;
  logic [N-1:0] rd_sel_q;
  logic [LW-1:0] sub_rline [N];

  subarray_permuter #(.SEL_W(SEL_W)) u_perm (
    .sel            (sel),
    .logical_lines  (logical_lines),
    .physical_lines (phys_lines)
  );

  assign phys_act = way_en ? phys_lines : '0;

  for (genvar p = 0; p < N; p++) begin : g_sub
    data_subarray #(.ROWS(ROWS), .LINE_WORDS(LINE_WORDS), .WORD_W(WORD_W)) u_sub (
      .clk   (clk),
      .act   (phys_act[p]),
      .we    (we),
      .row   (row),
      .wmask (wmask),
      .wline (wline),
      .rline (sub_rline[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                rd_sel_q <= '0;
    else if (way_en && !we)    rd_sel_q <= phys_act;
  end

  always_comb begin
    rline = '0;
    for (int p = 0; p < N; p++)
      if (rd_sel_q[p]) rline = sub_rline[p];
  end
endmodule
