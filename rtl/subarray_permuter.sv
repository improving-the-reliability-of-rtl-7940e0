// subarray_permuter: crossbar network inserted into the predecoded address
// lines of one cache way.
//
// SEL_W stages are chained; stage s holds 2**(SEL_W-1) mini-crossbars that
// each pair lines at distance 2**s (1, 2 and 4 for the eight-subarray way).
// Stage s is controlled by sel[s]. Because each stage either leaves a line or
// moves it by 2**s, logical line L ends up on physical line L ^ sel: the eight
// settings of sel give eight placements, and any subarray can be moved to any
// position. Combinational; the stage structure follows the published circuit.
module subarray_permuter #(
  parameter int unsigned SEL_W = 3
) (
  input  logic [SEL_W-1:0]      sel,
  input  logic [(1<<SEL_W)-1:0] logical_lines,
  output logic [(1<<SEL_W)-1:0] physical_lines
);
  localparam int unsigned N = 1 << SEL_W;

  logic [N-1:0] stage [SEL_W+1];
  assign stage[0]       = logical_lines;
  assign physical_lines = stage[SEL_W];

  for (genvar s = 0; s < SEL_W; s++) begin : g_stage
    localparam int unsigned D = 1 << s;
    for (genvar i = 0; i < N; i++) begin : g_cell
      // one cell per pair (i, i+D) with bit s of i clear
      if ((i & D) == 0) begin : g_pair
        xbar_cell u_cell (
          .sel  (sel[s]),
          .in0  (stage[s][i]),
          .in1  (stage[s][i+D]),
          .out0 (stage[s+1][i]),
          .out1 (stage[s+1][i+D])
        );
      end
    end
  end
endmodule
