// xbar_cell: the mini-crossbar of the subarray permutation network.
//
// Two predecoded address lines enter and two leave. With sel = 0 the lines
// pass straight through; with sel = 1 they are exchanged. In silicon this is
// a set of pass transistors; here it is a 2:1 multiplexer pair, combinational.
module xbar_cell (
  input  logic sel,
  input  logic in0,
  input  logic in1,
  output logic out0,
  output logic out1
);
  always_comb begin
    out0 = sel ? in1 : in0;
    out1 = sel ? in0 : in1;
  end
endmodule
