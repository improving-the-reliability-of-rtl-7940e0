// subarray_predecoder: first stage of the cache's two-stage address decoder.
//
// It turns the SEL_W subarray index bits into 2**SEL_W predecoded lines with
// sorted outputs: index 0 raises line 0 (the top subarray), index 7 line 7.
// At most one line is high, and none when `en` is low. Purely combinational.
module subarray_predecoder #(
  parameter int unsigned SEL_W = 3
) (
  input  logic                  en,
  input  logic [SEL_W-1:0]      idx,
  output logic [(1<<SEL_W)-1:0] lines
);
  always_comb begin
    lines = '0;
    if (en) lines[idx] = 1'b1;
  end
endmodule
