// hot_cool_finder: comparators that pick out, among the N subarray
// temperatures of one way, the hottest, the second hottest and the coolest
// physical position. Ties go to the lower position. The second hottest is
// never the hottest. A linear comparator chain, combinational.
module hot_cool_finder #(
  parameter int unsigned N      = 8,
  parameter int unsigned TEMP_W = 10
) (
  input  logic [TEMP_W-1:0]        temp [N],
  output logic [$clog2(N)-1:0]     hot,
  output logic [$clog2(N)-1:0]     hot2,
  output logic [$clog2(N)-1:0]     cool
);
  localparam int unsigned IW = $clog2(N);

  always_comb begin
    hot  = '0;
    cool = '0;
    for (int i = 1; i < N; i++) begin
      if (temp[i] > temp[hot])  hot  = IW'(i);
      if (temp[i] < temp[cool]) cool = IW'(i);
    end
    hot2 = (hot == '0) ? IW'(1) : '0;
    for (int i = 0; i < N; i++) begin
      if (IW'(i) != hot && temp[i] > temp[hot2]) hot2 = IW'(i);
    end
  end
endmodule
