// tag_array: tags and valid bits of the set-associative cache.
//
// Tags live in one memory per way (SETS entries, synchronous read: the tag
// of the set given with `rd_en` is on `rtag` one clock later). Valid bits are
// flip-flops so that a whole way can be invalidated in one clock: a set bit
// in `flush` clears every valid bit of that way, which is how the cache drops
// the contents of a way whose subarrays were just permuted. `wr_en` writes
// tag and valid into way `wr_way` of set `index`; flush wins over a write to
// the same way. Valid bits reset to zero.
module tag_array
  import pvc_pkg::*;
#(
  parameter int unsigned N_WAYS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      rd_en,
  input  index_t                    index,
  input  logic                      wr_en,
  input  logic [$clog2(N_WAYS)-1:0] wr_way,
  input  tag_t                      wtag,
  input  logic [N_WAYS-1:0]         flush,
  output tag_t                      rtag  [N_WAYS],
  output logic [N_WAYS-1:0]         rvalid
);
  tag_t tags [N_WAYS][SETS];
  logic [SETS-1:0] valid [N_WAYS];

  for (genvar w = 0; w < N_WAYS; w++) begin : g_way
    always_ff @(posedge clk) begin
      if (wr_en && wr_way == w) tags[w][index] <= wtag;
      if (rd_en) rtag[w] <= tags[w][index];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    valid[w] <= '0;
      else if (flush[w])             valid[w] <= '0;
      else if (wr_en && wr_way == w) valid[w][index] <= 1'b1;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)     rvalid[w] <= 1'b0;
      else if (rd_en) rvalid[w] <= valid[w][index] && !flush[w];
    end
  end
endmodule
