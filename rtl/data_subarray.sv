// data_subarray: one SRAM subarray of a cache way's data array.
//
// ROWS cache lines of LINE_WORDS 32-bit words behind one read/write port.
// The subarray works only when its predecoded line `act` is high; `row` then
// selects the line through the row decoder. A read returns the whole line one
// clock after the request (synchronous read, as an SRAM macro). A write stores
// the words whose bit in `wmask` is set. Nothing is reset: like the SRAM it
// stands for, its contents are undefined until written, and the cache only
// reads lines whose valid bit says they were filled.
module data_subarray #(
  parameter int unsigned ROWS       = 64,
  parameter int unsigned LINE_WORDS = 8,
  parameter int unsigned WORD_W     = 32
) (
  input  logic                          clk,
  input  logic                          act,
  input  logic                          we,
  input  logic [$clog2(ROWS)-1:0]       row,
  input  logic [LINE_WORDS-1:0]         wmask,
  input  logic [LINE_WORDS*WORD_W-1:0]  wline,
  output logic [LINE_WORDS*WORD_W-1:0]  rline
);
  logic [LINE_WORDS*WORD_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (act) begin
      if (we) begin
        for (int w = 0; w < LINE_WORDS; w++)
          if (wmask[w]) mem[row][w*WORD_W +: WORD_W] <= wline[w*WORD_W +: WORD_W];
      end else begin
        rline <= mem[row];
      end
    end
  end
endmodule
