// pvc_pkg: shared geometry, types and helper functions of the process-variation
// aware L1 data cache.
//
// Geometry (from the processor configuration): 64 KB, 4 ways, 32-byte lines,
// so 512 sets and 16 KB per way. Each way is cut into 8 data subarrays of 64
// lines, picked by the top three index bits through a 3-to-8 predecoder; the
// low six index bits drive the row decoder inside a subarray.
// Byte address split (32-bit address, this design's choice of width):
//   [31:14] tag  [13:11] subarray  [10:5] row  [4:2] word  [1:0] byte
// Temperatures are unsigned fixed point with two fraction bits (0.25 C steps);
// the sensor format is this design's own choice.
package pvc_pkg;
  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned LINE_WORDS = 8;                    // 32-byte line
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;  // 256 bits
  localparam int unsigned NUM_WAYS   = 4;
  localparam int unsigned SEL_W      = 3;                    // crossbar stages
  localparam int unsigned NUM_SUB    = 1 << SEL_W;           // subarrays per way
  localparam int unsigned ROW_W      = 6;
  localparam int unsigned ROWS       = 1 << ROW_W;           // lines per subarray
  localparam int unsigned WOFF_W     = 3;                    // word in line
  localparam int unsigned OFFSET_W   = 5;                    // byte in line
  localparam int unsigned INDEX_W    = SEL_W + ROW_W;        // 9 -> 512 sets
  localparam int unsigned SETS       = 1 << INDEX_W;
  localparam int unsigned TAG_W      = ADDR_W - INDEX_W - OFFSET_W;  // 18
  localparam int unsigned TEMP_W     = 10;                   // 0 .. 255.75 C

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [WORD_W-1:0]     word_t;
  typedef logic [LINE_W-1:0]     line_t;
  typedef logic [SEL_W-1:0]      sub_idx_t;
  typedef logic [NUM_SUB-1:0]    sub_oh_t;
  typedef logic [ROW_W-1:0]      row_t;
  typedef logic [INDEX_W-1:0]    index_t;
  typedef logic [TAG_W-1:0]      tag_t;
  typedef logic [WOFF_W-1:0]     woff_t;
  typedef logic [LINE_WORDS-1:0] wmask_t;
  typedef logic [TEMP_W-1:0]     temp_t;

  function automatic tag_t addr_tag(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic index_t addr_index(addr_t a);
    return a[OFFSET_W +: INDEX_W];
  endfunction
  function automatic woff_t addr_woff(addr_t a);
    return a[2 +: WOFF_W];
  endfunction
endpackage
