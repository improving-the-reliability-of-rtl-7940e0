// l2_model: behavioural stand-in for the next cache level, for testbenches.
//
// Word-addressed backing store: a word never written reads as a fixed hash of
// its address (init_word). A read request returns the whole 32-byte line
// LATENCY clocks after it is accepted; a write request stores one word.
// `mem_req_ready` drops at random so the cache's valid/ready wait is used.
module l2_model
  import pvc_pkg::*;
#(
  parameter int unsigned LATENCY = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mem_req_valid,
  output logic  mem_req_ready,
  input  logic  mem_req_we,
  input  addr_t mem_req_addr,
  input  word_t mem_req_wdata,
  output logic  mem_resp_valid,
  output line_t mem_resp_line,
  output int    n_reads,
  output int    n_writes
);
  word_t store [addr_t];
  int    wait_cnt;
  logic  busy;
  addr_t line_a;

  function automatic word_t init_word(addr_t a);
    return word_t'(a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic word_t peek(addr_t a);
    addr_t wa = {a[ADDR_W-1:2], 2'b00};
    return store.exists(wa) ? store[wa] : init_word(wa);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_req_ready  <= 1'b0;
      mem_resp_valid <= 1'b0;
      busy           <= 1'b0;
      wait_cnt       <= 0;
      n_reads        <= 0;
      n_writes       <= 0;
      mem_resp_line  <= '0;
      line_a         <= '0;
    end else begin
      mem_resp_valid <= 1'b0;
      mem_req_ready  <= !busy && ($urandom % 4 != 0);
      if (mem_req_valid && mem_req_ready) begin
        mem_req_ready <= 1'b0;
        if (mem_req_we) begin
          store[{mem_req_addr[ADDR_W-1:2], 2'b00}] = mem_req_wdata;
          n_writes <= n_writes + 1;
        end else begin
          busy     <= 1'b1;
          wait_cnt <= int'(LATENCY);
          line_a   <= {mem_req_addr[ADDR_W-1:OFFSET_W], {OFFSET_W{1'b0}}};
          n_reads  <= n_reads + 1;
        end
      end
      if (busy) begin
        if (wait_cnt <= 1) begin
          busy           <= 1'b0;
          mem_resp_valid <= 1'b1;
          for (int w = 0; w < LINE_WORDS; w++)
            mem_resp_line[w*WORD_W +: WORD_W] <= peek(line_a + addr_t'(4*w));
        end else wait_cnt <= wait_cnt - 1;
      end
    end
  end
endmodule
