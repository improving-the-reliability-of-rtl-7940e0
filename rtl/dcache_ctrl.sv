// dcache_ctrl: controller of the permutable L1 data cache.
//
// A blocking controller, one request at a time:
//   IDLE      accepts a request and starts the tag and data reads of its set
//             (all four ways in parallel); or, if the permutation controller
//             has a pending crossbar change, grants it for one clock instead
//             (requests wait in that clock, and the permuted way is flushed).
//   LOOKUP    compares tags. A read hit answers in the next clock, two clocks
//             after the request. A write hit updates the word in the hit way.
//   MISS_REQ  read miss: asks the next level for the whole 32-byte line.
//   MISS_WAIT writes the returned line into the victim way (an invalid way if
//             there is one, otherwise round-robin), sets its tag, and answers.
//   WT_REQ    writes go through to the next level; a write miss does not
//             allocate. The CPU gets a response pulse when it is sent.
// Write-through, no write-allocate and round-robin replacement are this
// design's choices: with them a flush may drop a way without write-back, as
// the published scheme assumes ("data stored in the original place will be
// lost"). The two-clock hit latency follows the processor configuration.
// Interfaces: valid/ready requests from the CPU with a one-clock `resp_valid`
// pulse back; valid/ready requests to the next level, whose read data comes
// back later with a one-clock `mem_resp_valid`.
module dcache_ctrl
  import pvc_pkg::*;
#(
  parameter int unsigned N_WAYS = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // CPU side
  input  logic                      req_valid,
  output logic                      req_ready,
  input  logic                      req_we,
  input  addr_t                     req_addr,
  input  word_t                     req_wdata,
  output logic                      resp_valid,
  output word_t                     resp_rdata,
  // next level
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic                      mem_req_we,
  output addr_t                     mem_req_addr,
  output word_t                     mem_req_wdata,
  input  logic                      mem_resp_valid,
  input  line_t                     mem_resp_line,
  // tag array
  output logic                      tag_rd_en,
  output logic                      tag_wr_en,
  output logic [$clog2(N_WAYS)-1:0] tag_wr_way,
  output tag_t                      tag_wtag,
  input  tag_t                      rtag   [N_WAYS],
  input  logic [N_WAYS-1:0]         rvalid,
  // data array
  output logic                      arr_en,
  output logic                      arr_we,
  output logic [N_WAYS-1:0]         arr_way_en,
  output index_t                    arr_index,
  output wmask_t                    arr_wmask,
  output line_t                     arr_wline,
  input  line_t                     rline  [N_WAYS],
  // permutation controller
  input  logic                      perm_pending,
  output logic                      perm_grant,
  // events, one-clock pulses
  output logic                      evt_hit,
  output logic                      evt_miss
);
  localparam int unsigned WW = $clog2(N_WAYS);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_MISS_REQ, S_MISS_WAIT, S_WT_REQ} state_e;

  state_e        state;
  addr_t         a_q;
  logic          we_q;
  word_t         wdata_q;
  logic [WW-1:0] victim_q, rr_q;

  logic [N_WAYS-1:0] hit_vec;
  logic [WW-1:0]     inv_way;
  logic              hit, any_inv;
  line_t             hit_line;

  always_comb begin
    hit_vec = '0;
    for (int w = 0; w < N_WAYS; w++)
      hit_vec[w] = rvalid[w] && (rtag[w] == addr_tag(a_q));
    hit      = |hit_vec;
    hit_line = '0;
    for (int w = N_WAYS-1; w >= 0; w--)
      if (hit_vec[w]) begin
        hit_line = rline[w];
      end
    any_inv = ~&rvalid;
    inv_way = '0;
    for (int w = N_WAYS-1; w >= 0; w--)
      if (!rvalid[w]) inv_way = WW'(w);
  end

  // ---- array and memory control, combinational on state ----
  always_comb begin
    req_ready     = 1'b0;
    perm_grant    = 1'b0;
    tag_rd_en     = 1'b0;
    tag_wr_en     = 1'b0;
    tag_wr_way    = victim_q;
    tag_wtag      = addr_tag(a_q);
    arr_en        = 1'b0;
    arr_we        = 1'b0;
    arr_way_en    = '0;
    arr_index     = addr_index(a_q);
    arr_wmask     = '0;
    arr_wline     = {LINE_WORDS{wdata_q}};
    mem_req_valid = 1'b0;
    mem_req_we    = we_q;
    mem_req_addr  = we_q ? a_q : {a_q[ADDR_W-1:OFFSET_W], {OFFSET_W{1'b0}}};
    mem_req_wdata = wdata_q;
    unique case (state)
      S_IDLE: begin
        if (perm_pending) perm_grant = 1'b1;
        else begin
          req_ready = 1'b1;
          arr_index = addr_index(req_addr);
          if (req_valid) begin
            tag_rd_en = 1'b1;
            arr_en    = 1'b1;
          end
        end
      end
      S_LOOKUP: begin
        if (we_q && hit) begin
          arr_en     = 1'b1;
          arr_we     = 1'b1;
          arr_way_en = hit_vec;
          arr_wmask  = wmask_t'(1) << addr_woff(a_q);
        end
      end
      S_MISS_REQ, S_WT_REQ: mem_req_valid = 1'b1;
      S_MISS_WAIT: begin
        if (mem_resp_valid) begin
          tag_wr_en  = 1'b1;
          arr_en     = 1'b1;
          arr_we     = 1'b1;
          arr_way_en = N_WAYS'(1) << victim_q;
          arr_wmask  = '1;
          arr_wline  = mem_resp_line;
        end
      end
      default: ;
    endcase
  end

  // ---- state, latched request, response ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      a_q        <= '0;
      we_q       <= 1'b0;
      wdata_q    <= '0;
      victim_q   <= '0;
      rr_q       <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      evt_hit    <= 1'b0;
      evt_miss   <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      evt_hit    <= 1'b0;
      evt_miss   <= 1'b0;
      unique case (state)
        S_IDLE: if (!perm_pending && req_valid) begin
          a_q     <= req_addr;
          we_q    <= req_we;
          wdata_q <= req_wdata;
          state   <= S_LOOKUP;
        end
        S_LOOKUP: begin
          evt_hit  <= hit;
          evt_miss <= !hit;
          victim_q <= any_inv ? inv_way : rr_q;
          if (we_q)     state <= S_WT_REQ;
          else if (hit) begin
            resp_valid <= 1'b1;
            resp_rdata <= hit_line[addr_woff(a_q)*WORD_W +: WORD_W];
            state      <= S_IDLE;
          end else      state <= S_MISS_REQ;
        end
        S_MISS_REQ: if (mem_req_ready) state <= S_MISS_WAIT;
        S_MISS_WAIT: if (mem_resp_valid) begin
          if (victim_q == rr_q) rr_q <= rr_q + 1'b1;
          resp_valid <= 1'b1;
          resp_rdata <= mem_resp_line[addr_woff(a_q)*WORD_W +: WORD_W];
          state      <= S_IDLE;
        end
        S_WT_REQ: if (mem_req_ready) begin
          resp_valid <= 1'b1;
          resp_rdata <= '0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // nothing is granted while a request is in flight
  assert property (@(posedge clk) disable iff (!rst_n) perm_grant |-> state == S_IDLE);
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit_vec));
endmodule
