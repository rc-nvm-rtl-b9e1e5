// rcnvm_cache: set-associative write-back cache for dual-addressed memory.
//
// In RC-NVM one 8-byte word has a row-oriented and a column-oriented
// address, so the same word can sit in the cache twice: once in a row line
// (8 words along a physical row) and once in a column line (8 words down a
// physical column). Each line therefore keeps, next to valid, dirty and tag:
//   orientation bit  0 = filled with a row-oriented address, 1 = column;
//   8 crossing bits  one per word: 1 when the line of the other orientation
//                    that shares this word is also in the cache.
// Synonyms are kept identical instead of being forbidden:
//   fill     after a line arrives from memory, the 8 lines of the other
//            orientation it may cross are looked up one per cycle; for each
//            one present, the shared word is copied into the new line and the
//            crossing bits of both lines are set;
//   write    a store to a word whose crossing bit is set also updates the
//            word in the crossing line (one extra lookup);
//   evict    the crossing bits that point at the evicted line are cleared in
//            its crossing lines (one lookup per word), then a dirty line is
//            written back.
// Reads never pay extra. For group caching, OP_PIN loads a line and pins it;
// replacement skips pinned ways while an unpinned way exists; OP_UNPIN
// releases the line.
//
// Interface: one processor request at a time (req_valid/req_ready), a single
// 64-bit word at an 8-byte aligned address in the given orientation;
// resp_valid pulses for one cycle with the read word. The memory side sends
// whole-line reads and write-backs (valid/ready) and waits for one response
// per request. Timing: a hit answers 2 cycles after acceptance; a store
// to a crossed word takes one cycle more; a miss adds 8 cycles of crossing
// lookups, the memory time, and for a valid victim 8 more lookup cycles.
//
// From the published design: the orientation bit, one crossing bit per
// 8 bytes, the fill/write/evict rules and pinning. This design's own
// choices: one lookup per cycle, clearing crossing bits on every eviction
// (not only on dirty write-backs), round-robin replacement, a blocking
// single-request processor port and the default geometry of the private
// first-level cache of the evaluated system (32 KB, 8 ways, 64-byte lines).
module rcnvm_cache
  import rcnvm_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768,
  parameter int unsigned WAYS       = 8,
  localparam int unsigned LINE_BYTES = LINE_WORDS * WORD_W / 8,
  localparam int unsigned SETS = SIZE_BYTES / (LINE_BYTES * WAYS),
  localparam int unsigned IDXW = $clog2(SETS),
  localparam int unsigned OFFW = $clog2(LINE_BYTES),
  localparam int unsigned TAGW = ADDR_W - IDXW - OFFW,
  localparam int unsigned WAYW = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  // processor side
  input  logic      req_valid,
  output logic      req_ready,
  input  cache_op_e req_op,
  input  orient_e   req_orient,
  input  addr_t     req_addr,
  input  word_t     req_wdata,
  output logic      resp_valid,
  output word_t     resp_rdata,
  // memory side
  output logic      mem_req_valid,
  input  logic      mem_req_ready,
  output orient_e   mem_req_orient,
  output logic      mem_req_write,
  output addr_t     mem_req_addr,
  output line_t     mem_req_wdata,
  input  logic      mem_resp_valid,
  input  line_t     mem_resp_rdata,
  // one-cycle event pulses
  output logic      ev_hit,
  output logic      ev_miss,
  output logic      ev_cross_fill,   // a shared word was copied at fill
  output logic      ev_cross_write,  // a store also updated the crossing line
  output logic      ev_cross_clear,  // an eviction cleared a crossing bit
  output logic      ev_writeback,
  output logic      ev_pin_skip      // replacement passed over a pinned way
);
  typedef struct packed {
    logic            valid;
    logic            dirty;
    orient_e         orient;
    logic            pinned;
    logic [7:0]      crossing;
    logic [TAGW-1:0] tag;
  } meta_t;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_EVICT_X, S_WB_REQ, S_WB_WAIT, S_FILL_REQ, S_FILL_WAIT,
    S_FILL_X, S_SERVE, S_WR_X, S_RESP
  } state_e;

  meta_t meta [SETS][WAYS];
  line_t data [SETS][WAYS];

  state_e          state;
  cache_op_e       r_op;
  orient_e         r_orient;
  addr_t           r_addr;
  word_t           r_wdata;
  logic [WAYW-1:0] r_way;
  logic [2:0]      k;
  logic [WAYW-1:0] rr;     // round-robin replacement pointer

  wire [IDXW-1:0] r_set  = r_addr[OFFW +: IDXW];
  wire addr_t     r_line = {r_addr[ADDR_W-1:OFFW], OFFW'(0)};
  wire [2:0]      r_word = r_addr[5:3];
  wire meta_t     r_meta = meta[r_set][r_way];
  wire addr_t     v_line = {r_meta.tag, r_set, OFFW'(0)};   // line in r_way

  // ---- probe: one tag lookup per cycle
  addr_t           p_addr;
  orient_e         p_orient;
  logic            p_hit;
  logic [WAYW-1:0] p_way;
  logic [IDXW-1:0] p_set;
  logic [2:0]      p_word;   // position of the shared word in the probed line
  always_comb begin
    unique case (state)
      S_EVICT_X: begin
        p_addr   = cross_line(v_line, k);
        p_orient = (r_meta.orient == ORIENT_ROW) ? ORIENT_COL : ORIENT_ROW;
        p_word   = v_line[HI_LSB +: 3];
      end
      S_FILL_X, S_WR_X: begin
        p_addr   = cross_line(r_line, (state == S_WR_X) ? r_word : k);
        p_orient = (r_orient == ORIENT_ROW) ? ORIENT_COL : ORIENT_ROW;
        p_word   = r_line[HI_LSB +: 3];
      end
      default: begin
        p_addr   = r_addr;
        p_orient = r_orient;
        p_word   = '0;
      end
    endcase
    p_set = p_addr[OFFW +: IDXW];
    p_hit = 1'b0;
    p_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (meta[p_set][w].valid && meta[p_set][w].orient == p_orient &&
          meta[p_set][w].tag == p_addr[ADDR_W-1 -: TAGW]) begin
        p_hit = 1'b1;
        p_way = WAYW'(w);
      end
  end

  // ---- victim choice: an invalid way, else round-robin over unpinned ways
  logic [WAYW-1:0] victim;
  logic            victim_skip;
  always_comb begin
    logic found;
    found       = 1'b0;
    victim      = rr;
    victim_skip = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (!found && !meta[r_set][w].valid) begin
        found  = 1'b1;
        victim = WAYW'(w);
      end
    for (int i = 0; i < WAYS; i++) begin
      logic [WAYW-1:0] w;
      w = WAYW'((int'(rr) + i) % WAYS);
      if (!found && !meta[r_set][w].pinned) begin
        found       = 1'b1;
        victim      = w;
        victim_skip = (i != 0);
      end
    end
  end

  assign req_ready      = (state == S_IDLE);
  assign mem_req_valid  = (state == S_WB_REQ) || (state == S_FILL_REQ);
  assign mem_req_write  = (state == S_WB_REQ);
  assign mem_req_orient = (state == S_WB_REQ) ? r_meta.orient : r_orient;
  assign mem_req_addr   = (state == S_WB_REQ) ? v_line : r_line;
  assign mem_req_wdata  = data[r_set][r_way];

  // ---- data array (not reset; only lines marked valid are ever read)
  always_ff @(posedge clk) begin
    unique case (state)
      S_FILL_WAIT: if (mem_resp_valid) data[r_set][r_way] <= mem_resp_rdata;
      S_FILL_X: if (p_hit)
        data[r_set][r_way][k*WORD_W +: WORD_W] <= data[p_set][p_way][p_word*WORD_W +: WORD_W];
      S_SERVE: if (r_op == OP_STORE)
        data[r_set][r_way][r_word*WORD_W +: WORD_W] <= r_wdata;
      S_WR_X: if (p_hit) data[p_set][p_way][p_word*WORD_W +: WORD_W] <= r_wdata;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      r_op       <= OP_LOAD;
      r_orient   <= ORIENT_ROW;
      r_addr     <= '0;
      r_wdata    <= '0;
      r_way      <= '0;
      k          <= '0;
      rr         <= '0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) meta[s][w] <= '0;
      {ev_hit, ev_miss, ev_cross_fill, ev_cross_write, ev_cross_clear,
       ev_writeback, ev_pin_skip} <= '0;
    end else begin
      resp_valid <= 1'b0;
      {ev_hit, ev_miss, ev_cross_fill, ev_cross_write, ev_cross_clear,
       ev_writeback, ev_pin_skip} <= '0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          r_op     <= req_op;
          r_orient <= req_orient;
          r_addr   <= {req_addr[ADDR_W-1:3], 3'b000};
          r_wdata  <= req_wdata;
          state    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (p_hit) begin
            ev_hit <= 1'b1;
            r_way  <= p_way;
            state  <= S_SERVE;
          end else if (r_op == OP_UNPIN) begin
            state <= S_RESP;
          end else begin
            ev_miss     <= 1'b1;
            ev_pin_skip <= victim_skip;
            r_way       <= victim;
            rr          <= victim + 1'b1;
            k           <= '0;
            state       <= meta[r_set][victim].valid ? S_EVICT_X : S_FILL_REQ;
          end
        end
        S_EVICT_X: begin
          if (r_meta.crossing[k] && p_hit) begin
            meta[p_set][p_way].crossing[p_word] <= 1'b0;
            ev_cross_clear <= 1'b1;
          end
          k <= k + 1'b1;
          if (k == 3'd7) begin
            if (r_meta.dirty) state <= S_WB_REQ;
            else begin
              meta[r_set][r_way].valid <= 1'b0;
              state <= S_FILL_REQ;
            end
          end
        end
        S_WB_REQ: if (mem_req_ready) begin
          ev_writeback <= 1'b1;
          state        <= S_WB_WAIT;
        end
        S_WB_WAIT: if (mem_resp_valid) begin
          meta[r_set][r_way].valid <= 1'b0;
          state <= S_FILL_REQ;
        end
        S_FILL_REQ: if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_resp_valid) begin
          meta[r_set][r_way] <= '{valid: 1'b1, dirty: 1'b0, orient: r_orient,
                                  pinned: 1'b0, crossing: 8'h00,
                                  tag: r_addr[ADDR_W-1 -: TAGW]};
          k     <= '0;
          state <= S_FILL_X;
        end
        S_FILL_X: begin
          if (p_hit) begin
            meta[r_set][r_way].crossing[k]      <= 1'b1;
            meta[p_set][p_way].crossing[p_word] <= 1'b1;
            ev_cross_fill <= 1'b1;
          end
          k <= k + 1'b1;
          if (k == 3'd7) state <= S_SERVE;
        end
        S_SERVE: begin
          resp_rdata <= data[r_set][r_way][r_word*WORD_W +: WORD_W];
          unique case (r_op)
            OP_STORE: begin
              meta[r_set][r_way].dirty <= 1'b1;
            end
            OP_PIN:   meta[r_set][r_way].pinned <= 1'b1;
            OP_UNPIN: meta[r_set][r_way].pinned <= 1'b0;
            default: ;
          endcase
          if (r_op == OP_STORE && r_meta.crossing[r_word]) state <= S_WR_X;
          else begin
            resp_valid <= 1'b1;
            state      <= S_IDLE;
          end
        end
        S_WR_X: begin
          // keep the synonym in the crossing line identical
          if (p_hit) begin
            meta[p_set][p_way].dirty <= 1'b1;
            ev_cross_write <= 1'b1;
          end
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        S_RESP: begin
          resp_valid <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A set crossing bit always has its crossing line in the cache.
  assert property (@(posedge clk) disable iff (!rst_n) state == S_WR_X |-> p_hit);
endmodule
