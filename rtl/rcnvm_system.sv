// rcnvm_system: an RC-NVM main memory with a synonym-aware cache in front.
//
// A processor port issues word loads and stores in either orientation
// (load/store use row-oriented addresses, cload/cstore column-oriented ones)
// and the group-caching pin/unpin operations. They go to rcnvm_cache, which
// keeps row and column copies of a shared word identical. Cache misses and
// write-backs become 64-byte line requests tagged with their orientation;
// the channel bit of the address (the same bit in both address forms) steers
// each one to the memory controller of its channel. Each controller
// (rcnvm_mem_ctrl, FR-FCFS over a 32-entry queue) drives the banks of its
// channel, N_RANK ranks of N_BANK banks each (rcnvm_bank), which open a row
// buffer or a column buffer, never both.
//
// Defaults are the evaluated configuration: 2 channels, 4 ranks per channel,
// 8 banks per rank, 8 subarrays of 1024 x 1024 8-byte words per bank
// (4 GB in all), RC-NVM timings tCAS 6, tRCD 12, tRP 1, and a 32 KB 8-way
// cache. All state is reset by rst_n except the memory array and cache data.
// The cache and the memory run on one clock here (a choice of this design:
// the processor and memory clocks are different in the evaluated system).
// Event outputs are one-cycle pulses collected from all blocks, for counting.
// With one blocking cache, each channel queue holds at most one request, so
// the FR-FCFS reordering and queue-full conditions of rcnvm_mem_ctrl cannot
// arise here; their event outputs are left unconnected for that reason.
module rcnvm_system
  import rcnvm_pkg::*;
#(
  parameter int unsigned N_CH       = 2,
  parameter int unsigned N_RANK     = 4,
  parameter int unsigned N_BANK     = 8,
  parameter int unsigned N_SUB      = 8,
  parameter int unsigned ROWS       = 1024,
  parameter int unsigned COLS       = 1024,
  parameter int unsigned QDEPTH     = 32,
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned CACHE_WAYS  = 8,
  localparam int unsigned NB  = N_RANK * N_BANK,
  localparam int unsigned SAW = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CW  = $clog2(COLS)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  cache_op_e req_op,
  input  orient_e   req_orient,
  input  addr_t     req_addr,
  input  word_t     req_wdata,
  output logic      resp_valid,
  output word_t     resp_rdata,
  // event pulses
  output logic      ev_cache_hit,
  output logic      ev_cache_miss,
  output logic      ev_cross_fill,
  output logic      ev_cross_write,
  output logic      ev_cross_clear,
  output logic      ev_writeback,
  output logic      ev_pin_skip,
  output logic      ev_buf_hit,      // a bank access hit its open buffer
  output logic      ev_buf_switch,   // a bank switched row <-> column buffer
  output logic      ev_buf_flush,    // a written buffer was written back
  output logic      ev_sched_hit     // FR-FCFS issued a buffer-hit request
);
  // ---- cache
  logic    m_req_valid, m_req_ready, m_req_write, m_resp_valid;
  orient_e m_req_orient;
  addr_t   m_req_addr;
  line_t   m_req_wdata, m_resp_rdata;

  rcnvm_cache #(.SIZE_BYTES(CACHE_BYTES), .WAYS(CACHE_WAYS)) u_cache (
    .clk, .rst_n, .req_valid, .req_ready, .req_op, .req_orient, .req_addr,
    .req_wdata, .resp_valid, .resp_rdata,
    .mem_req_valid(m_req_valid), .mem_req_ready(m_req_ready),
    .mem_req_orient(m_req_orient), .mem_req_write(m_req_write),
    .mem_req_addr(m_req_addr), .mem_req_wdata(m_req_wdata),
    .mem_resp_valid(m_resp_valid), .mem_resp_rdata(m_resp_rdata),
    .ev_hit(ev_cache_hit), .ev_miss(ev_cache_miss), .ev_cross_fill,
    .ev_cross_write, .ev_cross_clear, .ev_writeback, .ev_pin_skip);

  // ---- channels
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1;
  wire [CHW-1:0] ch_sel = CHW'(m_req_addr[CH_LSB +: CH_W]);

  logic [N_CH-1:0] c_req_ready, c_resp_valid;
  line_t           c_resp_rdata [N_CH];
  logic [N_CH-1:0] c_hit, c_switch, c_flush, c_shit;

  for (genvar ch = 0; ch < N_CH; ch++) begin : g_ch
    logic [NB-1:0]  b_req_valid, b_req_ready, b_resp_valid, b_resp_ready, b_open_valid;
    orient_e        b_orient;
    logic           b_write;
    logic [SAW-1:0] b_sa;
    logic [RW-1:0]  b_row;
    logic [CW-1:0]  b_col;
    line_t          b_wdata;
    line_t          b_resp_rdata [NB];
    orient_e        b_open_orient [NB];
    logic [SAW-1:0] b_open_sa [NB];
    logic [RW-1:0]  b_open_idx [NB];
    logic [NB-1:0]  e_hit, e_act, e_flush, e_switch;
    logic [7:0]     resp_id;
    logic           queue_full, reorder;   // cannot occur: one line request at a time

    rcnvm_mem_ctrl #(.QDEPTH(QDEPTH), .N_RANK(N_RANK), .N_BANK(N_BANK),
                     .N_SUB(N_SUB), .ROWS(ROWS), .COLS(COLS)) u_ctrl (
      .clk, .rst_n,
      .req_valid(m_req_valid && ch_sel == CHW'(ch)), .req_ready(c_req_ready[ch]),
      .req_orient(m_req_orient), .req_write(m_req_write), .req_addr(m_req_addr),
      .req_wdata(m_req_wdata), .req_id(8'd0),
      .resp_valid(c_resp_valid[ch]), .resp_ready(1'b1), .resp_id(resp_id),
      .resp_rdata(c_resp_rdata[ch]),
      .b_req_valid, .b_req_ready, .b_orient, .b_write, .b_sa, .b_row, .b_col,
      .b_wdata, .b_resp_valid, .b_resp_ready, .b_resp_rdata, .b_open_valid,
      .b_open_orient, .b_open_sa, .b_open_idx,
      .ev_issue_hit(c_shit[ch]), .ev_reorder(reorder), .ev_queue_full(queue_full));

    for (genvar b = 0; b < NB; b++) begin : g_bank
      rcnvm_bank #(.N_SUB(N_SUB), .ROWS(ROWS), .COLS(COLS)) u_bank (
        .clk, .rst_n, .req_valid(b_req_valid[b]), .req_ready(b_req_ready[b]),
        .req_orient(b_orient), .req_write(b_write), .req_sa(b_sa), .req_row(b_row),
        .req_col(b_col), .req_wdata(b_wdata), .resp_valid(b_resp_valid[b]),
        .resp_ready(b_resp_ready[b]), .resp_rdata(b_resp_rdata[b]),
        .open_valid(b_open_valid[b]), .open_orient(b_open_orient[b]),
        .open_sa(b_open_sa[b]), .open_idx(b_open_idx[b]),
        .ev_hit(e_hit[b]), .ev_act(e_act[b]), .ev_flush(e_flush[b]),
        .ev_switch(e_switch[b]));
    end

    assign c_hit[ch]    = |e_hit;
    assign c_switch[ch] = |e_switch;
    assign c_flush[ch]  = |e_flush;
  end

  // The cache has one line request outstanding, so at most one channel
  // answers at a time.
  assign m_req_ready  = c_req_ready[ch_sel];
  assign m_resp_valid = |c_resp_valid;
  always_comb begin
    m_resp_rdata = '0;
    for (int ch = 0; ch < N_CH; ch++)
      if (c_resp_valid[ch]) m_resp_rdata = c_resp_rdata[ch];
  end

  assign ev_buf_hit       = |c_hit;
  assign ev_buf_switch    = |c_switch;
  assign ev_buf_flush     = |c_flush;
  assign ev_sched_hit     = |c_shit;

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_resp_valid));
endmodule
