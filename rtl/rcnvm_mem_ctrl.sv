// rcnvm_mem_ctrl: memory controller of one RC-NVM channel.
//
// Line requests (64 bytes, row- or column-oriented) enter a request queue of
// QDEPTH entries. Each request carries its orientation, which the controller
// forwards to the banks as the extra column-oriented signal next to the
// address; the address is decoded with the field order of the orientation
// (see rcnvm_pkg). Every cycle the scheduler issues at most one queued
// request on the shared command bus, following FR-FCFS: among requests whose
// bank is idle, the oldest one that hits the bank's open buffer (same
// orientation, subarray and row or column) goes first; if none hits, the
// oldest one goes. Issued requests leave the queue; the bank then works on
// its own, so all banks of the channel can be busy at once. Reordering is
// limited by a hazard check: a row line and a column line that cross share a
// word, so a request never overtakes an older request to the same 8 x 8-word
// tile when either of them is a write (this check is this design's own).
//
// Interface: request valid/ready with an ID_W-bit id; one response per
// request (valid/ready) with the same id and, for reads, the line. Responses
// of several banks are returned lowest bank index first. The queue depth and
// the FR-FCFS policy follow the published configuration; the collapsing
// queue (entry 0 always the oldest), the id-tagged response path and the
// combinational response selection are this design's own choices. Latency:
// a request accepted into an empty queue is issued in the next cycle.
module rcnvm_mem_ctrl
  import rcnvm_pkg::*;
#(
  parameter int unsigned QDEPTH = 32,
  parameter int unsigned N_RANK = 4,
  parameter int unsigned N_BANK = 8,
  parameter int unsigned N_SUB  = 8,
  parameter int unsigned ROWS   = 1024,
  parameter int unsigned COLS   = 1024,
  parameter int unsigned ID_W   = 8,
  localparam int unsigned NB  = N_RANK * N_BANK,
  localparam int unsigned SAW = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CW  = $clog2(COLS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // host side
  input  logic            req_valid,
  output logic            req_ready,
  input  orient_e         req_orient,
  input  logic            req_write,
  input  addr_t           req_addr,
  input  line_t           req_wdata,
  input  logic [ID_W-1:0] req_id,
  output logic            resp_valid,
  input  logic            resp_ready,
  output logic [ID_W-1:0] resp_id,
  output line_t           resp_rdata,
  // command bus to the banks (fields shared, one valid per bank)
  output logic [NB-1:0]   b_req_valid,
  input  logic [NB-1:0]   b_req_ready,
  output orient_e         b_orient,
  output logic            b_write,
  output logic [SAW-1:0]  b_sa,
  output logic [RW-1:0]   b_row,
  output logic [CW-1:0]   b_col,
  output line_t           b_wdata,
  input  logic [NB-1:0]   b_resp_valid,
  output logic [NB-1:0]   b_resp_ready,
  input  line_t           b_resp_rdata [NB],
  input  logic [NB-1:0]   b_open_valid,
  input  orient_e         b_open_orient [NB],
  input  logic [SAW-1:0]  b_open_sa [NB],
  input  logic [RW-1:0]   b_open_idx [NB],
  // one-cycle event pulses
  output logic            ev_issue_hit,    // issued request hits an open buffer
  output logic            ev_reorder,      // issued request was not the oldest
  output logic            ev_queue_full    // a request waited on a full queue
);
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned QW = $clog2(QDEPTH + 1);

  typedef struct packed {
    orient_e         orient;
    logic            write;
    logic [BW-1:0]   bank;
    logic [SAW-1:0]  sa;
    logic [RW-1:0]   row;
    logic [CW-1:0]   col;
    line_t           wdata;
    logic [ID_W-1:0] id;
  } entry_t;

  entry_t        q   [QDEPTH];
  logic [QW-1:0] count;
  logic [ID_W-1:0] inflight_id [NB];

  // ---- decode of the incoming request
  entry_t new_e;
  loc_t   nl;
  addr_t  unused_other;
  rcnvm_addr_map u_map (.addr(req_addr), .orient(req_orient), .loc(nl),
                        .other_addr(unused_other));
  always_comb begin
    new_e.orient = req_orient;
    new_e.write  = req_write;
    new_e.bank   = BW'({nl.rank, nl.bank});
    new_e.sa     = SAW'(nl.subarray);
    new_e.row    = RW'(nl.row);
    new_e.col    = CW'(nl.col);
    new_e.wdata  = req_wdata;
    new_e.id     = req_id;
  end

  assign req_ready = (count < QW'(QDEPTH));
  wire   accept    = req_valid && req_ready;

  // ---- ordering hazards: a row line and a column line of one subarray share
  // words exactly when they lie in the same 8 x 8-word tile. A request may not
  // overtake an older one on the same tile if either of them writes.
  logic [QDEPTH-1:0] blocked;
  always_comb begin
    for (int i = 0; i < QDEPTH; i++) begin
      blocked[i] = 1'b0;
      for (int j = 0; j < i; j++)
        if (q[j].bank == q[i].bank && q[j].sa == q[i].sa &&
            q[j].row[RW-1:3] == q[i].row[RW-1:3] && q[j].col[CW-1:3] == q[i].col[CW-1:3] &&
            (q[j].write || q[i].write))
          blocked[i] = 1'b1;
    end
  end

  // ---- FR-FCFS selection
  logic          sel_valid, sel_hit;
  logic [$clog2(QDEPTH)-1:0] sel;
  always_comb begin
    logic found_hit, found_any;
    logic [$clog2(QDEPTH)-1:0] first_hit, first_any;
    found_hit = 1'b0;
    found_any = 1'b0;
    first_hit = '0;
    first_any = '0;
    for (int i = QDEPTH - 1; i >= 0; i--) begin
      if (i < int'(count) && !blocked[i] && b_req_ready[q[i].bank]) begin
        found_any = 1'b1;
        first_any = ($clog2(QDEPTH))'(i);
        if (b_open_valid[q[i].bank] && b_open_orient[q[i].bank] == q[i].orient &&
            b_open_sa[q[i].bank] == q[i].sa &&
            b_open_idx[q[i].bank] == ((q[i].orient == ORIENT_ROW) ? q[i].row : RW'(q[i].col))) begin
          found_hit = 1'b1;
          first_hit = ($clog2(QDEPTH))'(i);
        end
      end
    end
    sel_valid = found_any;
    sel_hit   = found_hit;
    sel       = found_hit ? first_hit : first_any;
  end

  // ---- command bus
  always_comb begin
    b_req_valid = '0;
    if (sel_valid) b_req_valid[q[sel].bank] = 1'b1;
    b_orient = q[sel].orient;
    b_write  = q[sel].write;
    b_sa     = q[sel].sa;
    b_row    = q[sel].row;
    b_col    = q[sel].col;
    b_wdata  = q[sel].wdata;
  end

  // ---- queue update: remove the issued entry (collapse), append the new one
  logic [QW-1:0] count_rm;   // count after the removal
  assign count_rm = count - QW'(sel_valid);

  always_ff @(posedge clk) begin
    if (sel_valid)
      for (int i = 0; i < QDEPTH - 1; i++)
        if (i >= int'(sel)) q[i] <= q[i+1];
    if (accept) q[count_rm[$clog2(QDEPTH)-1:0]] <= new_e;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count         <= '0;
      ev_issue_hit  <= 1'b0;
      ev_reorder    <= 1'b0;
      ev_queue_full <= 1'b0;
      for (int b = 0; b < NB; b++) inflight_id[b] <= '0;
    end else begin
      if (sel_valid) inflight_id[q[sel].bank] <= q[sel].id;
      count         <= count_rm + QW'(accept);
      ev_issue_hit  <= sel_valid && sel_hit;
      ev_reorder    <= sel_valid && sel != 0;
      ev_queue_full <= req_valid && !req_ready;
    end
  end

  // ---- responses: lowest bank index first
  always_comb begin
    logic done;
    done         = 1'b0;
    resp_valid   = 1'b0;
    resp_id      = '0;
    resp_rdata   = '0;
    b_resp_ready = '0;
    for (int b = 0; b < NB; b++) begin
      if (!done && b_resp_valid[b]) begin
        done            = 1'b1;
        resp_valid      = 1'b1;
        resp_id         = inflight_id[b];
        resp_rdata      = b_resp_rdata[b];
        b_resp_ready[b] = resp_ready;
      end
    end
  end

  // A request is only issued to a bank that can take it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (b_req_valid & ~b_req_ready) == '0);
endmodule
