// Self-checking testbench of rcnvm_mem_ctrl driving two small rcnvm_bank
// instances (1 rank x 2 banks, 2 subarrays of 16 x 16 words, 4-entry queue).
// Part 1 checks FR-FCFS ordering directly: with a bank busy on row 1, a
// later request to row 1 must overtake an earlier one to row 2. Part 2
// sends random row/column reads and writes with ids and checks every
// returned line against a word-level reference memory; it also checks that
// the queue filled up and requests overtook older ones at least once.
module tb_rcnvm_mem_ctrl;
  import rcnvm_pkg::*;
  localparam int NS = 2, R = 16, C = 16, NB = 2, QD = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_write, resp_valid, resp_ready;
  orient_e req_orient;
  addr_t req_addr;
  line_t req_wdata, resp_rdata;
  logic [7:0] req_id, resp_id;
  logic [NB-1:0] b_req_valid, b_req_ready, b_resp_valid, b_resp_ready, b_open_valid;
  orient_e b_orient, b_open_orient [NB];
  logic b_write;
  logic [0:0] b_sa, b_open_sa [NB];
  logic [3:0] b_row, b_col, b_open_idx [NB];
  line_t b_wdata, b_resp_rdata [NB];
  logic ev_issue_hit, ev_reorder, ev_queue_full;
  logic [NB-1:0] e_hit, e_act, e_flush, e_switch;

  rcnvm_mem_ctrl #(.QDEPTH(QD), .N_RANK(1), .N_BANK(NB), .N_SUB(NS), .ROWS(R), .COLS(C))
    dut (.*);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    rcnvm_bank #(.N_SUB(NS), .ROWS(R), .COLS(C)) u_bank (
      .clk, .rst_n, .req_valid(b_req_valid[b]), .req_ready(b_req_ready[b]),
      .req_orient(b_orient), .req_write(b_write), .req_sa(b_sa), .req_row(b_row),
      .req_col(b_col), .req_wdata(b_wdata), .resp_valid(b_resp_valid[b]),
      .resp_ready(b_resp_ready[b]), .resp_rdata(b_resp_rdata[b]),
      .open_valid(b_open_valid[b]), .open_orient(b_open_orient[b]),
      .open_sa(b_open_sa[b]), .open_idx(b_open_idx[b]),
      .ev_hit(e_hit[b]), .ev_act(e_act[b]), .ev_flush(e_flush[b]), .ev_switch(e_switch[b]));
  end

  word_t ref_mem [NB][NS][R][C];
  line_t exp_data [256];
  bit    exp_rd [256];
  bit    outstanding [256];
  int checks = 0, failures = 0, n_resp = 0, n_reorder = 0, n_full = 0, n_hit = 0;
  int order [$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Build an address: 1 rank, bank b, subarray s, row r, column c.
  function automatic addr_t mk(orient_e o, int b, int s, int r, int c);
    addr_t a = '0;
    a[BK_LSB +: BANK_W] = BANK_W'(b);
    a[SA_LSB +: SA_W]   = SA_W'(s);
    if (o == ORIENT_ROW) begin a[HI_LSB +: 10] = 10'(r); a[LO_LSB +: 10] = 10'(c); end
    else begin a[HI_LSB +: 10] = 10'(c); a[LO_LSB +: 10] = 10'(r); end
    return a;
  endfunction

  // Enqueue; the reference effect is applied at enqueue time, which is
  // valid because requests to the same line are never reordered.
  task automatic send(orient_e o, bit wr, int b, int s, int r, int c, logic [7:0] id);
    line_t wd, e;
    for (int i = 0; i < 16; i++) wd[i*32 +: 32] = $urandom;
    for (int w = 0; w < 8; w++) begin
      if (o == ORIENT_ROW) begin
        e[w*64 +: 64] = ref_mem[b][s][r][(c & ~7) + w];
        if (wr) ref_mem[b][s][r][(c & ~7) + w] = wd[w*64 +: 64];
      end else begin
        e[w*64 +: 64] = ref_mem[b][s][(r & ~7) + w][c];
        if (wr) ref_mem[b][s][(r & ~7) + w][c] = wd[w*64 +: 64];
      end
    end
    exp_data[id] = e; exp_rd[id] = !wr; outstanding[id] = 1;
    req_valid = 1; req_orient = o; req_write = wr; req_addr = mk(o, b, s, r, c);
    req_wdata = wd; req_id = id;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    #1 req_valid = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ev_reorder) n_reorder++;
    if (ev_queue_full) n_full++;
    if (ev_issue_hit) n_hit++;
    if (resp_valid && resp_ready) begin
      n_resp++;
      order.push_back(int'(resp_id));
      check("id outstanding", outstanding[resp_id], 1);
      outstanding[resp_id] = 0;
      if (exp_rd[resp_id]) check("rdata", resp_rdata == exp_data[resp_id], 1);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int id;
    req_valid = 0; resp_ready = 1; req_write = 0; req_orient = ORIENT_ROW;
    req_addr = '0; req_wdata = '0; req_id = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // initialise both banks with row writes
    id = 0;
    for (int b = 0; b < NB; b++)
      for (int s = 0; s < NS; s++)
        for (int r = 0; r < R; r++)
          for (int c = 0; c < C; c += 8) begin
            send(ORIENT_ROW, 1, b, s, r, c, 8'(id)); id = (id + 1) % 256;
          end
    wait (n_resp == id);
    // FR-FCFS: 200 opens row 1 of bank 0; 201 (row 2) is older than 202 (row 1)
    order.delete();
    send(ORIENT_ROW, 0, 0, 0, 1, 0, 200);
    send(ORIENT_ROW, 0, 0, 0, 2, 0, 201);
    send(ORIENT_ROW, 0, 0, 0, 1, 8, 202);
    wait (order.size() == 3);
    check("frfcfs order 0", order[0], 200);
    check("frfcfs order 1", order[1], 202);
    check("frfcfs order 2", order[2], 201);
    // random mix
    id = 0;
    for (int i = 0; i < 600; i++) begin
      while (outstanding[id]) @(posedge clk);
      send(orient_e'($urandom_range(0, 1)), $urandom_range(0, 2) == 0,
           $urandom_range(0, NB - 1), $urandom_range(0, NS - 1),
           $urandom_range(0, R - 1), $urandom_range(0, C - 1), 8'(id));
      id = (id + 1) % 128;
    end
    repeat (400) @(posedge clk);
    for (int k = 0; k < 256; k++) check("all answered", outstanding[k], 0);
    check("reordered seen", n_reorder > 0, 1);
    check("queue full seen", n_full > 0, 1);
    check("open-buffer hits seen", n_hit > 0, 1);
    $display("reorders=%0d full=%0d hits=%0d", n_reorder, n_full, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
