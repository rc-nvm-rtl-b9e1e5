// Self-checking testbench of rcnvm_bank at a reduced size (2 subarrays of
// 16 x 16 words). It first fills the bank with row-line writes, then issues
// random row and column line reads and writes. A word-level reference array
// gives the expected read data, and a reference of which buffer is open gives
// the expected latency (hit, closed, or close-then-open with or without the
// write-back pulse), which is checked cycle-exactly.
module tb_rcnvm_bank;
  import rcnvm_pkg::*;
  localparam int NS = 2, R = 16, C = 16;
  localparam int TCAS = 6, TRCD = 12, TRP = 1, TWP = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, req_write, resp_valid, resp_ready;
  orient_e req_orient, open_orient;
  logic [0:0] req_sa, open_sa;
  logic [3:0] req_row, req_col, open_idx;
  line_t req_wdata, resp_rdata;
  logic open_valid, ev_hit, ev_act, ev_flush, ev_switch;

  rcnvm_bank #(.N_SUB(NS), .ROWS(R), .COLS(C), .T_CAS(TCAS), .T_RCD(TRCD),
               .T_RP(TRP), .T_WP(TWP)) dut (.*);

  word_t ref_mem [NS][R][C];
  // reference buffer state
  bit m_open = 0, m_dirty = 0; orient_e m_or; int m_sa, m_idx;
  int checks = 0, failures = 0;
  int n_hit = 0, n_switch = 0, n_flush = 0;

  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_switch) n_switch++;
    if (ev_flush) n_flush++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic access(orient_e o, bit wr, int sa, int r, int c, line_t wd);
    int lat, exp_lat, idx;
    line_t exp;
    idx = (o == ORIENT_ROW) ? r : c;
    if (m_open && m_or == o && m_sa == sa && m_idx == idx) exp_lat = TCAS;
    else if (m_open) exp_lat = TRP + (m_dirty ? TWP : 0) + TRCD + TCAS;
    else exp_lat = TRCD + TCAS;
    if (!(m_open && m_or == o && m_sa == sa && m_idx == idx)) begin
      m_open = 1; m_dirty = 0; m_or = o; m_sa = sa; m_idx = idx;
    end
    if (wr) m_dirty = 1;
    for (int w = 0; w < 8; w++) begin
      if (o == ORIENT_ROW) begin
        exp[w*64 +: 64] = wr ? wd[w*64 +: 64] : ref_mem[sa][r][(c & ~7) + w];
        if (wr) ref_mem[sa][r][(c & ~7) + w] = wd[w*64 +: 64];
      end else begin
        exp[w*64 +: 64] = wr ? wd[w*64 +: 64] : ref_mem[sa][(r & ~7) + w][c];
        if (wr) ref_mem[sa][(r & ~7) + w][c] = wd[w*64 +: 64];
      end
    end
    @(negedge clk);
    req_valid = 1; req_orient = o; req_write = wr; req_sa = 1'(sa);
    req_row = 4'(r); req_col = 4'(c); req_wdata = wd;
    while (!req_ready) @(negedge clk);
    @(posedge clk); #1 req_valid = 0;
    lat = 0;
    while (!resp_valid) begin @(posedge clk); #1 lat++; end
    check("latency", lat, exp_lat);
    if (!wr) check("rdata", resp_rdata == exp, 1);
    @(negedge clk);
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; resp_ready = 1; req_write = 0; req_orient = ORIENT_ROW;
    req_sa = 0; req_row = 0; req_col = 0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NS; s++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c += 8) access(ORIENT_ROW, 1, s, r, c, rnd_line());
    for (int i = 0; i < 400; i++) begin
      automatic orient_e o = orient_e'($urandom_range(0, 1));
      automatic bit wr = ($urandom_range(0, 3) == 0);
      automatic int s = $urandom_range(0, NS - 1);
      automatic int r = (i % 3 == 0 && m_open && m_or == ORIENT_ROW) ? m_idx : $urandom_range(0, R - 1);
      automatic int c = (i % 3 == 0 && m_open && m_or == ORIENT_COL) ? m_idx : $urandom_range(0, C - 1);
      if (i % 3 == 0 && m_open) begin o = m_or; s = m_sa; end
      access(o, wr, s, r, c, rnd_line());
    end
    // every column line, read back
    for (int s = 0; s < NS; s++)
      for (int c = 0; c < C; c++)
        for (int r = 0; r < R; r += 8) access(ORIENT_COL, 0, s, r, c, '0);
    check("hits seen", n_hit > 0, 1);
    check("switches seen", n_switch > 0, 1);
    check("flushes seen", n_flush > 0, 1);
    $display("hits=%0d switches=%0d flushes=%0d", n_hit, n_switch, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
