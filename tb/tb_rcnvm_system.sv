// End-to-end testbench of rcnvm_system at a reduced size: 2 channels,
// 1 rank x 2 banks per channel, 2 subarrays of 16 x 16 words, 2 KB 4-way
// cache. The memory array starts with unknown contents, so the test first
// writes every word through the cache (row-oriented stores), then runs
// random loads and stores in both orientations plus pin/unpin, comparing
// every loaded word with a reference kept by physical location. It counts
// each mechanism (cache hit/miss, shared-word copy at fill, synonym store,
// crossing-bit clear, write-back, pinned-way skip, buffer hit, row/column
// buffer switch, buffer flush, scheduler buffer hit) and fails if any never
// happened.
module tb_rcnvm_system;
  import rcnvm_pkg::*;
  localparam int R = 16, C = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid;
  cache_op_e req_op;
  orient_e req_orient;
  addr_t req_addr;
  word_t req_wdata, resp_rdata;
  logic ev_cache_hit, ev_cache_miss, ev_cross_fill, ev_cross_write, ev_cross_clear,
        ev_writeback, ev_pin_skip, ev_buf_hit, ev_buf_switch, ev_buf_flush, ev_sched_hit;

  rcnvm_system #(.N_CH(2), .N_RANK(1), .N_BANK(2), .N_SUB(2), .ROWS(R), .COLS(C),
                 .QDEPTH(4), .CACHE_BYTES(2048), .CACHE_WAYS(4)) dut (.*);

  word_t ref_m [addr_t];
  int checks = 0, failures = 0;
  int cnt [11];
  string names [11] = '{"cache hit", "cache miss", "shared-word copy at fill",
                        "synonym store", "crossing-bit clear", "write-back",
                        "pinned-way skip", "buffer hit", "row/column buffer switch",
                        "buffer flush", "scheduler buffer hit"};
  always @(posedge clk) if (rst_n) begin
    cnt[0] += int'(ev_cache_hit);   cnt[1] += int'(ev_cache_miss);
    cnt[2] += int'(ev_cross_fill);  cnt[3] += int'(ev_cross_write);
    cnt[4] += int'(ev_cross_clear); cnt[5] += int'(ev_writeback);
    cnt[6] += int'(ev_pin_skip);    cnt[7] += int'(ev_buf_hit);
    cnt[8] += int'(ev_buf_switch);  cnt[9] += int'(ev_buf_flush);
    cnt[10] += int'(ev_sched_hit);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // channel ch, bank b, subarray s, row r, column c
  function automatic addr_t mk(orient_e o, int ch, int b, int s, int r, int c);
    addr_t a = '0;
    a[CH_LSB] = 1'(ch);
    a[BK_LSB] = 1'(b);
    a[SA_LSB] = 1'(s);
    if (o == ORIENT_ROW) begin a[HI_LSB +: 10] = 10'(r); a[LO_LSB +: 10] = 10'(c); end
    else begin a[HI_LSB +: 10] = 10'(c); a[LO_LSB +: 10] = 10'(r); end
    return a;
  endfunction

  task automatic op(cache_op_e o, orient_e ori, addr_t a, word_t wd = '0);
    addr_t ra = (ori == ORIENT_ROW) ? a : swap_orient(a);
    @(negedge clk);
    req_valid = 1; req_op = o; req_orient = ori; req_addr = a; req_wdata = wd;
    @(posedge clk); #1 req_valid = 0;
    while (!resp_valid) @(posedge clk);
    if (o == OP_LOAD || o == OP_PIN) check($sformatf("load %h", a), resp_rdata, ref_m[ra]);
    if (o == OP_STORE) ref_m[ra] = wd;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_op = OP_LOAD; req_orient = ORIENT_ROW; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // initialise all 2 x 2 x 2 x 16 x 16 words
    for (int ch = 0; ch < 2; ch++) for (int b = 0; b < 2; b++) for (int s = 0; s < 2; s++)
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
        op(OP_STORE, ORIENT_ROW, mk(ORIENT_ROW, ch, b, s, r, c), {$urandom, $urandom});
    // pin a line, then stream conflicting lines through its set
    op(OP_PIN, ORIENT_COL, mk(ORIENT_COL, 0, 0, 0, 0, 0));
    for (int i = 1; i < 12; i++) op(OP_LOAD, ORIENT_COL, mk(ORIENT_COL, i % 2, i / 2 % 2, i / 4 % 2, 0, 0));
    op(OP_UNPIN, ORIENT_COL, mk(ORIENT_COL, 0, 0, 0, 0, 0));
    // random traffic in both orientations
    for (int i = 0; i < 4000; i++) begin
      automatic orient_e o = orient_e'($urandom_range(0, 1));
      automatic addr_t a = mk(o, $urandom_range(0, 1), $urandom_range(0, 1),
                              $urandom_range(0, 1), $urandom_range(0, R - 1),
                              $urandom_range(0, C - 1));
      if ($urandom_range(0, 2) == 0) op(OP_STORE, o, a, {$urandom, $urandom});
      else op(OP_LOAD, o, a);
    end
    for (int m = 0; m < 11; m++) begin
      $display("%-26s %0d", names[m], cnt[m]);
      check(names[m], cnt[m] > 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
