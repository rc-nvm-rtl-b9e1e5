// Self-checking testbench of rcnvm_cache (8 KB, 8 ways, 16 sets) against a
// behavioural line memory. The memory and the reference model both store
// words by physical location (row-oriented word address), so a value stored
// through one orientation must be seen through the other.
//  1. Worked example: column lines of columns 176, 178, 180 and 182 (rows
//     432..439) are loaded, then the row line of row 437, columns 176..183:
//     four shared words are copied at fill. A store to row 437, column 182
//     (row address 0x0036a5b0) must also update the column line, read back
//     with the column address 0x0016cda8 as a hit.
//  2. Hit latency of 2 cycles.
//  3. Pinning: a pinned line survives a stream of conflicting misses.
//  4. Random loads/stores in both orientations over a region twice the
//     cache, compared word by word with the reference.
module tb_rcnvm_cache;
  import rcnvm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid;
  cache_op_e req_op;
  orient_e req_orient, mem_req_orient;
  addr_t req_addr, mem_req_addr;
  word_t req_wdata, resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  line_t mem_req_wdata, mem_resp_rdata;
  logic ev_hit, ev_miss, ev_cross_fill, ev_cross_write, ev_cross_clear, ev_writeback, ev_pin_skip;

  rcnvm_cache #(.SIZE_BYTES(8192), .WAYS(8)) dut (.*);

  // ---- memory model and reference, keyed by row-oriented word address
  word_t mem [addr_t];
  word_t ref_m [addr_t];
  function automatic addr_t row_word(addr_t a, orient_e o);
    return (o == ORIENT_ROW) ? {a[31:3], 3'b0} : swap_orient({a[31:3], 3'b0});
  endfunction
  function automatic word_t init_val(addr_t ra);
    return {ra, ~ra};
  endfunction

  int busy = 0;
  bit pend_wr; orient_e pend_o; addr_t pend_a; line_t pend_d;
  assign mem_req_ready = (busy == 0);
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (!rst_n) busy <= 0;
    else if (busy > 1) busy <= busy - 1;
    else if (busy == 1) begin
      busy <= 0;
      for (int w = 0; w < 8; w++) begin
        automatic addr_t wa = row_word(pend_a + addr_t'(8 * w), pend_o);
        if (pend_wr) mem[wa] = pend_d[w*64 +: 64];
        else mem_resp_rdata[w*64 +: 64] <= mem.exists(wa) ? mem[wa] : init_val(wa);
      end
      mem_resp_valid <= 1'b1;
    end else if (mem_req_valid) begin
      busy <= $urandom_range(2, 6);
      pend_wr = mem_req_write; pend_o = mem_req_orient; pend_a = mem_req_addr;
      pend_d = mem_req_wdata;
    end
  end

  int checks = 0, failures = 0;
  int n_hit = 0, n_cfill = 0, n_cwrite = 0, n_cclear = 0, n_wb = 0, n_skip = 0;
  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_cross_fill) n_cfill++;
    if (ev_cross_write) n_cwrite++;
    if (ev_cross_clear) n_cclear++;
    if (ev_writeback) n_wb++;
    if (ev_pin_skip) n_skip++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  int last_lat;
  task automatic op(cache_op_e o, orient_e ori, addr_t a, word_t wd = '0);
    addr_t ra = row_word(a, ori);
    @(negedge clk);
    req_valid = 1; req_op = o; req_orient = ori; req_addr = a; req_wdata = wd;
    @(posedge clk); #1 req_valid = 0;
    last_lat = 0;
    while (!resp_valid) begin @(posedge clk); #1 last_lat++; end
    if (o == OP_LOAD || o == OP_PIN)
      check($sformatf("load %h", a), resp_rdata, ref_m.exists(ra) ? ref_m[ra] : init_val(ra));
    if (o == OP_STORE) ref_m[ra] = wd;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic addr_t mk(orient_e o, int blk, int r, int c);
    addr_t a = '0;
    a[31:24] = 8'(blk);
    if (o == ORIENT_ROW) begin a[22:13] = 10'(r); a[12:3] = 10'(c); end
    else begin a[22:13] = 10'(c); a[12:3] = 10'(r); end
    return a;
  endfunction

  initial begin
    int c0, h0;
    req_valid = 0; req_op = OP_LOAD; req_orient = ORIENT_ROW; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. worked example
    check("example address", swap_orient(32'h0036a5b0), 32'h0016cda8);
    for (int c = 176; c <= 182; c += 2) op(OP_LOAD, ORIENT_COL, mk(ORIENT_COL, 0, 432, c));
    c0 = n_cfill;
    op(OP_LOAD, ORIENT_ROW, 32'h0036a5b0);
    check("shared words copied at fill", n_cfill - c0, 4);
    op(OP_STORE, ORIENT_ROW, 32'h0036a5b0, 64'h1234_5678_9abc_def0);
    check("store updated crossing line", n_cwrite, 1);
    h0 = n_hit;
    op(OP_LOAD, ORIENT_COL, 32'h0016cda8);
    check("column read is a hit", n_hit - h0, 1);
    check("column read sees store", resp_rdata, 64'h1234_5678_9abc_def0);
    // 2. hit latency
    op(OP_LOAD, ORIENT_ROW, 32'h0036a5b8);
    check("hit latency", last_lat, 2);
    // 3. pinning: pin one line, then stream 20 lines into the same set
    op(OP_PIN, ORIENT_ROW, mk(ORIENT_ROW, 3, 0, 0));
    for (int i = 1; i <= 20; i++) op(OP_LOAD, ORIENT_ROW, mk(ORIENT_ROW, 3, 2 * i, 0));
    h0 = n_hit;
    op(OP_LOAD, ORIENT_ROW, mk(ORIENT_ROW, 3, 0, 0));
    check("pinned line kept", n_hit - h0, 1);
    check("pinned way skipped", n_skip > 0, 1);
    op(OP_UNPIN, ORIENT_ROW, mk(ORIENT_ROW, 3, 0, 0));
    // 4. random traffic in both orientations: 4 blocks x 16 x 16 words (2x the cache)
    for (int i = 0; i < 3000; i++) begin
      automatic orient_e o = orient_e'($urandom_range(0, 1));
      automatic int blk = $urandom_range(0, 3);
      automatic addr_t a = mk(o, blk, $urandom_range(0, 15), $urandom_range(0, 15));
      if ($urandom_range(0, 2) == 0) op(OP_STORE, o, a, {$urandom, $urandom});
      else op(OP_LOAD, o, a);
    end
    check("crossing bits cleared on eviction", n_cclear > 0, 1);
    check("write-backs seen", n_wb > 0, 1);
    check("synonym stores seen", n_cwrite > 10, 1);
    $display("hits=%0d cross_fill=%0d cross_write=%0d cross_clear=%0d wb=%0d skip=%0d",
             n_hit, n_cfill, n_cwrite, n_cclear, n_wb, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
