// Full-size run of rcnvm_system with every parameter at its default
// (2 channels x 4 ranks x 8 banks x 8 subarrays of 1024 x 1024 words, 32 KB
// 8-way cache). It takes one word through a complete round trip in both
// orientations: row-oriented stores to row 437, columns 176..183 of one
// subarray in each channel, a column-oriented load of each stored word
// (column address = row address with row and column fields swapped), a
// column-oriented store, and a row-oriented load that must see it after
// the lines have been evicted by a stream of conflicting misses.
module tb_rcnvm_system_full;
  import rcnvm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, resp_valid;
  cache_op_e req_op;
  orient_e req_orient;
  addr_t req_addr;
  word_t req_wdata, resp_rdata;
  logic ev_cache_hit, ev_cache_miss, ev_cross_fill, ev_cross_write, ev_cross_clear,
        ev_writeback, ev_pin_skip, ev_buf_hit, ev_buf_switch, ev_buf_flush, ev_sched_hit;

  rcnvm_system dut (.*);

  int checks = 0, failures = 0, n_switch = 0, n_wb = 0;
  always @(posedge clk) begin
    n_switch += int'(ev_buf_switch);
    n_wb     += int'(ev_writeback);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic op(cache_op_e o, orient_e ori, addr_t a, word_t wd = '0);
    @(negedge clk);
    req_valid = 1; req_op = o; req_orient = ori; req_addr = a; req_wdata = wd;
    @(posedge clk); #1 req_valid = 0;
    while (!resp_valid) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t a;
    req_valid = 0; req_op = OP_LOAD; req_orient = ORIENT_ROW; req_addr = '0; req_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ch = 0; ch < 2; ch++) begin
      for (int c = 176; c < 184; c++) begin
        a = 32'h0036a580 | addr_t'(c % 8) << 3 | addr_t'(ch) << CH_LSB;
        op(OP_STORE, ORIENT_ROW, a, 64'hC0DE_0000_0000_0000 | 64'(ch * 256 + c));
      end
      for (int c = 176; c < 184; c++) begin
        a = swap_orient(32'h0036a580 | addr_t'(c % 8) << 3 | addr_t'(ch) << CH_LSB);
        op(OP_LOAD, ORIENT_COL, a);
        check("column load", resp_rdata, 64'hC0DE_0000_0000_0000 | 64'(ch * 256 + c));
      end
    end
    a = 32'h0016cda8;   // row 437, column 182, column-oriented
    op(OP_STORE, ORIENT_COL, a, 64'hFEED_FACE_0BAD_BEEF);
    // evict: 16 lines mapping to the same sets, in other ranks
    for (int i = 1; i <= 16; i++) begin
      op(OP_LOAD, ORIENT_COL, a ^ (addr_t'(i) << RK_LSB - 2));
      op(OP_LOAD, ORIENT_ROW, 32'h0036a5b0 ^ (addr_t'(i) << RK_LSB - 2));
    end
    op(OP_LOAD, ORIENT_ROW, 32'h0036a5b0);
    check("row load after eviction", resp_rdata, 64'hFEED_FACE_0BAD_BEEF);
    check("write-backs happened", 64'(n_wb > 0), 1);
    check("buffer switches happened", 64'(n_switch > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
