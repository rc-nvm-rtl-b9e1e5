// Self-checking testbench of rcnvm_addr_map. Checks the worked example of a
// word at row 437, column 182 (row-oriented 0x0036a5b0, column-oriented
// 0x0016cda8), then random addresses against a field extraction written
// independently with shifts and masks.
module tb_rcnvm_addr_map;
  import rcnvm_pkg::*;
  addr_t   addr, other;
  orient_e orient;
  loc_t    loc;
  int checks = 0, failures = 0;

  rcnvm_addr_map dut (.addr(addr), .orient(orient), .loc(loc), .other_addr(other));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 32'h0036a5b0; orient = ORIENT_ROW; #1;
    check("ex row", loc.row, 437);
    check("ex col", loc.col, 182);
    check("ex conv", other, 32'h0016cda8);
    addr = 32'h0016cda8; orient = ORIENT_COL; #1;
    check("ex2 row", loc.row, 437);
    check("ex2 col", loc.col, 182);
    check("ex2 conv", other, 32'h0036a5b0);
    for (int i = 0; i < 200; i++) begin
      addr = $urandom; orient = orient_e'(i[0]); #1;
      check("rank", loc.rank, (addr >> 30) & 3);
      check("sa",   loc.subarray, (addr >> 27) & 7);
      check("bank", loc.bank, (addr >> 24) & 7);
      check("ch",   loc.channel, (addr >> 23) & 1);
      check("ib",   loc.intrabus, addr & 7);
      if (orient == ORIENT_ROW) begin
        check("row", loc.row, (addr >> 13) & 1023);
        check("col", loc.col, (addr >> 3) & 1023);
      end else begin
        check("row", loc.row, (addr >> 3) & 1023);
        check("col", loc.col, (addr >> 13) & 1023);
      end
      check("conv", other, (addr & 32'hFF800007) | (((addr >> 13) & 1023) << 3)
                           | (((addr >> 3) & 1023) << 13));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
