// rcnvm_addr_map: address decoder of the RC-NVM memory controller.
//
// Takes a 32-bit address together with its orientation (the extra
// column-oriented signal that cload/cstore accesses carry) and splits it into
// the physical fields rank, subarray, bank, channel, row, column and intrabus
// byte offset. It also returns the same location's address in the other
// orientation, which is what software obtains by converting a row-oriented
// address into a column-oriented one: the two 10-bit middle fields are
// swapped and everything else is kept.
// The field order and widths follow the published address format; the
// module is purely combinational (no clock, zero latency).
module rcnvm_addr_map
  import rcnvm_pkg::*;
(
  input  addr_t   addr,
  input  orient_e orient,
  output loc_t    loc,
  output addr_t   other_addr   // same word, in the opposite orientation
);
  always_comb begin
    loc        = decode_addr(addr, orient);
    other_addr = swap_orient(addr);
  end
endmodule
