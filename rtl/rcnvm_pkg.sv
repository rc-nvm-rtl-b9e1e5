// rcnvm_pkg: shared types and constants of the RC-NVM memory system.
//
// The 32-bit physical address has two forms that name the same 8-byte word.
// Both share the high fields (rank, subarray, bank, channel) and the 3-bit
// byte offset on the 64-bit bus ("intrabus"); they differ only in the order
// of the two 10-bit fields in the middle:
//   row-oriented:    [31:30] rank [29:27] subarray [26:24] bank [23] channel
//                    [22:13] row    [12:3] column  [2:0] intrabus
//   column-oriented: same, but [22:13] column and [12:3] row
// Incrementing a row-oriented address walks along a physical row; incrementing
// a column-oriented address walks down a physical column. Converting one form
// into the other swaps the two 10-bit fields. Field widths and order follow
// the published address format; the bit positions are derived from them.
package rcnvm_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned WORD_W     = 64;   // one 8-byte access unit
  localparam int unsigned LINE_WORDS = 8;    // 64-byte cache line
  localparam int unsigned LINE_W     = WORD_W * LINE_WORDS;

  localparam int unsigned IB_W   = 3;   // intrabus (byte in 64-bit word)
  localparam int unsigned COL_W  = 10;
  localparam int unsigned ROW_W  = 10;
  localparam int unsigned CH_W   = 1;
  localparam int unsigned BANK_W = 3;
  localparam int unsigned SA_W   = 3;
  localparam int unsigned RANK_W = 2;

  localparam int unsigned LO_LSB = IB_W;            // 3
  localparam int unsigned HI_LSB = IB_W + COL_W;    // 13
  localparam int unsigned CH_LSB = HI_LSB + ROW_W;  // 23
  localparam int unsigned BK_LSB = CH_LSB + CH_W;   // 24
  localparam int unsigned SA_LSB = BK_LSB + BANK_W; // 27
  localparam int unsigned RK_LSB = SA_LSB + SA_W;   // 30

  // Orientation of an access, also the orientation bit kept per cache line.
  typedef enum logic {ORIENT_ROW = 1'b0, ORIENT_COL = 1'b1} orient_e;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [LINE_W-1:0] line_t;

  // Physical location of one 8-byte word.
  typedef struct packed {
    logic [RANK_W-1:0] rank;
    logic [SA_W-1:0]   subarray;
    logic [BANK_W-1:0] bank;
    logic [CH_W-1:0]   channel;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [IB_W-1:0]   intrabus;
  } loc_t;

  // Swap the row and column fields: row-oriented <-> column-oriented address.
  function automatic addr_t swap_orient(addr_t a);
    addr_t r;
    r = a;
    r[HI_LSB +: ROW_W] = a[LO_LSB +: COL_W];
    r[LO_LSB +: COL_W] = a[HI_LSB +: ROW_W];
    return r;
  endfunction

  // Decode an address of the given orientation into its physical location.
  function automatic loc_t decode_addr(addr_t a, orient_e o);
    loc_t l;
    l.rank     = a[RK_LSB +: RANK_W];
    l.subarray = a[SA_LSB +: SA_W];
    l.bank     = a[BK_LSB +: BANK_W];
    l.channel  = a[CH_LSB +: CH_W];
    l.intrabus = a[IB_W-1:0];
    if (o == ORIENT_ROW) begin
      l.row = a[HI_LSB +: ROW_W];
      l.col = a[LO_LSB +: COL_W];
    end else begin
      l.col = a[HI_LSB +: COL_W];
      l.row = a[LO_LSB +: ROW_W];
    end
    return l;
  endfunction

  // Processor-side cache operations. OP_LOAD/OP_STORE with ORIENT_ROW are
  // load/store, with ORIENT_COL they are cload/cstore. OP_PIN loads and pins
  // the line (group caching); OP_UNPIN releases a pinned line.
  typedef enum logic [1:0] {OP_LOAD, OP_STORE, OP_PIN, OP_UNPIN} cache_op_e;

  // Line address of the line of the other orientation that crosses word k of
  // the line at line address a: the word's address converted to the other
  // orientation, aligned to a line. The shared word sits in that line at
  // position a[HI_LSB +: 3] (the low bits of a's row, or column, field).
  function automatic addr_t cross_line(addr_t a, logic [2:0] k);
    addr_t w;
    w = a;
    w[5:3] = k;
    w = swap_orient(w);
    w[5:0] = '0;
    return w;
  endfunction

endpackage
