// rcnvm_bank: one RC-NVM logic bank, seen at rank level (the chips of a
// rank work in lockstep, so one 64-bit word here is one 8-byte access unit
// spread over the chips).
//
// The bank holds N_SUB subarrays of ROWS x COLS words. Because the crossbar
// cell array is symmetric, a whole physical row or a whole physical column of
// one subarray can be sensed at once: a row goes into the row buffer, a
// column into the column buffer. The two buffers are never open together: an
// access that needs the other buffer, or another row/column, first closes the
// open buffer and writes its contents back into the array, then opens the new
// one. This removes any coherence problem between the two buffers at the cost
// of reopening the bank.
//
// Since only one buffer can ever be open, the data of the open buffer equals
// the array contents plus the writes made to it; this model therefore keeps
// the buffer as its open state (orientation, subarray, row or column index,
// written flag) and reads and writes the line in the array at column-access
// time. Closing a written buffer costs the write pulse, as the restore would.
//
// With ECC set (the default) the rank has a ninth chip: every word is stored
// as a 72-bit SECDED code word (rcnvm_secded), encoded on write and corrected
// on read. Single-bit errors are corrected silently; error flags are not
// reported outside the bank (a choice of this design).
//
// Interface: one request at a time (valid/ready), each a 64-byte line of
// LINE_WORDS words along the request's orientation: a row line is row `row`,
// columns col..col+7; a column line is column `col`, rows row..row+7
// (the offset inside the line is ignored). A write replaces the whole line.
// Every request gets one response (valid/ready) carrying the read line.
//
// Timing, in memory-clock cycles after the request is accepted, until the
// response is valid:
//   buffer hit                     T_CAS
//   bank closed                    T_RCD + T_CAS
//   other line or buffer open      T_RP (+T_WP if the buffer was written)
//                                  + T_RCD + T_CAS
// T_CAS, T_RCD and T_RP are the published RC-NVM timings (memory-clock
// cycles of the LPDDR3-800 interface). Charging the write pulse T_WP
// (15 ns, 6 cycles at 400 MHz) when a written buffer is closed, the tiled
// array layout and the request/response handshake are this design's own
// choices. The open buffer stays open after an access
// (open-page policy, also a choice). The array is not initialised by reset.
module rcnvm_bank
  import rcnvm_pkg::*;
#(
  parameter int unsigned N_SUB = 8,
  parameter int unsigned ROWS  = 1024,
  parameter int unsigned COLS  = 1024,
  parameter int unsigned T_CAS = 6,
  parameter int unsigned T_RCD = 12,
  parameter int unsigned T_RP  = 1,
  parameter int unsigned T_WP  = 6,
  parameter bit          ECC   = 1'b1,
  localparam int unsigned SAW = (N_SUB > 1) ? $clog2(N_SUB) : 1,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CW  = $clog2(COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // request
  input  logic           req_valid,
  output logic           req_ready,
  input  orient_e        req_orient,
  input  logic           req_write,
  input  logic [SAW-1:0] req_sa,
  input  logic [RW-1:0]  req_row,
  input  logic [CW-1:0]  req_col,
  input  line_t          req_wdata,
  // response
  output logic           resp_valid,
  input  logic           resp_ready,
  output line_t          resp_rdata,
  // open-buffer state, for the scheduler
  output logic           open_valid,
  output orient_e        open_orient,
  output logic [SAW-1:0] open_sa,
  output logic [RW-1:0]  open_idx,   // open row, or open column
  // one-cycle event pulses
  output logic           ev_hit,
  output logic           ev_act,
  output logic           ev_flush,   // a written buffer was written back
  output logic           ev_switch   // a row<->column buffer switch
);
  // The cell array is stored as 8 x 8-word tiles: a row line (8 columns of
  // one row) and a column line (8 rows of one column) each lie in one tile,
  // so one tile read senses either. Word (r%8, c%8) is tile word 8*(r%8)+c%8.
  localparam int unsigned TR    = ROWS / LINE_WORDS;
  localparam int unsigned TC    = COLS / LINE_WORDS;
  localparam int unsigned DEPTH = N_SUB * TR * TC;
  localparam int unsigned SW     = ECC ? 72 : WORD_W;   // stored word
  localparam int unsigned TILE_W = SW * LINE_WORDS * LINE_WORDS;
  typedef logic [TILE_W-1:0] tile_t;

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_ACT, S_CAS, S_RESP} state_e;

  tile_t mem [DEPTH];
  tile_t tile_q;        // tile of the current request, read every cycle
  tile_t tile_d;
  logic  buf_dirty;     // the open buffer has been written

  state_e         state;
  logic [4:0]     cnt;
  orient_e        q_orient;
  logic           q_write;
  logic [SAW-1:0] q_sa;
  logic [RW-1:0]  q_row;
  logic [CW-1:0]  q_col;
  line_t          q_wdata;
  logic [$clog2(DEPTH)-1:0] q_tile;

  logic hit;
  always_comb begin
    hit = open_valid && open_orient == req_orient && open_sa == req_sa &&
          open_idx == ((req_orient == ORIENT_ROW) ? req_row : RW'(req_col));
    q_tile = ($clog2(DEPTH))'((int'(q_sa) * TR + int'(q_row[RW-1:3])) * TC + int'(q_col[CW-1:3]));
  end

  assign req_ready = (state == S_IDLE);

  // Stored form of the words of the request's line: SECDED-encoded when the
  // ninth chip is present, else the plain words.
  logic [SW-1:0] st_wr [LINE_WORDS];
  logic [SW-1:0] st_rd [LINE_WORDS];
  line_t         line_rd;
  for (genvar w = 0; w < LINE_WORDS; w++) begin : g_word
    if (ECC) begin : g_ecc
      logic unused_flags;
      logic corrected, dbl;
      rcnvm_secded u_ecc (
        .enc_data(q_wdata[w*WORD_W +: WORD_W]), .enc_code(st_wr[w]),
        .dec_code(st_rd[w]), .dec_data(line_rd[w*WORD_W +: WORD_W]),
        .dec_corrected(corrected), .dec_double(dbl));
      assign unused_flags = corrected | dbl;
    end else begin : g_plain
      assign st_wr[w] = q_wdata[w*WORD_W +: WORD_W];
      assign line_rd[w*WORD_W +: WORD_W] = st_rd[w];
    end
  end

  // Line view of the request's tile: stored words read, and the tile with
  // the line replaced by the write data.
  always_comb begin
    tile_d = tile_q;
    for (int w = 0; w < LINE_WORDS; w++) begin
      if (q_orient == ORIENT_ROW) begin
        st_rd[w] = tile_q[(int'(q_row[2:0])*8 + w)*SW +: SW];
        tile_d[(int'(q_row[2:0])*8 + w)*SW +: SW] = st_wr[w];
      end else begin
        st_rd[w] = tile_q[(w*8 + int'(q_col[2:0]))*SW +: SW];
        tile_d[(w*8 + int'(q_col[2:0]))*SW +: SW] = st_wr[w];
      end
    end
  end

  // Array port: one synchronous tile read per cycle, one tile write at CAS.
  always_ff @(posedge clk) begin
    tile_q <= mem[q_tile];
    if (state == S_CAS && cnt == 0 && q_write) mem[q_tile] <= tile_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      open_valid  <= 1'b0;
      open_orient <= ORIENT_ROW;
      open_sa     <= '0;
      open_idx    <= '0;
      buf_dirty   <= 1'b0;
      resp_valid  <= 1'b0;
      resp_rdata  <= '0;
      q_orient    <= ORIENT_ROW;
      q_write     <= 1'b0;
      q_sa        <= '0;
      q_row       <= '0;
      q_col       <= '0;
      q_wdata     <= '0;
      ev_hit      <= 1'b0;
      ev_act      <= 1'b0;
      ev_flush    <= 1'b0;
      ev_switch   <= 1'b0;
    end else begin
      ev_hit    <= 1'b0;
      ev_act    <= 1'b0;
      ev_flush  <= 1'b0;
      ev_switch <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          q_orient <= req_orient;
          q_write  <= req_write;
          q_sa     <= req_sa;
          q_row    <= req_row;
          q_col    <= req_col;
          q_wdata  <= req_wdata;
          if (hit) begin
            ev_hit <= 1'b1;
            state  <= S_CAS;
            cnt    <= 5'(T_CAS - 1);
          end else if (open_valid) begin
            ev_switch <= (open_orient != req_orient);
            state     <= S_PRE;
            cnt       <= 5'(T_RP - 1 + (buf_dirty ? T_WP : 0));
          end else begin
            state <= S_ACT;
            cnt   <= 5'(T_RCD - 1);
          end
        end
        S_PRE: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          // Close the open buffer; a written buffer costs the write pulse.
          ev_flush   <= buf_dirty;
          buf_dirty  <= 1'b0;
          open_valid <= 1'b0;
          state      <= S_ACT;
          cnt        <= 5'(T_RCD - 1);
        end
        S_ACT: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          // Open the row buffer or the column buffer.
          ev_act      <= 1'b1;
          open_valid  <= 1'b1;
          open_orient <= q_orient;
          open_sa     <= q_sa;
          open_idx    <= (q_orient == ORIENT_ROW) ? q_row : RW'(q_col);
          state       <= S_CAS;
          cnt         <= 5'(T_CAS - 1);
        end
        S_CAS: if (cnt != 0) cnt <= cnt - 1'b1;
        else begin
          resp_rdata <= q_write ? q_wdata : line_rd;
          if (q_write) buf_dirty <= 1'b1;
          resp_valid <= 1'b1;
          state      <= S_RESP;
        end
        S_RESP: if (resp_ready) begin
          resp_valid <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The published organisation is square (1024 x 1024 per subarray); the
  // shared open_idx and the 8-word lines rely on it.
  initial begin
    assert (ROWS == COLS) else $error("rcnvm_bank: ROWS must equal COLS");
    assert (ROWS % LINE_WORDS == 0) else $error("rcnvm_bank: ROWS not a multiple of a line");
    assert (T_CAS >= 2 && T_RCD >= 1 && T_RP >= 1) else $error("rcnvm_bank: zero timing");
  end
endmodule
