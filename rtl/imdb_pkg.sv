// Shared constants and types of the in-module disturbance barrier (IMDB).
//
// IMDB sits between a PCM media controller and the PCM devices. Per bank it
// keeps a main table that accumulates, for each tracked write address, the
// number of 1-to-0 bit flips of every 64-bit word of a 64 B line, and a small
// barrier buffer that holds the data of lines that became write-disturbance
// aggressors. The numbers below are the configuration IMDB(e256b8g8): 256 main
// table entries, 8 barrier buffer entries, AppLE group size 8, four banks,
// rewrite threshold 511 (WDE limitation number 1K / 2 - 1), 9-bit
// ZeroFlipCntr, 8-bit RewriteCntr and insertion probability 1/128.
// The 25-bit Row&Col field is split 16 + 9 here; that split is a choice of
// this design, only the 25-bit total is given.
package imdb_pkg;

  localparam int unsigned ROW_W      = 16;   // row (wordline) address bits
  localparam int unsigned COL_W      = 9;    // column (64 B line) address bits
  localparam int unsigned WORDS      = 8;    // 64-bit words per 64 B line
  localparam int unsigned WORD_W     = 64;
  localparam int unsigned LINE_W     = WORDS * WORD_W;  // 512
  localparam int unsigned ZFC_W      = 9;    // width of one ZeroFlipCntr sub-counter
  localparam int unsigned RWC_W      = 8;    // RewriteCntr width
  localparam int unsigned FREQ_W     = 8;    // barrier buffer FreqCntr width
  localparam int unsigned IDX_W      = 3;    // MaxZFCIdx width (log2 WORDS)
  localparam int unsigned POP_W      = 7;    // result of one integrated counter (0..64)

  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [COL_W-1:0]  col_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [ZFC_W-1:0]  zfc_t;
  typedef logic [RWC_W-1:0]  rwc_t;
  typedef logic [FREQ_W-1:0] freq_t;
  typedef logic [POP_W-1:0]  pop_t;

  typedef struct packed {
    row_t row;
    col_t col;
  } addr_t;

  // One main table entry: 25 b + 8 b + 72 b + 3 b = 108 b.
  typedef struct packed {
    addr_t                 addr;
    rwc_t                  rwc;
    logic [WORDS-1:0][ZFC_W-1:0] zfc;
    logic [IDX_W-1:0]      maxidx;
  } mt_entry_t;

  // One barrier buffer entry: 512 b data + 25 b + 8 b + 8 b = 553 b.
  typedef struct packed {
    addr_t addr;
    line_t data;
    rwc_t  rwc;
    freq_t freq;
  } bb_entry_t;

  // Requests IMDB sends back to the media controller's write queue.
  typedef enum logic [1:0] {
    OUT_REWRITE   = 2'd0,   // rewrite the line at row/col (neighbour of an aggressor)
    OUT_WRITEBACK = 2'd1    // write data evicted from the barrier buffer
  } out_kind_e;

  typedef struct packed {
    out_kind_e kind;
    addr_t     addr;
    line_t     data;
  } out_req_t;

  // What happened to one write command (reported when it completes).
  typedef enum logic [2:0] {
    RES_ABSORBED = 3'd0,  // hit in the barrier buffer, data updated there
    RES_HIT      = 3'd1,  // hit in the main table, flips accumulated
    RES_PROMOTED = 3'd2,  // hit, threshold reached: rewrites + promotion
    RES_FILTERED = 3'd3,  // miss, not inserted (probabilistic insertion)
    RES_INSERTED = 3'd4,  // miss, placed in a free main table entry
    RES_REPLACED = 3'd5,  // miss, replaced the AppLE victim
    RES_BYPASS   = 3'd6   // flush mode: command passed untouched
  } result_e;

endpackage
