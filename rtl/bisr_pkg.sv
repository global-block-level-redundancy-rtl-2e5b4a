// bisr_pkg: sizes and shared types of the built-in self-repair (BISR) memory
// subsystem with global block-level redundancy.
//
// The main array is ROWS x COLS cells, read and written one row (word) at a
// time. It is cut into blocks of BLK cells: a row block is the part of one row
// that lies in one column bank, a column block is the part of one column that
// lies in one row bank. With the 16 x 16 array and 8-cell blocks there are two
// row banks and two column banks. NSRB global spare row blocks (GSRB) and NSCB
// global spare column blocks (GSCB) can each replace a faulty block anywhere
// in the array. The array size, the banking and the three spares of each kind
// follow the published scheme; the type layouts below are this design's own.
package bisr_pkg;

  localparam int ROWS = 16;               // rows (words) of the main array
  localparam int COLS = 16;               // columns (bits per word)
  localparam int BLK  = 8;                // cells per block
  localparam int NRB  = ROWS / BLK;       // row banks
  localparam int NCB  = COLS / BLK;       // column banks
  localparam int NSRB = 3;                // global spare row blocks
  localparam int NSCB = 3;                // global spare column blocks
  localparam int NSP  = NSRB + NSCB;      // spare elements in total
  localparam int NENT = NSP;              // fault entries held by the FCR

  localparam int RAW  = $clog2(ROWS);
  localparam int CAW  = $clog2(COLS);
  localparam int OFW  = $clog2(BLK);
  localparam int RBW  = (NRB > 1) ? $clog2(NRB) : 1;
  localparam int CBW  = (NCB > 1) ? $clog2(NCB) : 1;
  localparam int LNW  = (RAW > CAW) ? RAW : CAW;          // row or column number
  localparam int BKW  = (RBW > CBW) ? RBW : CBW;          // bank number
  localparam int SIW  = $clog2((NSRB > NSCB) ? NSRB : NSCB);
  localparam int CNTW = $clog2(NSP + 1);

  typedef logic [RAW-1:0]  row_t;
  typedef logic [CAW-1:0]  col_t;
  typedef logic [OFW-1:0]  off_t;
  typedef logic [COLS-1:0] word_t;
  typedef logic [CNTW-1:0] cnt_t;

  // Address of one faulty cell, as reported by the BIST (f_address).
  typedef struct packed {
    row_t row;
    col_t col;
  } cell_addr_t;

  // One repair record moved from the FCR to the ARCAM (shift_info).
  // is_col = 0: row block (line = row, bank = column bank)
  // is_col = 1: column block (line = column, bank = row bank)
  typedef struct packed {
    logic             valid;
    logic             is_col;
    logic [LNW-1:0]   line;
    logic [BKW-1:0]   bank;
  } shift_info_t;

  // Remapping decision for one column bank (row spares) or one column
  // (column spares): hit and the index of the spare that serves it.
  typedef struct packed {
    logic           hit;
    logic [SIW-1:0] idx;
  } remap_t;

  typedef enum logic [1:0] {
    MODE_MISSION    = 2'd0,   // normal accesses, remapped through the ARCAM
    MODE_SPARE_TEST = 2'd1,   // BIST owns the spare blocks
    MODE_MAIN_TEST  = 2'd2    // BIST owns the main array, no remapping
  } mode_e;

  function automatic logic [RBW-1:0] row_bank(input row_t r);
    return RBW'(r / BLK);
  endfunction

  function automatic logic [CBW-1:0] col_bank(input col_t c);
    return CBW'(c / BLK);
  endfunction

endpackage
