// abp_pkg -- shared constants and types of the Access Based Predictor (ABP)
// row-buffer management unit.
//
// ABP decides when a DRAM row buffer should be closed (precharged) by
// predicting how many column accesses a DRAM page will receive while it is
// open. The predicted counts live in a small per-bank set-associative table.
// The sizes below follow the published configuration: 32 banks, each with a
// 64-set, 4-way table (2048 sets in total). The row-address width (16 bits)
// and the counter width (7 bits) are this design's choice; with them one
// table entry is 20 bits (valid + 10-bit tag + 7-bit count + 2-bit LRU age)
// and the 8192 entries take 20 KB, which matches the published storage cost.
package abp_pkg;

  // Published configuration.
  localparam int unsigned NUM_BANKS_DEF = 32;
  localparam int unsigned SETS_DEF      = 64;
  localparam int unsigned WAYS_DEF      = 4;
  // Own choices (see header).
  localparam int unsigned ROW_W_DEF     = 16;
  localparam int unsigned CNT_W_DEF     = 7;

  // Operations the bank policy unit issues to its history table.
  typedef enum logic [1:0] {
    TBL_LOOKUP = 2'd0,  // read the predicted count of a page (LRU touched on hit)
    TBL_RECORD = 2'd1,  // write a count for a page, allocating an entry on a miss
    TBL_DEC    = 2'd2   // decrement a page's count by one (floor 1), if present
  } tbl_op_e;

  // How the access found the bank's row buffer.
  typedef enum logic [1:0] {
    ROW_HIT      = 2'd0,  // the page was open
    ROW_EMPTY    = 2'd1,  // the bank was precharged
    ROW_CONFLICT = 2'd2   // another page was open and had to be closed first
  } row_kind_e;

  // Prediction state of the open page.
  typedef enum logic [1:0] {
    MODE_NOPRED = 2'd0,  // no table entry: open until a conflict, then record
    MODE_PRED   = 2'd1,  // entry found: close after the predicted count
    MODE_REOPEN = 2'd2   // reopened after a premature closure: open until a
                         // conflict, then record the aggregate count
  } page_mode_e;

endpackage
