// abp_pred_table -- history table of one DRAM bank: a SETS-set, WAYS-way
// cache of predicted access counts, one entry per recently closed DRAM page.
//
// Only the most recent predictions are cached, not an entry for every page.
// The set index is the low SET_W bits of the row address. The tag is the
// remaining high bits. Each way stores {valid, tag, count, age}. Age is a
// true-LRU rank: 0 is most recent, WAYS-1 is least recent, and the ages of
// one set are always a permutation of 0..WAYS-1.
//
// Operations (tbl_op_e), one at a time:
//   TBL_LOOKUP  hit: return the count and make the way most recent.
//               miss: nothing is written.
//   TBL_RECORD  hit: overwrite the count. miss: fill the first invalid way,
//               or else the least recent way. Either way it becomes most recent.
//   TBL_DEC     hit: count - 1, never below 1, and the way becomes most recent.
//               miss: nothing is written.
// Counts saturate at 2**CNT_W-1.
//
// Timing: the table is one memory word per set (all ways side by side) with a
// synchronous read. An op is accepted when op_valid && op_ready. The set is
// read in that cycle. In the next cycle done_valid is high with done_hit and
// done_cnt, and the changed set is written back. op_ready is low in that
// cycle, so at most one op is accepted every two cycles. After reset the
// table clears itself, one set per cycle, and op_ready stays low for SETS
// cycles. This is allowed because the lookup is not on the access critical
// path: the prediction is needed only after the page has been opened and read.
//
// The organisation (per-bank 64-set 4-way cache of access counts) follows
// the published design. The index/tag split, LRU replacement, the entry
// layout, the two-cycle op and the reset sweep are this design's choices.
module abp_pred_table
  import abp_pkg::*;
#(
  parameter int unsigned SETS  = SETS_DEF,
  parameter int unsigned WAYS  = WAYS_DEF,
  parameter int unsigned ROW_W = ROW_W_DEF,
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  // operation request
  input  logic             op_valid,
  output logic             op_ready,
  input  tbl_op_e          op,
  input  logic [ROW_W-1:0] op_row,
  input  logic [CNT_W-1:0] op_cnt,
  // result, one cycle after acceptance
  output logic             done_valid,
  output logic             done_hit,
  output logic [CNT_W-1:0] done_cnt
);

  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned TAG_W = ROW_W - SET_W;
  localparam int unsigned AGE_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;
    logic [CNT_W-1:0] cnt;
    logic [AGE_W-1:0] age;
  } entry_t;

  typedef entry_t [WAYS-1:0] set_t;

  set_t mem [SETS];

  typedef enum logic [1:0] {T_INIT, T_IDLE, T_RESOLVE} tstate_e;
  tstate_e state_q;

  logic [SET_W-1:0] init_idx_q;
  set_t             rd_set_q;
  tbl_op_e          op_q;
  logic [SET_W-1:0] idx_q;
  logic [TAG_W-1:0] tag_q;
  logic [CNT_W-1:0] cnt_q;

  assign op_ready = (state_q == T_IDLE);

  // ---------------------------------------------------------------- resolve
  logic             hit;
  logic [AGE_W-1:0] hit_way;
  logic             have_free;
  logic [AGE_W-1:0] free_way;
  logic [AGE_W-1:0] lru_way;
  logic [AGE_W-1:0] sel_way;
  logic             do_write;
  set_t             wr_set;

  always_comb begin
    hit       = 1'b0;
    hit_way   = '0;
    have_free = 1'b0;
    free_way  = '0;
    lru_way   = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (rd_set_q[w].valid && rd_set_q[w].tag == tag_q) begin
        hit     = 1'b1;
        hit_way = AGE_W'(w);
      end
      if (!rd_set_q[w].valid) begin
        have_free = 1'b1;
        free_way  = AGE_W'(w);
      end
      if (rd_set_q[w].age == AGE_W'(WAYS - 1)) lru_way = AGE_W'(w);
    end

    sel_way  = hit ? hit_way : (have_free ? free_way : lru_way);
    do_write = hit || (op_q == TBL_RECORD);

    // move the selected way to the front of the LRU order
    wr_set = rd_set_q;
    for (int w = 0; w < WAYS; w++) begin
      if (AGE_W'(w) == sel_way) wr_set[w].age = '0;
      else if (rd_set_q[w].age < rd_set_q[sel_way].age) wr_set[w].age = rd_set_q[w].age + 1'b1;
    end
    unique case (op_q)
      TBL_RECORD: begin
        wr_set[sel_way].valid = 1'b1;
        wr_set[sel_way].tag   = tag_q;
        wr_set[sel_way].cnt   = cnt_q;
      end
      TBL_DEC: begin
        if (rd_set_q[sel_way].cnt > CNT_W'(1)) wr_set[sel_way].cnt = rd_set_q[sel_way].cnt - 1'b1;
      end
      default: ;
    endcase
  end

  assign done_valid = (state_q == T_RESOLVE);
  assign done_hit   = hit;
  assign done_cnt   = hit ? rd_set_q[hit_way].cnt : '0;

  // ------------------------------------------------------- memory and state
  set_t init_set;
  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      init_set[w]     = '0;
      init_set[w].age = AGE_W'(w);
    end
  end

  always_ff @(posedge clk) begin
    if (state_q == T_INIT) mem[init_idx_q] <= init_set;
    else if (state_q == T_RESOLVE && do_write) mem[idx_q] <= wr_set;
    if (op_valid && op_ready) rd_set_q <= mem[op_row[SET_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= T_INIT;
      init_idx_q <= '0;
      op_q       <= TBL_LOOKUP;
      idx_q      <= '0;
      tag_q      <= '0;
      cnt_q      <= '0;
    end else begin
      unique case (state_q)
        T_INIT: begin
          init_idx_q <= init_idx_q + 1'b1;
          if (init_idx_q == SET_W'(SETS - 1)) state_q <= T_IDLE;
        end
        T_IDLE: begin
          if (op_valid) begin
            op_q    <= op;
            idx_q   <= op_row[SET_W-1:0];
            tag_q   <= op_row[ROW_W-1:SET_W];
            cnt_q   <= op_cnt;
            state_q <= T_RESOLVE;
          end
        end
        default: state_q <= T_IDLE;
      endcase
    end
  end

endmodule
