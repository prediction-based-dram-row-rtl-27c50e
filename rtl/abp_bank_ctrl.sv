// abp_bank_ctrl -- Access Based Predictor closure policy for one DRAM bank.
//
// The memory controller reports every column access it services on this
// bank (acc_row). For each one the unit answers whether the bank's row buffer
// must be precharged right after that access (resp_close). It learns, per DRAM
// page, how many accesses a page receives while it is open:
//   * First access to a page: its predicted count is looked up in the
//     bank's history table (abp_pred_table).
//       - No entry: the page stays open until a page conflict. At that
//         conflict the number of accesses it received is recorded.
//       - Entry: the page is closed after that many accesses. If a conflict
//         comes first, the entry is decremented by one.
//   * After a page closed on its prediction:
//       - A different page on the next access: the prediction was perfect
//         and nothing is updated (resp_perfect).
//       - The same page again: the closure was premature (resp_reopen). The
//         page then stays open until a conflict, and the table gets the
//         aggregate count of both openings.
// The access counter saturates at 2**CNT_W-1.
//
// Interface: acc_valid/acc_ready accept one access. Exactly one response
// pulse (resp_valid) follows for every access. It carries resp_kind, which
// says how the access found the row buffer: hit, empty or conflict. It also
// carries resp_close, resp_pred_hit (a table entry was found on the
// lookup for a newly opened page), resp_reopen and resp_perfect. The
// bank refuses a new access until it has answered the last one.
//
// Timing, counted from the acceptance cycle: a row hit, or a page reopened
// after a premature closure, needs no table access and is answered one
// cycle later. An access to a precharged bank is answered after 3 cycles
// (one lookup). A conflict is answered after 5 cycles: the table update for
// the closed page, then the lookup for the new page. This cannot slow an
// access down, because the answer is needed only after the page has been
// opened and read. The policy rules are the published ones. The
// response handshake, the latencies and the counter width are this design's.
module abp_bank_ctrl
  import abp_pkg::*;
#(
  parameter int unsigned SETS  = SETS_DEF,
  parameter int unsigned WAYS  = WAYS_DEF,
  parameter int unsigned ROW_W = ROW_W_DEF,
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  // serviced column accesses of this bank
  input  logic             acc_valid,
  output logic             acc_ready,
  input  logic [ROW_W-1:0] acc_row,
  // decision for that access
  output logic             resp_valid,
  output row_kind_e        resp_kind,
  output logic             resp_close,
  output logic             resp_pred_hit,
  output logic             resp_reopen,
  output logic             resp_perfect
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  typedef enum logic [2:0] {
    B_IDLE,      // waiting for an access
    B_UPD_REQ,   // issue the update of the page being closed by a conflict
    B_UPD_WAIT,  // wait for that update
    B_LK_REQ,    // issue the lookup of the page being opened
    B_LK_WAIT    // wait for the lookup, then answer
  } bstate_e;

  bstate_e state_q;

  // open page
  logic             open_q;
  logic [ROW_W-1:0] open_row_q;
  logic [CNT_W-1:0] acc_cnt_q;
  page_mode_e       mode_q;
  logic [CNT_W-1:0] pred_q;
  // last page closed on its prediction
  logic             pc_valid_q;
  logic [ROW_W-1:0] pc_row_q;
  logic [CNT_W-1:0] pc_cnt_q;
  // access in progress
  logic [ROW_W-1:0] new_row_q;
  row_kind_e        kind_q;
  logic             perfect_q;

  // table port
  logic             tbl_valid;
  logic             tbl_ready;
  tbl_op_e          tbl_op;
  logic [ROW_W-1:0] tbl_row;
  logic [CNT_W-1:0] tbl_cnt;
  logic             tbl_done;
  logic             tbl_hit;
  logic [CNT_W-1:0] tbl_hit_cnt;

  abp_pred_table #(
    .SETS (SETS),
    .WAYS (WAYS),
    .ROW_W(ROW_W),
    .CNT_W(CNT_W)
  ) u_table (
    .clk       (clk),
    .rst_n     (rst_n),
    .op_valid  (tbl_valid),
    .op_ready  (tbl_ready),
    .op        (tbl_op),
    .op_row    (tbl_row),
    .op_cnt    (tbl_cnt),
    .done_valid(tbl_done),
    .done_hit  (tbl_hit),
    .done_cnt  (tbl_hit_cnt)
  );

  always_comb begin
    tbl_valid = 1'b0;
    tbl_op    = TBL_LOOKUP;
    tbl_row   = new_row_q;
    tbl_cnt   = acc_cnt_q;
    if (state_q == B_UPD_REQ) begin
      tbl_valid = 1'b1;
      tbl_row   = open_row_q;
      // a predicted page hit by a conflict was kept open too long
      tbl_op    = (mode_q == MODE_PRED) ? TBL_DEC : TBL_RECORD;
    end else if (state_q == B_LK_REQ) begin
      tbl_valid = 1'b1;
    end
  end

  assign acc_ready = (state_q == B_IDLE) && tbl_ready;

  function automatic logic [CNT_W-1:0] sat_inc(input logic [CNT_W-1:0] v);
    return (v == CNT_MAX) ? v : v + 1'b1;
  endfunction

  logic [CNT_W-1:0] hit_cnt;
  assign hit_cnt = sat_inc(acc_cnt_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= B_IDLE;
      open_q        <= 1'b0;
      open_row_q    <= '0;
      acc_cnt_q     <= '0;
      mode_q        <= MODE_NOPRED;
      pred_q        <= '0;
      pc_valid_q    <= 1'b0;
      pc_row_q      <= '0;
      pc_cnt_q      <= '0;
      new_row_q     <= '0;
      kind_q        <= ROW_EMPTY;
      perfect_q     <= 1'b0;
      resp_valid    <= 1'b0;
      resp_kind     <= ROW_EMPTY;
      resp_close    <= 1'b0;
      resp_pred_hit <= 1'b0;
      resp_reopen   <= 1'b0;
      resp_perfect  <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      unique case (state_q)
        B_IDLE: begin
          if (acc_valid && acc_ready) begin
            new_row_q <= acc_row;
            if (open_q && acc_row == open_row_q) begin
              // row hit: count it, close if the prediction is reached
              acc_cnt_q     <= hit_cnt;
              resp_valid    <= 1'b1;
              resp_kind     <= ROW_HIT;
              resp_pred_hit <= 1'b0;
              resp_reopen   <= 1'b0;
              resp_perfect  <= 1'b0;
              resp_close    <= 1'b0;
              if (mode_q == MODE_PRED && hit_cnt >= pred_q) begin
                resp_close <= 1'b1;
                open_q     <= 1'b0;
                pc_valid_q <= 1'b1;
                pc_row_q   <= open_row_q;
                pc_cnt_q   <= hit_cnt;
              end
            end else if (open_q) begin
              // page conflict: update the closed page, then look up the new one
              kind_q    <= ROW_CONFLICT;
              perfect_q <= 1'b0;
              open_q    <= 1'b0;
              state_q   <= B_UPD_REQ;
            end else if (pc_valid_q && acc_row == pc_row_q) begin
              // the page closed on its prediction is needed again
              pc_valid_q    <= 1'b0;
              open_q        <= 1'b1;
              open_row_q    <= acc_row;
              acc_cnt_q     <= sat_inc(pc_cnt_q);
              mode_q        <= MODE_REOPEN;
              resp_valid    <= 1'b1;
              resp_kind     <= ROW_EMPTY;
              resp_close    <= 1'b0;
              resp_pred_hit <= 1'b0;
              resp_reopen   <= 1'b1;
              resp_perfect  <= 1'b0;
            end else begin
              // precharged bank: a different page follows a predicted closure
              kind_q     <= ROW_EMPTY;
              perfect_q  <= pc_valid_q;
              pc_valid_q <= 1'b0;
              state_q    <= B_LK_REQ;
            end
          end
        end
        B_UPD_REQ:  if (tbl_ready) state_q <= B_UPD_WAIT;
        B_UPD_WAIT: if (tbl_done) state_q <= B_LK_REQ;
        B_LK_REQ:   if (tbl_ready) state_q <= B_LK_WAIT;
        B_LK_WAIT: begin
          if (tbl_done) begin
            open_row_q    <= new_row_q;
            acc_cnt_q     <= CNT_W'(1);
            pred_q        <= tbl_hit_cnt;
            mode_q        <= tbl_hit ? MODE_PRED : MODE_NOPRED;
            resp_valid    <= 1'b1;
            resp_kind     <= kind_q;
            resp_pred_hit <= tbl_hit;
            resp_reopen   <= 1'b0;
            resp_perfect  <= perfect_q;
            if (tbl_hit && tbl_hit_cnt <= CNT_W'(1)) begin
              // predicted to be used once: close right after this access
              resp_close <= 1'b1;
              open_q     <= 1'b0;
              pc_valid_q <= 1'b1;
              pc_row_q   <= new_row_q;
              pc_cnt_q   <= CNT_W'(1);
            end else begin
              resp_close <= 1'b0;
              open_q     <= 1'b1;
            end
            state_q <= B_IDLE;
          end
        end
        default: state_q <= B_IDLE;
      endcase
    end
  end

  // One response per access; no new access while one is in progress.
  property p_no_accept_while_busy;
    @(posedge clk) disable iff (!rst_n) (state_q != B_IDLE) |-> !acc_ready;
  endproperty
  assert property (p_no_accept_while_busy);

endmodule
