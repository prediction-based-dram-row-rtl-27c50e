// tb_abp_predictor -- end-to-end testbench of the ABP unit with all
// parameters at their defaults (32 banks, 64 sets x 4 ways each).
//
// A stream of column accesses imitates a many-core memory controller. Each
// bank sees bursts to DRAM pages, and a page's burst length mostly repeats
// from one visit to the next, so predictions can be learned. Some bursts are
// shorter or longer, which causes decrements and premature closures. A few
// pages share a set, which forces replacements. Banks are picked at random
// every cycle, so the requests of different banks interleave, some requests
// find their bank busy (stall) and the answers of several banks overlap.
//
// Every answer is compared with a reference model of the policy in this file
// (per-bank open page, prediction state and an LRU cache kept with last-use
// timestamps). The latency of each answer is checked too: 1 cycle for a row
// hit or reopen, 3 for a precharged bank and 5 for a conflict. Each mechanism
// is counted, and a mechanism that never happened counts as a failure.
module tb_abp_predictor;
  import abp_pkg::*;

  localparam int unsigned NB    = NUM_BANKS_DEF;
  localparam int unsigned SETS  = SETS_DEF;
  localparam int unsigned WAYS  = WAYS_DEF;
  localparam int unsigned ROW_W = ROW_W_DEF;
  localparam int unsigned CNT_W = CNT_W_DEF;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned BW    = $clog2(NB);
  localparam int          CMAX  = (1 << CNT_W) - 1;
  localparam int          N_ACC = 40000;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              acc_valid = 1'b0;
  logic              acc_ready;
  logic [BW-1:0]     acc_bank = '0;
  logic [ROW_W-1:0]  acc_row = '0;
  logic              resp_valid    [NB];
  row_kind_e         resp_kind     [NB];
  logic              resp_close    [NB];
  logic              resp_pred_hit [NB];
  logic              resp_reopen   [NB];
  logic              resp_perfect  [NB];

  abp_predictor dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------- reference model
  bit               r_open    [NB];
  logic [ROW_W-1:0] r_row     [NB];
  int               r_cnt     [NB];
  int               r_mode    [NB];   // 0 no prediction, 1 predicted, 2 reopened
  int               r_pred    [NB];
  bit               r_pcv     [NB];
  logic [ROW_W-1:0] r_pcrow   [NB];
  int               r_pccnt   [NB];
  bit               t_valid   [NB][SETS][WAYS];
  logic [ROW_W-1:0] t_row     [NB][SETS][WAYS];
  int               t_cnt     [NB][SETS][WAYS];
  longint           t_time    [NB][SETS][WAYS];
  longint           now = 0;

  // mechanism counters
  int m_hit, m_empty, m_conflict, m_thit, m_tmiss, m_close, m_close1, m_perfect;
  int m_reopen, m_dec, m_record, m_evict, m_stall, m_overlap;

  // table: returns hit and count; op 0 lookup, 1 record, 2 decrement
  function automatic void t_op(input int b, input int op, input logic [ROW_W-1:0] r, input int c,
                               output bit hit, output int hc);
    int s, sel;
    s = int'(r[SET_W-1:0]);
    hit = 0; hc = 0; sel = -1;
    now++;
    for (int w = 0; w < WAYS; w++) if (t_valid[b][s][w] && t_row[b][s][w] == r) begin hit = 1; sel = w; end
    if (hit) begin
      hc = t_cnt[b][s][sel];
      t_time[b][s][sel] = now;
      if (op == 1) t_cnt[b][s][sel] = c;
      if (op == 2 && hc > 1) t_cnt[b][s][sel] = hc - 1;
    end else if (op == 1) begin
      for (int w = WAYS - 1; w >= 0; w--) if (!t_valid[b][s][w]) sel = w;
      if (sel < 0) begin
        sel = 0;
        for (int w = 1; w < WAYS; w++) if (t_time[b][s][w] < t_time[b][s][sel]) sel = w;
        m_evict++;
      end
      t_valid[b][s][sel] = 1; t_row[b][s][sel] = r; t_cnt[b][s][sel] = c; t_time[b][s][sel] = now;
    end
  endfunction

  typedef struct {
    row_kind_e kind;
    bit close, pred_hit, reopen, perfect;
    int lat;
  } exp_t;

  function automatic exp_t model_access(input int b, input logic [ROW_W-1:0] r);
    exp_t e;
    bit hit;
    int hc;
    e = '{kind: ROW_EMPTY, close: 0, pred_hit: 0, reopen: 0, perfect: 0, lat: 1};
    if (r_open[b] && r_row[b] == r) begin
      e.kind = ROW_HIT; m_hit++;
      r_cnt[b] = (r_cnt[b] < CMAX) ? r_cnt[b] + 1 : CMAX;
      if (r_mode[b] == 1 && r_cnt[b] >= r_pred[b]) begin
        e.close = 1; m_close++;
        r_open[b] = 0; r_pcv[b] = 1; r_pcrow[b] = r; r_pccnt[b] = r_cnt[b];
      end
      return e;
    end
    if (!r_open[b] && r_pcv[b] && r_pcrow[b] == r) begin
      e.reopen = 1; m_reopen++; m_empty++;
      r_pcv[b] = 0; r_open[b] = 1; r_row[b] = r; r_mode[b] = 2;
      r_cnt[b] = (r_pccnt[b] < CMAX) ? r_pccnt[b] + 1 : CMAX;
      return e;
    end
    if (r_open[b]) begin
      e.kind = ROW_CONFLICT; e.lat = 5; m_conflict++;
      if (r_mode[b] == 1) begin t_op(b, 2, r_row[b], 0, hit, hc); m_dec++; end
      else begin t_op(b, 1, r_row[b], r_cnt[b], hit, hc); m_record++; end
    end else begin
      e.kind = ROW_EMPTY; e.lat = 3; m_empty++;
      e.perfect = r_pcv[b];
      if (r_pcv[b]) m_perfect++;
    end
    r_pcv[b] = 0;
    t_op(b, 0, r, 0, hit, hc);
    e.pred_hit = hit;
    if (hit) m_thit++; else m_tmiss++;
    r_open[b] = 1; r_row[b] = r; r_cnt[b] = 1;
    r_mode[b] = hit ? 1 : 0; r_pred[b] = hc;
    if (hit && hc <= 1) begin
      e.close = 1; m_close1++;
      r_open[b] = 0; r_pcv[b] = 1; r_pcrow[b] = r; r_pccnt[b] = 1;
    end
    return e;
  endfunction

  // ------------------------------------------------------ response checking
  exp_t exp_q  [NB];
  bit   pend   [NB];
  int   age    [NB];
  int   n_resp = 0;

  // Sampled at the falling edge, half a cycle after the DUT's registers
  // change. An access accepted at rising edge k and answered in the cycle
  // after it is seen here with age 1.
  always @(negedge clk) begin
    int nv;
    nv = 0;
    for (int b = 0; b < NB; b++) begin
      if (pend[b]) age[b]++;
      if (resp_valid[b]) begin
        nv++;
        n_resp++;
        check(pend[b], $sformatf("bank %0d: answer without an access", b));
        check(age[b] == exp_q[b].lat, $sformatf("bank %0d: latency %0d expected %0d", b, age[b], exp_q[b].lat));
        check(resp_kind[b] == exp_q[b].kind, $sformatf("bank %0d: kind %s expected %s", b, resp_kind[b].name(), exp_q[b].kind.name()));
        check(resp_close[b] == exp_q[b].close, $sformatf("bank %0d: close %0d expected %0d", b, resp_close[b], exp_q[b].close));
        check(resp_pred_hit[b] == exp_q[b].pred_hit, $sformatf("bank %0d: pred_hit mismatch", b));
        check(resp_reopen[b] == exp_q[b].reopen, $sformatf("bank %0d: reopen mismatch", b));
        check(resp_perfect[b] == exp_q[b].perfect, $sformatf("bank %0d: perfect mismatch", b));
        pend[b] = 0;
      end
    end
    if (nv > 1) m_overlap++;
  end

  // ------------------------------------------------------------- stimulus
  logic [ROW_W-1:0] cur_row  [NB];
  int               left     [NB];

  // Burst length of a page visit: a fixed length per page, sometimes varied.
  function automatic int burst_len(input logic [ROW_W-1:0] r);
    int base, k;
    base = 1 + (int'(r) % 6);
    k = $urandom % 10;
    if (k == 0) return base + 1 + ($urandom % 3);   // longer: premature closure
    if (k == 1 && base > 1) return base - 1;        // shorter: conflict on prediction
    return base;
  endfunction

  function automatic logic [ROW_W-1:0] pick_row();
    // 5 tags in set 3 (more than the ways), 8 pages spread over other sets
    if ($urandom % 3 == 0) return ROW_W'((($urandom % 5) << SET_W) | 3);
    return ROW_W'(((($urandom % 4) + 8) << SET_W) | (($urandom % 2) * 20 + 7));
  endfunction

  initial begin
    int b, issued, cyc;
    logic [ROW_W-1:0] r;
    exp_t e;
    for (int i = 0; i < NB; i++) begin
      r_open[i] = 0; r_row[i] = '0; r_cnt[i] = 0; r_mode[i] = 0; r_pred[i] = 0;
      r_pcv[i] = 0; r_pcrow[i] = '0; r_pccnt[i] = 0; pend[i] = 0; age[i] = 0; left[i] = 0;
      cur_row[i] = '0;
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          t_valid[i][s][w] = 0; t_row[i][s][w] = '0; t_cnt[i][s][w] = 0; t_time[i][s][w] = 0;
        end
    end
    {m_hit, m_empty, m_conflict, m_thit, m_tmiss, m_close, m_close1, m_perfect} = '0;
    {m_reopen, m_dec, m_record, m_evict, m_stall, m_overlap} = '0;

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // every table clears itself first
    cyc = 0;
    @(negedge clk);
    while (!acc_ready) begin
      cyc++;
      @(negedge clk);
    end
    check(cyc >= SETS - 1 && cyc <= SETS + 1, $sformatf("reset sweep took %0d cycles", cyc));

    issued = 0;
    while (issued < N_ACC) begin
      // at the falling edge: choose a bank and its next page access
      b = (($urandom % 4) == 0) ? int'($urandom % 4) : int'($urandom % NB);
      if (left[b] == 0) begin
        cur_row[b] = pick_row();
        left[b] = burst_len(cur_row[b]);
      end
      acc_valid = 1'b1;
      acc_bank  = BW'(b);
      acc_row   = cur_row[b];
      #1;
      if (acc_ready) begin
        check(!pend[b], "accepted while the bank is still answering");
        e = model_access(b, cur_row[b]);
        exp_q[b] = e;
        pend[b] = 1;
        age[b] = 0;
        left[b]--;
        issued++;
      end else begin
        m_stall++;
      end
      @(negedge clk);
      acc_valid = 1'b0;
    end
    // drain
    repeat (10) @(posedge clk);
    for (int i = 0; i < NB; i++) check(!pend[i], $sformatf("bank %0d: answer missing", i));
    check(n_resp == N_ACC, $sformatf("%0d answers for %0d accesses", n_resp, N_ACC));

    $display("row hits=%0d empty=%0d conflicts=%0d", m_hit, m_empty, m_conflict);
    $display("table hits=%0d misses=%0d (hit rate %0d%%) records=%0d decrements=%0d replacements=%0d",
             m_thit, m_tmiss, (100 * m_thit) / (m_thit + m_tmiss), m_record, m_dec, m_evict);
    $display("predicted closures=%0d (at first access %0d) perfect=%0d premature/reopen=%0d",
             m_close, m_close1, m_perfect, m_reopen);
    $display("stalls=%0d overlapping answers=%0d", m_stall, m_overlap);
    check(m_hit > 0,      "mechanism: row hit");
    check(m_empty > 0,    "mechanism: access to a precharged bank");
    check(m_conflict > 0, "mechanism: page conflict");
    check(m_thit > 0,     "mechanism: table hit");
    check(m_tmiss > 0,    "mechanism: table miss, page left open");
    check(m_record > 0,   "mechanism: count recorded at a conflict");
    check(m_dec > 0,      "mechanism: decrement after a conflict on a predicted page");
    check(m_close > 0,    "mechanism: closure after the predicted count");
    check(m_close1 > 0,   "mechanism: closure at the first access (prediction 1)");
    check(m_perfect > 0,  "mechanism: perfect prediction");
    check(m_reopen > 0,   "mechanism: premature closure, page reopened");
    check(m_evict > 0,    "mechanism: table entry replaced");
    check(m_stall > 0,    "mechanism: request stalled on a busy bank");
    check(m_overlap > 0,  "mechanism: answers of several banks in one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_ACC * 8 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
