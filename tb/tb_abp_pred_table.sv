// tb_abp_pred_table -- self-checking testbench of abp_pred_table.
//
// It first checks that the table is busy for SETS cycles after reset. Then it
// issues random LOOKUP / RECORD / DEC operations on rows that crowd a few sets,
// so entries are replaced often. Each result is compared with a reference
// model in this file. The model keeps a last-use timestamp per way instead of
// LRU ranks: an invalid way is filled first, and otherwise the way with the
// oldest timestamp is replaced. The testbench also checks that done_valid
// comes exactly one cycle after acceptance and that op_ready is low in that
// cycle.
module tb_abp_pred_table;
  import abp_pkg::*;

  localparam int unsigned SETS  = SETS_DEF;
  localparam int unsigned WAYS  = WAYS_DEF;
  localparam int unsigned ROW_W = ROW_W_DEF;
  localparam int unsigned CNT_W = CNT_W_DEF;
  localparam int unsigned SET_W = $clog2(SETS);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             op_valid = 1'b0;
  logic             op_ready;
  tbl_op_e          op = TBL_LOOKUP;
  logic [ROW_W-1:0] op_row = '0;
  logic [CNT_W-1:0] op_cnt = '0;
  logic             done_valid;
  logic             done_hit;
  logic [CNT_W-1:0] done_cnt;

  int checks = 0;
  int failures = 0;
  int n_hits = 0, n_evict = 0, n_dec_floor = 0;

  abp_pred_table dut (.*);

  always #5 clk = ~clk;

  // reference model
  logic             m_valid [SETS][WAYS];
  logic [ROW_W-1:0] m_row   [SETS][WAYS];
  int               m_cnt   [SETS][WAYS];
  longint           m_time  [SETS][WAYS];
  longint           now = 0;

  function automatic void model_op(input tbl_op_e o, input logic [ROW_W-1:0] r, input int c,
                                   output bit hit, output int hcnt);
    int s, w, sel;
    s = int'(r[SET_W-1:0]);
    hit = 0; hcnt = 0; sel = -1;
    now++;
    for (w = 0; w < WAYS; w++) if (m_valid[s][w] && m_row[s][w] == r) begin hit = 1; sel = w; end
    if (hit) begin
      hcnt = m_cnt[s][sel];
      m_time[s][sel] = now;
      if (o == TBL_RECORD) m_cnt[s][sel] = c;
      if (o == TBL_DEC && m_cnt[s][sel] > 1) m_cnt[s][sel] = m_cnt[s][sel] - 1;
      if (o == TBL_DEC && hcnt == 1) n_dec_floor++;
    end else if (o == TBL_RECORD) begin
      for (w = WAYS - 1; w >= 0; w--) if (!m_valid[s][w]) sel = w;
      if (sel < 0) begin
        sel = 0;
        for (w = 1; w < WAYS; w++) if (m_time[s][w] < m_time[s][sel]) sel = w;
        n_evict++;
      end
      m_valid[s][sel] = 1; m_row[s][sel] = r; m_cnt[s][sel] = c; m_time[s][sel] = now;
    end
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    bit exp_hit;
    int exp_cnt, wait_cycles;
    logic [ROW_W-1:0] r;
    tbl_op_e o;
    int c;
    for (int s = 0; s < SETS; s++)
      for (int w = 0; w < WAYS; w++) begin
        m_valid[s][w] = 0; m_row[s][w] = '0; m_cnt[s][w] = 0; m_time[s][w] = 0;
      end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // reset sweep: busy for SETS cycles
    wait_cycles = 0;
    @(posedge clk);
    while (!op_ready) begin
      wait_cycles++;
      @(posedge clk);
    end
    check(wait_cycles >= SETS - 1 && wait_cycles <= SETS + 1,
          $sformatf("reset sweep took %0d cycles, expected about %0d", wait_cycles, SETS));

    for (int i = 0; i < 4000; i++) begin
      // rows from 3 sets, 7 tags each: more tags than ways
      r = ROW_W'((($urandom % 7) << SET_W) | ($urandom % 3));
      case ($urandom % 4)
        0, 1: o = TBL_LOOKUP;
        2: o = TBL_RECORD;
        default: o = TBL_DEC;
      endcase
      c = 1 + ($urandom % 4);
      op_valid <= 1'b1; op <= o; op_row <= r; op_cnt <= CNT_W'(c);
      @(posedge clk);
      while (!op_ready) @(posedge clk);
      op_valid <= 1'b0;
      model_op(o, r, c, exp_hit, exp_cnt);
      #1;
      check(done_valid && !op_ready, "done_valid one cycle after acceptance, op_ready low");
      check(done_hit == exp_hit, $sformatf("op %0d row %h: hit %0d expected %0d", o, r, done_hit, exp_hit));
      if (exp_hit) begin
        n_hits++;
        check(int'(done_cnt) == exp_cnt, $sformatf("row %h: count %0d expected %0d", r, done_cnt, exp_cnt));
      end
      @(posedge clk);
      #1;
      check(!done_valid && op_ready, "table idle again two cycles after acceptance");
    end
    check(n_hits > 100, "enough table hits");
    check(n_evict > 50, "enough replacements");
    check(n_dec_floor > 0, "decrement reached the floor of 1");
    $display("hits=%0d evictions=%0d dec_at_floor=%0d", n_hits, n_evict, n_dec_floor);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
