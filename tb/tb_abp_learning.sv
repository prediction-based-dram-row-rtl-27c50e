// tb_abp_learning -- convergence test of the ABP unit at its default size.
//
// Every bank runs through a fixed cycle of 6 pages, and each page gets a fixed
// burst length between 1 and 7 accesses. The banks' requests are interleaved
// at random, as a many-core controller would see them. The test checks what
// the policy promises rather than single answers:
//   phase 1, 1 round   learning: each page is recorded at its conflict.
//   phase 2, 3 rounds  after the first page, every page is predicted and
//                      closed exactly at its last access: no conflicts, no
//                      reopens, every next page a perfect prediction.
//   phase 3, 4 rounds  burst lengths change: even pages get 2 more accesses,
//                      odd pages 2 fewer (never below 1). A longer page must
//                      cost exactly one premature closure. A page shorter by
//                      d must cost exactly d decrements, each seen as a
//                      conflict on the next page's first access.
//   phase 4, 2 rounds  all predictions are exact again, as in phase 2.
// The six pages use two sets with three tags each, so they all fit in the
// 4-way table and nothing is replaced.
module tb_abp_learning;
  import abp_pkg::*;

  localparam int unsigned NB    = NUM_BANKS_DEF;
  localparam int unsigned SETS  = SETS_DEF;
  localparam int unsigned ROW_W = ROW_W_DEF;
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned BW    = $clog2(NB);
  localparam int          NP    = 6;
  localparam int          NPH   = 4;
  localparam int          ROUNDS [NPH] = '{1, 3, 4, 2};

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

  function automatic logic [ROW_W-1:0] page_row(input int b, input int j);
    return ROW_W'(((j / 2 + b % 3) << SET_W) | (10 + j % 2));
  endfunction

  function automatic int burst(input int b, input int j, input int phase);
    int l;
    l = 1 + (j * (b + 1) + b) % 7;
    if (phase >= 3) l = (j % 2 == 0) ? l + 2 : ((l > 3) ? l - 2 : 1);
    return l;
  endfunction

  // per-bank position in its page cycle
  int  ph    [NB];
  int  rnd   [NB];
  int  pg    [NB];
  int  k     [NB];   // access number within the current burst, from 1
  bit  done  [NB];
  // what was issued and is awaited
  bit  pend     [NB];
  int  p_phase  [NB];
  bit  p_first  [NB];   // 1: first access of a burst
  bit  p_last   [NB];   // 1: last access of a burst
  bit  p_strict [NB];   // 1: an exact prediction is required
  // observed events per phase
  int  n_conf [NPH], n_reopen [NPH], n_miss [NPH], n_perfect [NPH], n_close [NPH];
  int  exp_reopen3 = 0, exp_conf3 = 0;

  always @(negedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (resp_valid[b]) begin
        check(pend[b], "answer without an access");
        if (resp_kind[b] == ROW_CONFLICT) n_conf[p_phase[b]]++;
        if (resp_reopen[b]) n_reopen[p_phase[b]]++;
        if (resp_close[b]) n_close[p_phase[b]]++;
        if (resp_perfect[b]) n_perfect[p_phase[b]]++;
        if (p_first[b] && !resp_reopen[b] && !resp_pred_hit[b]) n_miss[p_phase[b]]++;
        if (p_strict[b]) begin
          check(resp_close[b] == p_last[b], $sformatf("bank %0d: exact closure expected", b));
          if (p_first[b]) begin
            check(resp_kind[b] == ROW_EMPTY && resp_pred_hit[b] && resp_perfect[b],
                  $sformatf("bank %0d: predicted, perfect page opening expected", b));
          end else begin
            check(resp_kind[b] == ROW_HIT, $sformatf("bank %0d: row hit expected", b));
          end
        end
        pend[b] = 0;
      end
    end
  end

  initial begin
    int b, l, nleft, old_l, new_l;
    for (int i = 0; i < NB; i++) begin
      ph[i] = 0; rnd[i] = 0; pg[i] = 0; k[i] = 1; done[i] = 0; pend[i] = 0;
      p_phase[i] = 0; p_first[i] = 0; p_last[i] = 0; p_strict[i] = 0;
      for (int j = 0; j < NP; j++) begin
        old_l = burst(i, j, 1);
        new_l = burst(i, j, 3);
        if (new_l > old_l) begin
          exp_reopen3++;
          exp_conf3++;
        end else begin
          exp_conf3 += old_l - new_l;
        end
      end
    end
    for (int p = 0; p < NPH; p++) begin
      n_conf[p] = 0; n_reopen[p] = 0; n_miss[p] = 0; n_perfect[p] = 0; n_close[p] = 0;
    end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    while (!acc_ready) @(negedge clk);

    nleft = NB;
    while (nleft > 0) begin
      do b = int'($urandom % NB); while (done[b]);
      acc_valid = 1'b1;
      acc_bank  = BW'(b);
      acc_row   = page_row(b, pg[b]);
      #1;
      if (acc_ready) begin
        l = burst(b, pg[b], ph[b] + 1);
        pend[b]     = 1;
        p_phase[b]  = ph[b];
        p_first[b]  = (k[b] == 1);
        p_last[b]   = (k[b] == l);
        // phase 2 except its very first page, and all of phase 4
        p_strict[b] = (ph[b] == 1 && (rnd[b] > 0 || pg[b] > 0)) || ph[b] == 3;
        if (k[b] < l) k[b]++;
        else begin
          k[b] = 1;
          if (pg[b] < NP - 1) pg[b]++;
          else begin
            pg[b] = 0;
            if (rnd[b] < ROUNDS[ph[b]] - 1) rnd[b]++;
            else begin
              rnd[b] = 0;
              if (ph[b] < NPH - 1) ph[b]++;
              else begin
                done[b] = 1;
                nleft--;
              end
            end
          end
        end
      end
      @(negedge clk);
      acc_valid = 1'b0;
    end
    repeat (10) @(negedge clk);

    for (int p = 0; p < NPH; p++)
      $display("phase %0d: conflicts=%0d reopens=%0d table misses=%0d perfect=%0d predicted closures=%0d",
               p + 1, n_conf[p], n_reopen[p], n_miss[p], n_perfect[p], n_close[p]);
    check(n_miss[0] == NB * NP, "phase 1: every page missed once");
    check(n_close[0] == 0, "phase 1: no predicted closure");
    check(n_conf[1] == NB && n_reopen[1] == 0 && n_miss[1] == 0,
          "phase 2: no reopen or miss, and only the first page meets the page left open by phase 1");
    check(n_perfect[1] == NB * (NP * 3 - 1), "phase 2: every page after the first is a perfect prediction");
    check(n_reopen[2] == exp_reopen3, $sformatf("phase 3: %0d premature closures, expected %0d", n_reopen[2], exp_reopen3));
    check(n_conf[2] == exp_conf3, $sformatf("phase 3: %0d conflicts, expected %0d", n_conf[2], exp_conf3));
    check(n_conf[3] == 0 && n_reopen[3] == 0 && n_miss[3] == 0, "phase 4: converged again");
    check(n_perfect[3] == NB * NP * 2, "phase 4: all predictions perfect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
