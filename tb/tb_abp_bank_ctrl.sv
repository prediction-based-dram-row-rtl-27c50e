// tb_abp_bank_ctrl -- self-checking testbench of abp_bank_ctrl.
//
// A directed sequence walks one bank through every rule of the ABP closure
// policy. The expected answer of each access was worked out by hand from the
// rules and is written next to it:
//   table miss -> page open until a conflict -> count recorded;
//   table hit -> page closed after the predicted count;
//   different page next -> perfect prediction;
//   same page next -> premature closure, reopened, aggregate count recorded;
//   conflict on a predicted page -> count decremented by one;
//   a count of one -> closed right after the first access;
//   the access counter saturating at 2**CNT_W-1.
// Rows A, B and D share set 16. C is in set 17. It also checks the answer
// latency of each access kind (1 / 3 / 5 cycles) and the busy time after reset.
module tb_abp_bank_ctrl;
  import abp_pkg::*;

  localparam int unsigned ROW_W = ROW_W_DEF;
  localparam int unsigned CNT_W = CNT_W_DEF;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             acc_valid = 1'b0;
  logic             acc_ready;
  logic [ROW_W-1:0] acc_row = '0;
  logic             resp_valid;
  row_kind_e        resp_kind;
  logic             resp_close;
  logic             resp_pred_hit;
  logic             resp_reopen;
  logic             resp_perfect;

  int checks = 0;
  int failures = 0;

  abp_bank_ctrl dut (.*);

  always #5 clk = ~clk;

  localparam logic [ROW_W-1:0] A = 16'h0010;
  localparam logic [ROW_W-1:0] B = 16'h0050;
  localparam logic [ROW_W-1:0] C = 16'h0011;
  localparam logic [ROW_W-1:0] D = 16'h0090;

  localparam int LAT_HIT = 1, LAT_EMPTY = 3, LAT_CONF = 5;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Issue one access and compare its answer.
  task automatic access(input logic [ROW_W-1:0] row, input row_kind_e kind, input bit close,
                        input bit pred_hit, input bit reopen, input bit perfect, input int lat,
                        input string step);
    int n;
    // inputs change at the falling edge; the access is accepted at the
    // next rising edge with acc_ready high
    @(negedge clk);
    while (!acc_ready) @(negedge clk);
    acc_valid = 1'b1;
    acc_row   = row;
    @(posedge clk);
    #1;
    acc_valid = 1'b0;
    // n = 1: the answer is there in the cycle right after acceptance
    n = 1;
    while (!resp_valid && n < 50) begin
      @(posedge clk);
      #1;
      n++;
    end
    check(resp_valid, {step, ": no answer"});
    check(n == lat, $sformatf("%s: latency %0d expected %0d", step, n, lat));
    check(resp_kind == kind, $sformatf("%s: kind %s expected %s", step, resp_kind.name(), kind.name()));
    check(resp_close == close, $sformatf("%s: close %0d expected %0d", step, resp_close, close));
    check(resp_pred_hit == pred_hit, $sformatf("%s: pred_hit %0d expected %0d", step, resp_pred_hit, pred_hit));
    check(resp_reopen == reopen, $sformatf("%s: reopen %0d expected %0d", step, resp_reopen, reopen));
    check(resp_perfect == perfect, $sformatf("%s: perfect %0d expected %0d", step, resp_perfect, perfect));
  endtask

  initial begin
    int wait_cycles;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait_cycles = 0;
    @(posedge clk);
    while (!acc_ready) begin
      wait_cycles++;
      @(posedge clk);
    end
    check(wait_cycles >= SETS_DEF - 1 && wait_cycles <= SETS_DEF + 1, "busy while the table clears");

    // A, not in the table: stays open; three accesses
    access(A, ROW_EMPTY,    0, 0, 0, 0, LAT_EMPTY, "A1 miss");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A2");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A3");
    // conflict: A recorded with 3, B not in the table
    access(B, ROW_CONFLICT, 0, 0, 0, 0, LAT_CONF,  "B1 conflict, A:=3");
    // conflict: B recorded with 1, A predicted 3
    access(A, ROW_CONFLICT, 0, 1, 0, 0, LAT_CONF,  "A1 predicted 3");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A2");
    access(A, ROW_HIT,      1, 0, 0, 0, LAT_HIT,   "A3 closes");
    // different page next: perfect
    access(C, ROW_EMPTY,    0, 0, 0, 1, LAT_EMPTY, "C1 perfect, miss");
    access(C, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "C2");
    access(A, ROW_CONFLICT, 0, 1, 0, 0, LAT_CONF,  "A1, C:=2");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A2");
    access(A, ROW_HIT,      1, 0, 0, 0, LAT_HIT,   "A3 closes");
    // same page next: premature closure, reopened, counts aggregate (4,5,6)
    access(A, ROW_EMPTY,    0, 0, 1, 0, LAT_HIT,   "A4 reopen");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A5");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A6");
    // conflict: A recorded with aggregate 6; B predicted 1 closes at once
    access(B, ROW_CONFLICT, 1, 1, 0, 0, LAT_CONF,  "B1 predicted 1, A:=6");
    access(B, ROW_EMPTY,    0, 0, 1, 0, LAT_HIT,   "B2 reopen");
    access(A, ROW_CONFLICT, 0, 1, 0, 0, LAT_CONF,  "A1 predicted 6, B:=2");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A2");
    access(A, ROW_HIT,      0, 0, 0, 0, LAT_HIT,   "A3");
    // conflict before the prediction is reached: A decremented to 5
    access(C, ROW_CONFLICT, 0, 1, 0, 0, LAT_CONF,  "C1 predicted 2, A:=5");
    access(C, ROW_HIT,      1, 0, 0, 0, LAT_HIT,   "C2 closes");
    access(A, ROW_EMPTY,    0, 1, 0, 1, LAT_EMPTY, "A1 perfect, predicted 5");
    for (int i = 2; i <= 4; i++) access(A, ROW_HIT, 0, 0, 0, 0, LAT_HIT, $sformatf("A%0d", i));
    access(A, ROW_HIT,      1, 0, 0, 0, LAT_HIT,   "A5 closes");
    // D in the same set as A and B, opened 130 times: count saturates
    access(D, ROW_EMPTY,    0, 0, 0, 1, LAT_EMPTY, "D1 perfect, miss");
    for (int i = 2; i <= 130; i++) access(D, ROW_HIT, 0, 0, 0, 0, LAT_HIT, $sformatf("D%0d", i));
    access(B, ROW_CONFLICT, 0, 1, 0, 0, LAT_CONF,  "B1 predicted 2, D:=127");
    access(D, ROW_CONFLICT, 0, 1, 0, 0, LAT_CONF,  "D1 predicted 127, B:=1 (dec 2->1)");
    for (int i = 2; i <= 126; i++) access(D, ROW_HIT, 0, 0, 0, 0, LAT_HIT, $sformatf("D%0d", i));
    access(D, ROW_HIT,      1, 0, 0, 0, LAT_HIT,   "D127 closes");
    access(B, ROW_EMPTY,    1, 1, 0, 1, LAT_EMPTY, "B1 perfect, predicted 1, closes");

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
