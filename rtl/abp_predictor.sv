// abp_predictor -- Access Based Predictor (ABP) row-buffer management unit
// for NUM_BANKS DRAM banks. It sits next to the memory controller.
//
// The memory controller reports each column access it services as
// {acc_bank, acc_row}. The access goes to that bank's abp_bank_ctrl, which
// decides whether the bank is precharged right after the access. Each bank
// has its own SETS-set, WAYS-way history table. With the published sizes
// (32 banks x 64 sets x 4 ways) the predictor is a 2048-set, 4-way cache of
// 8192 predicted access counts.
//
// Interface: acc_valid/acc_ready is a single request port. acc_ready is the
// ready of the addressed bank, so the controller stalls only when the bank it
// addresses is still answering its previous access. Banks work independently.
// Their responses come out on per-bank arrays (resp_*[b]) and can overlap in
// time. Latencies per response are those of abp_bank_ctrl: 1 cycle for a row
// hit or reopen, 3 for a precharged bank, 5 for a conflict. After reset every
// table clears itself for SETS cycles, and acc_ready is low meanwhile.
//
// The bank count and table geometry follow the published design. The single
// request port and the per-bank response arrays are this design's choice.
module abp_predictor
  import abp_pkg::*;
#(
  parameter int unsigned NUM_BANKS = NUM_BANKS_DEF,
  parameter int unsigned SETS      = SETS_DEF,
  parameter int unsigned WAYS      = WAYS_DEF,
  parameter int unsigned ROW_W     = ROW_W_DEF,
  parameter int unsigned CNT_W     = CNT_W_DEF,
  localparam int unsigned BANK_W   = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // serviced column accesses
  input  logic              acc_valid,
  output logic              acc_ready,
  input  logic [BANK_W-1:0] acc_bank,
  input  logic [ROW_W-1:0]  acc_row,
  // per-bank decisions
  output logic              resp_valid    [NUM_BANKS],
  output row_kind_e         resp_kind     [NUM_BANKS],
  output logic              resp_close    [NUM_BANKS],
  output logic              resp_pred_hit [NUM_BANKS],
  output logic              resp_reopen   [NUM_BANKS],
  output logic              resp_perfect  [NUM_BANKS]
);

  logic bank_ready [NUM_BANKS];

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    logic sel;
    assign sel = acc_valid && (acc_bank == BANK_W'(b));

    abp_bank_ctrl #(
      .SETS (SETS),
      .WAYS (WAYS),
      .ROW_W(ROW_W),
      .CNT_W(CNT_W)
    ) u_bank (
      .clk          (clk),
      .rst_n        (rst_n),
      .acc_valid    (sel),
      .acc_ready    (bank_ready[b]),
      .acc_row      (acc_row),
      .resp_valid   (resp_valid[b]),
      .resp_kind    (resp_kind[b]),
      .resp_close   (resp_close[b]),
      .resp_pred_hit(resp_pred_hit[b]),
      .resp_reopen  (resp_reopen[b]),
      .resp_perfect (resp_perfect[b])
    );
  end

  always_comb begin
    acc_ready = 1'b0;
    for (int b = 0; b < NUM_BANKS; b++) begin
      if (acc_bank == BANK_W'(b)) acc_ready = bank_ready[b];
    end
  end

endmodule
