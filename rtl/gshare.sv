// gshare: gshare branch predictor (Global History Register + Pattern
// History Table of 2-bit saturating counters).
//
// The PHT index is the GHR xor-ed with IDX_W bits of the branch address
// (pc[PC_LSB +: IDX_W]). With the address forced to zero, as the self-test
// does, the index is the GHR itself. The prediction is the most significant
// bit of the indexed counter. Once the outcome of the branch is known the
// indexed counter is moved toward it and the outcome is shifted into the
// GHR.
//
// Interface and timing: one resolved branch per cycle on br_valid/br_pc/
// br_taken. pred_taken and pht_idx are combinational and give the
// prediction the table holds for that branch before it is updated; the
// counter and the GHR are updated at the following rising edge. Folding
// lookup and resolution into one cycle (an in-order, non-speculative
// history) is this design's choice; a pipeline that resolves branches later
// would register pht_idx at lookup and return it with the outcome.
// Reset clears the history only; the PHT contents are not reset.
// ghr_value is the current history, which the self-test hardware watches.
// The fi_* ports inject a single faulty counter transition (see
// gshare_pht); tie fi_en low in normal use.
module gshare
  import bpu_pkg::*;
#(
  parameter int unsigned IDX_W  = 12,
  parameter int unsigned PC_W   = 32,
  parameter int unsigned PC_LSB = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             br_valid,
  input  logic [PC_W-1:0]  br_pc,
  input  logic             br_taken,
  output logic             pred_taken,
  output logic [IDX_W-1:0] pht_idx,
  output logic [IDX_W-1:0] ghr_value,
  input  logic             fi_en,
  input  logic [IDX_W-1:0] fi_idx,
  input  ctr_t             fi_state,
  input  logic             fi_taken,
  input  ctr_t             fi_next
);

  ctr_t unused_state;

  assign pht_idx = ghr_value ^ br_pc[PC_LSB +: IDX_W];

  ghr #(.GHR_W(IDX_W)) u_ghr (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (br_valid),
    .taken    (br_taken),
    .value    (ghr_value)
  );

  gshare_pht #(.IDX_W(IDX_W)) u_pht (
    .clk      (clk),
    .rd_idx   (pht_idx),
    .rd_pred  (pred_taken),
    .rd_state (unused_state),
    .up_en    (br_valid),
    .up_idx   (pht_idx),
    .up_taken (br_taken),
    .fi_en    (fi_en),
    .fi_idx   (fi_idx),
    .fi_state (fi_state),
    .fi_taken (fi_taken),
    .fi_next  (fi_next)
  );

endmodule
