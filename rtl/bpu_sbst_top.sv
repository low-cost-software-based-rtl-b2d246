// bpu_sbst_top: gshare branch-prediction unit with software-based self-test
// support.
//
// The processor reports each resolved conditional branch (br_valid, br_pc,
// br_taken) and receives the gshare prediction for it (pred_taken). For
// the self-test, a program drives the Global History Register like a
// software-modelled LFSR so that every PHT entry is visited once per
// traversal, and walks each counter through all of its transitions in 17
// traversals. Two observers are provided side by side:
//   * bp_fault_detector, the DFT checker of the main traversal, and
//     border_checker, which tests the two entries the traversal cannot
//     (0 and all ones) when border_en selects that final phase. test_out
//     is the AND of the two: it drops to 0 on every prediction that
//     departs from the expected pattern;
//   * misr: compresses every prediction made after the three set-up
//     sequences into a signature; misr_check compares it with misr_golden
//     and sets misr_fail. Leaving the set-up predictions out keeps the
//     signature independent of the PHT's power-up contents.
// The loop mask stays active in the border phase, so test_en is kept high
// through it. While test_en is high, loop_mask removes every other branch (the test
// program's loop branches) before it reaches the predictor and the
// observers. The branch address is used as given; the test program runs
// with it at zero so that the PHT index equals the GHR.
//
// Timing: one branch per cycle; pred_taken and test_out are combinational
// for the branch on the inputs, all state advances at the rising edge.
// The fi_* ports inject one faulty counter transition into the PHT for
// fault-coverage experiments and are tied low in normal use.
// Asynchronous active-low reset.
module bpu_sbst_top
  import bpu_pkg::*;
#(
  parameter int unsigned IDX_W  = 12,
  parameter int unsigned PC_W   = 32,
  parameter int unsigned PC_LSB = 2,
  parameter int unsigned MISR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // branch interface to the processor
  input  logic              br_valid,
  input  logic [PC_W-1:0]   br_pc,
  input  logic              br_taken,
  output logic              pred_taken,
  // self-test control and results
  input  logic              test_en,
  input  logic              border_en,
  output logic              test_out,
  output logic [IDX_W-1:0]  ghr_value,
  input  logic              misr_clear,
  input  logic              misr_check,
  input  logic [MISR_W-1:0] misr_golden,
  output logic [MISR_W-1:0] misr_signature,
  output logic              misr_fail,
  // observation of the self-test sequencing
  output logic              loop_blocked,
  output logic              seq_start,
  output logic              checking,
  output logic              border,
  output logic              armed,
  output logic              border_visit,
  output logic              border_done,
  output logic [2:0]        seq_cnt,
  // single-transition fault injection
  input  logic              fi_en,
  input  logic [IDX_W-1:0]  fi_idx,
  input  ctr_t              fi_state,
  input  logic              fi_taken,
  input  ctr_t              fi_next
);

  logic             bp_valid;
  logic [IDX_W-1:0] pht_idx;
  logic             main_en;
  logic             main_out;
  logic             border_out;

  // the main checker is idle while the border entries are tested
  assign main_en  = test_en && !border_en;
  assign test_out = main_out && border_out;

  loop_mask u_mask (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_en   (test_en),
    .in_valid  (br_valid),
    .out_valid (bp_valid),
    .blocked   (loop_blocked)
  );

  gshare #(.IDX_W(IDX_W), .PC_W(PC_W), .PC_LSB(PC_LSB)) u_bp (
    .clk        (clk),
    .rst_n      (rst_n),
    .br_valid   (bp_valid),
    .br_pc      (br_pc),
    .br_taken   (br_taken),
    .pred_taken (pred_taken),
    .pht_idx    (pht_idx),
    .ghr_value  (ghr_value),
    .fi_en      (fi_en),
    .fi_idx     (fi_idx),
    .fi_state   (fi_state),
    .fi_taken   (fi_taken),
    .fi_next    (fi_next)
  );

  bp_fault_detector #(.GHR_W(IDX_W)) u_det (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_en   (main_en),
    .br_valid  (bp_valid),
    .br_ghr    (pht_idx),
    .br_pred   (pred_taken),
    .br_taken  (br_taken),
    .test_out  (main_out),
    .seq_cnt   (seq_cnt),
    .checking  (checking),
    .seq_start (seq_start),
    .border    (border),
    .armed     (armed)
  );

  border_checker #(.GHR_W(IDX_W)) u_border (
    .clk       (clk),
    .rst_n     (rst_n),
    .border_en (border_en),
    .br_valid  (bp_valid),
    .br_ghr    (pht_idx),
    .br_pred   (pred_taken),
    .br_taken  (br_taken),
    .test_out  (border_out),
    .visit     (border_visit),
    .done      (border_done)
  );

  misr #(.W(MISR_W), .IN_W(1)) u_misr (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (misr_clear),
    .en        (armed && bp_valid),
    .din       (pred_taken),
    .check     (misr_check),
    .golden    (misr_golden),
    .signature (misr_signature),
    .fail      (misr_fail)
  );

endmodule
