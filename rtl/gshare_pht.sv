// gshare_pht: Pattern History Table of 2-bit saturating counters.
//
// ENTRIES = 2**IDX_W counters. The read port is combinational: rd_pred is
// the most significant bit of the counter at rd_idx. The update port
// writes, on the rising edge with up_en high, the counter at up_idx moved
// one step toward the branch outcome (up_taken) by the saturating-counter
// FSM of bpu_pkg::ctr_next. A read and an update of the same entry in one
// cycle return the old state.
//
// Fault-injection hook (fi_*): when fi_en is high, an update of entry
// fi_idx that finds it in state fi_state with outcome fi_taken writes
// fi_next instead of the correct next state. This models a single faulty
// FSM transition of one entry, the fault model the self-test is evaluated
// against; tie fi_en low in normal use.
//
// The table has no reset, like the SRAM a PHT is normally built from: its
// power-up contents are arbitrary. The self-test does not depend on them,
// because its first three sequences drive every counter into saturation.
module gshare_pht
  import bpu_pkg::*;
#(
  parameter int unsigned IDX_W = 12
) (
  input  logic             clk,
  // read port
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_pred,
  output ctr_t             rd_state,
  // update port
  input  logic             up_en,
  input  logic [IDX_W-1:0] up_idx,
  input  logic             up_taken,
  // single-transition fault injection
  input  logic             fi_en,
  input  logic [IDX_W-1:0] fi_idx,
  input  ctr_t             fi_state,
  input  logic             fi_taken,
  input  ctr_t             fi_next
);

  localparam int unsigned ENTRIES = 1 << IDX_W;

  ctr_t table_q [ENTRIES];
  ctr_t up_old;
  ctr_t up_new;

  assign rd_state = table_q[rd_idx];
  assign rd_pred  = ctr_predict(rd_state);

  always_comb begin
    up_old = table_q[up_idx];
    if (fi_en && up_idx == fi_idx && up_old == fi_state && up_taken == fi_taken)
      up_new = fi_next;
    else
      up_new = ctr_next(up_old, up_taken);
  end

  always_ff @(posedge clk) begin
    if (up_en) table_q[up_idx] <= up_new;
  end

endmodule
