// border_checker: checker for the two PHT entries the main traversal
// cannot test, entry 2**n - 1 (all ones) and entry 0.
//
// The forward traversal never visits entry 0 and the reverse traversal
// never visits the all-ones entry, so after the 17 main sequences each of
// them has seen updates in one direction only and is saturated. They are
// then tested with 14 further "sequences" each, one branch per sequence at
// the entry under test, whose directions follow sequences 4..17 of the
// main test relative to the entry's saturation direction. The expected
// prediction-vs-outcome pattern is therefore the same as for sequences
// 4..17: unequal except the 5th, 6th, 11th and 12th visit.
//
// The program reaches the entry by shifting ones (all-ones entry) or zeros
// (entry 0) into the history; those walking branches land on other entries
// and are ignored. The checker first tests the all-ones entry, then entry
// 0, and counts the visits to the entry under test:
//   * phase ONES: branches with index all ones are visits 1..14;
//   * phase ZERO: branches with index 0 are visits 1..14;
//   * DONE: nothing more is checked.
// test_out is 1 unless a visit breaks the pattern.
//
// Interface and timing: br_* as for bp_fault_detector; border_en high
// selects this test (low clears the checker). test_out is combinational
// for the branch on the inputs; the state advances at the rising edge.
// Asynchronous active-low reset. The number of extra sequences and the
// fact that the hardware recognises the entry under test follow the
// method; the order of the two entries, the visit counting and the
// control input are this design's choices.
module border_checker #(
  parameter int unsigned GHR_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             border_en,
  input  logic             br_valid,
  input  logic [GHR_W-1:0] br_ghr,
  input  logic             br_pred,
  input  logic             br_taken,
  output logic             test_out,
  output logic             visit,
  output logic             done
);

  localparam logic [3:0] VISITS = 4'd14;

  typedef enum logic [1:0] {ONES, ZERO, DONE} phase_t;

  phase_t     phase_q;
  logic [3:0] cnt_q;     // visits already made in this phase
  logic [3:0] k;         // number of this visit, 1..14
  logic       expect_equal;

  assign visit = border_en && br_valid &&
                 (((phase_q == ONES) && (br_ghr == '1)) ||
                  ((phase_q == ZERO) && (br_ghr == '0)));
  assign k            = cnt_q + 4'd1;
  assign expect_equal = (k == 4'd5) || (k == 4'd6) || (k == 4'd11) || (k == 4'd12);
  assign test_out     = !visit || ((br_pred == br_taken) == expect_equal);
  assign done         = (phase_q == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= ONES;
      cnt_q   <= '0;
    end else if (!border_en) begin
      phase_q <= ONES;
      cnt_q   <= '0;
    end else if (visit) begin
      if (k == VISITS) begin
        cnt_q   <= '0;
        phase_q <= (phase_q == ONES) ? ZERO : DONE;
      end else begin
        cnt_q <= k;
      end
    end
  end

endmodule
