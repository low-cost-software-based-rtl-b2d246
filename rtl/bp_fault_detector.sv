// bp_fault_detector: on-line checker of the PHT self-test (DFT variant).
//
// The test program applies 17 traversals ("sequences") of the PHT in the
// fixed order F F F R R F R R R F F R F F F R R (F = forward update, R =
// reverse update). After the three set-up sequences every counter is
// saturated, and from then on whether each prediction should equal the
// branch outcome depends only on the sequence number:
//
//   sequence           1..3   4 5 6 7  8 9  10..13  14 15  16 17
//   prediction=outcome  -     no       yes   no      yes    no
//
// i.e. a period of six sequences, of which the 5th and 6th expect a
// correct prediction. The hardware therefore needs only:
//   * a "GHR = 1" detector: every sequence starts with the GHR at 1, so a
//     branch seen with GHR = 1 opens the next sequence;
//   * a 3-bit sequence counter, advanced by that detector, which counts the
//     three set-up sequences and then counts 1..6 in each period, wrapping
//     after sequence 6 of the period;
//   * a flip-flop that is set at the start of the 4th sequence (counter at
//     3 while the flip-flop is still clear) and enables checking from then;
//   * a "sequence 5 or 6" decoder that selects the expected comparison;
//   * a "GHR = 0 or all ones" detector that excludes the two border
//     entries, which only see half of the updates.
// test_out is 1 while everything agrees and drops to 0 on the branch whose
// prediction breaks the pattern.
//
// Interface and timing: br_valid/br_ghr/br_pred/br_taken describe a branch
// that reaches the predictor (loop branches already removed), with br_ghr
// the history used to index it. test_out is combinational for that branch;
// the counter and flip-flop advance at the next rising edge. `armed` is
// high, for the same branch, once the set-up sequences are over (it is
// the flip-flop's value in effect for that branch). When test_en
// is low the state is cleared and test_out is 1. Asynchronous active-low
// reset.
//
// The block names, the counter width and the expected pattern follow the
// method; the exact gate structure and the way the counter is cleared are
// this design's own.
module bp_fault_detector #(
  parameter int unsigned GHR_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_en,
  input  logic             br_valid,
  input  logic [GHR_W-1:0] br_ghr,
  input  logic             br_pred,
  input  logic             br_taken,
  output logic             test_out,
  // observation of the internal state
  output logic [2:0]       seq_cnt,
  output logic             checking,
  output logic             seq_start,
  output logic             border,
  output logic             armed
);

  localparam logic [2:0] SETUP_SEQS = 3'd3;
  localparam logic [2:0] PERIOD     = 3'd6;

  logic [2:0] cnt_q, cnt_d;
  logic       ff_q, ff_d;
  logic       expect_equal;

  assign seq_start = test_en && br_valid && (br_ghr == GHR_W'(1));
  assign border    = (br_ghr == '0) || (br_ghr == '1);

  // Sequence number in effect for the current branch: a branch that opens
  // a sequence is already checked against the new number.
  always_comb begin
    cnt_d = cnt_q;
    ff_d  = ff_q;
    if (seq_start) begin
      if (!ff_q) begin
        if (cnt_q == SETUP_SEQS) begin
          ff_d  = 1'b1;
          cnt_d = 3'd1;
        end else begin
          cnt_d = cnt_q + 3'd1;
        end
      end else begin
        cnt_d = (cnt_q == PERIOD) ? 3'd1 : cnt_q + 3'd1;
      end
    end
  end

  assign expect_equal = (cnt_d == 3'd5) || (cnt_d == 3'd6);
  assign checking     = test_en && br_valid && ff_d && !border;
  assign test_out     = !checking || ((br_pred == br_taken) == expect_equal);
  assign seq_cnt      = cnt_q;
  assign armed        = test_en && ff_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      ff_q  <= 1'b0;
    end else if (!test_en) begin
      cnt_q <= '0;
      ff_q  <= 1'b0;
    end else begin
      cnt_q <= cnt_d;
      ff_q  <= ff_d;
    end
  end

endmodule
