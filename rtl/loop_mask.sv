// loop_mask: blocks every other branch while the self-test runs.
//
// The test program produces its branches from IF statements inside FOR
// loops, so the branch stream alternates between an IF branch (the one
// that carries the LFSR bit) and the loop-closing branch. A single toggle
// flip-flop removes the loop branches: while test_en is high the first
// branch passes, the next is blocked, and so on. The REVERSE routine adds
// a dummy branch at its end so that this alternation is never broken.
// With test_en low every branch passes and the flip-flop is held at
// "pass".
//
// Interface and timing: combinational from in_valid to out_valid; the
// toggle flip-flop advances at the rising edge after each valid branch.
// Asynchronous active-low reset. Starting on "pass" when the test is
// enabled is this design's choice, matching a program whose first branch
// after enabling the test is an IF branch.
module loop_mask (
  input  logic clk,
  input  logic rst_n,
  input  logic test_en,
  input  logic in_valid,
  output logic out_valid,
  output logic blocked
);

  logic block_next_q;  // high: the next valid branch is a loop branch

  assign out_valid = in_valid && !(test_en && block_next_q);
  assign blocked   = in_valid &&  (test_en && block_next_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        block_next_q <= 1'b0;
    else if (!test_en) block_next_q <= 1'b0;
    else if (in_valid) block_next_q <= !block_next_q;
  end

endmodule
