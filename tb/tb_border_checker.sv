// tb_border_checker: self-checking testbench of the border-entry checker.
// The testbench models a 4-bit history and a counter table, saturates the
// two border entries as the main test leaves them, and runs the border
// program: walk the history to all ones, apply one branch, repeat 14 times;
// then the same for entry 0. In some passes random predictions are
// flipped: the checker must flag exactly the flipped visits of the entry
// under test and nothing else, and report done at the end.
module tb_border_checker;
  import sbst_prog_pkg::*;
  localparam int N_BITS = 4;
  localparam int ENTRIES = 1 << N_BITS;
  logic clk = 1'b0, rst_n = 1'b0, border_en = 1'b0;
  logic br_valid = 1'b0, br_pred = 1'b0, br_taken = 1'b0;
  logic [N_BITS-1:0] br_ghr = '0;
  logic test_out, visit, done;
  int checks = 0, failures = 0, flagged = 0, visits = 0;
  int model [ENTRIES];
  int unsigned hist;

  border_checker #(.GHR_W(N_BITS)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_branch(input bit d, input bit is_visit, input bit flip);
    bit pred;
    pred = (model[hist] >= 2) ^ flip;
    @(negedge clk);
    br_valid = 1'b1; br_ghr = N_BITS'(hist); br_pred = pred; br_taken = d;
    #1;
    checks++;
    if (visit != is_visit || test_out != !(is_visit && flip)) begin
      failures++;
      if (failures < 8) $display("ghr %0d visit %0b/%0b flip %0b test_out %0b",
                                 hist, visit, is_visit, flip, test_out);
    end
    if (visit) visits++;
    if (!test_out) flagged++;
    @(posedge clk);
    if (d) model[hist] = (model[hist] == 3) ? 3 : model[hist] + 1;
    else   model[hist] = (model[hist] == 0) ? 0 : model[hist] - 1;
    hist = ((hist << 1) | int'(d)) & (ENTRIES - 1);
  endtask

  initial begin
    bit sat, d;
    int unsigned target;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 6; pass++) begin
      foreach (model[i]) model[i] = $urandom_range(0, 3);
      // as left by the main test: all-ones entry saturated in the forward
      // direction, entry 0 saturated taken
      sat = lfsr_fb(ENTRIES - 1, N_BITS);
      model[ENTRIES - 1] = sat ? 3 : 0;
      model[0] = 3;
      hist = 1;
      @(negedge clk);
      border_en = 1'b1;
      for (int e = 0; e < 2; e++) begin
        target = (e == 0) ? ENTRIES - 1 : 0;
        if (e == 1) sat = 1'b1;
        for (int k = 4; k <= NUM_SEQ; k++) begin
          while (hist != target) one_branch(e == 0, 1'b0, pass > 0 && $urandom_range(0, 3) == 0);
          d = is_reverse(k) ? !sat : sat;
          one_branch(d, 1'b1, pass > 0 && $urandom_range(0, 2) == 0);
        end
      end
      @(negedge clk);
      br_valid = 1'b0;
      checks++;
      if (!done) begin failures++; $display("not done"); end
      // after done nothing is checked
      one_branch(1'b0, 1'b0, 1'b1);
      @(negedge clk);
      br_valid = 1'b0; border_en = 1'b0;
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("done not cleared"); end
    end
    checks++;
    if (flagged == 0 || visits != 6 * 28) begin
      failures++; $display("flagged %0d visits %0d", flagged, visits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
