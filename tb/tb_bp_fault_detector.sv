// tb_bp_fault_detector: self-checking testbench of the DFT checker.
// The testbench runs the 17-sequence self-test program on its own model of
// a fault-free table of 2-bit counters (4-bit history) and feeds the
// checker the history, the prediction and the outcome of every branch.
// In some passes it flips randomly chosen predictions: the checker must
// flag exactly the flipped branches that lie in sequences 4..17 and are
// not border entries (0 or all ones), and nothing else. The sequence
// counter is checked at every sequence start.
module tb_bp_fault_detector;
  import sbst_prog_pkg::*;
  localparam int N_BITS = 4;
  localparam int ENTRIES = 1 << N_BITS;
  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0;
  logic br_valid = 1'b0, br_pred = 1'b0, br_taken = 1'b0;
  logic [N_BITS-1:0] br_ghr = '0;
  logic test_out, checking, seq_start, border, armed;
  logic [2:0] seq_cnt;
  int checks = 0, failures = 0, flagged = 0;
  int model [ENTRIES];

  bp_fault_detector #(.GHR_W(N_BITS)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_branch(input int k, input int unsigned g, input bit d, input bit flip);
    bit pred, exp_check;
    pred = (model[g] >= 2) ^ flip;
    @(negedge clk);
    br_valid = 1'b1; br_ghr = N_BITS'(g); br_pred = pred; br_taken = d;
    #1;
    exp_check = (k >= 4) && (g != 0) && (g != ENTRIES - 1);
    checks++;
    if (checking != exp_check || test_out != !(exp_check && flip) || armed != (k >= 4)) begin
      failures++;
      if (failures < 8) $display("seq %0d ghr %0d flip %0b: checking %0b test_out %0b",
                                 k, g, flip, checking, test_out);
    end
    if (!test_out) flagged++;
    @(posedge clk);
    if (d) model[g] = (model[g] == 3) ? 3 : model[g] + 1;
    else   model[g] = (model[g] == 0) ? 0 : model[g] - 1;
  endtask

  initial begin
    int unsigned x;
    bit d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 8; pass++) begin
      foreach (model[i]) model[i] = $urandom_range(0, 3);
      @(negedge clk);
      test_en = 1'b1;
      x = 1;
      for (int k = 1; k <= NUM_SEQ; k++) begin
        for (int i = 0; i < ENTRIES - 1; i++) begin
          d = lfsr_fb(x, N_BITS) ^ is_reverse(k);
          one_branch(k, x, d, pass > 0 && $urandom_range(0, 9) == 0);
          if (i == 0) begin
            @(negedge clk);
            br_valid = 1'b0;
            checks++;
            if (seq_cnt != ((k <= 3) ? 3'(k) : 3'((k - 4) % 6 + 1))) begin
              failures++;
              $display("seq %0d: counter %0d", k, seq_cnt);
            end
          end
          x = ((x << 1) | int'(d)) & (ENTRIES - 1);
        end
        checks++;
        if (x != 1) begin failures++; $display("sequence %0d did not return to 1", k); end
      end
      @(negedge clk);
      br_valid = 1'b0;
      test_en  = 1'b0;
    end
    checks++;
    if (flagged == 0) begin failures++; $display("no flip was ever flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
