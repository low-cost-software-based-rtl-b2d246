// tb_bpu_sbst_top: end-to-end testbench of the self-testing gshare BPU at
// its default size (4096-entry PHT, 12-bit history, 8-bit MISR).
//
// A behavioural model of the processor executes the self-test program:
// it first brings the history to 1 with ordinary branches, enables the
// test, then calls the FORWARD and REVERSE routines in the order
// F F F R R F R R R F F R F F F R R. Each routine issues an IF branch per
// LFSR step followed by its loop-closing branch; REVERSE ends with the
// IF(false) branch that closes the cycle and a dummy branch. A final
// border phase then tests the all-ones entry and entry 0 with 14 visits
// each, walking the history to them with ones or zeros. The
// testbench keeps its own counter table and history to predict every
// prediction and its own GF(2) model of the signature register.
//
// Runs: (1) fault-free: every prediction matches, test_out never drops,
// the signature matches and misr_fail stays low; the resulting signature
// is the golden one for the later runs. (2) single faulty transitions in
// ordinary entries: test_out must drop, and misr_fail must equal the
// model's verdict. (3) a faulty transition in each border entry (0 and
// all ones): the border phase must make test_out drop. (4) normal operation with
// non-zero branch addresses and the test disabled. Every mechanism (loop
// branch blocked, sequence start, set-up phase, expected-equal and
// expected-unequal checks, border exclusion, DFT detection, MISR pass and
// MISR fail) is counted and must occur.
module tb_bpu_sbst_top;
  import bpu_pkg::*;
  import sbst_prog_pkg::*;

  localparam int N_BITS  = 12;   // defaults of bpu_sbst_top
  localparam int ENTRIES = 1 << N_BITS;
  localparam int MW      = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic br_valid = 1'b0, br_taken = 1'b0, pred_taken;
  logic [31:0] br_pc = '0;
  logic test_en = 1'b0, test_out;
  logic [N_BITS-1:0] ghr_value;
  logic misr_clear = 1'b0, misr_check = 1'b0, misr_fail;
  logic [MW-1:0] misr_golden = '0, misr_signature;
  logic loop_blocked, seq_start, checking, border, armed;
  logic border_en = 1'b0, border_visit, border_done;
  logic [2:0] seq_cnt;
  logic fi_en = 1'b0, fi_taken = 1'b0;
  logic [N_BITS-1:0] fi_idx = '0;
  ctr_t fi_state = S0, fi_next = S0;

  bpu_sbst_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int model [ENTRIES];
  int unsigned hist;
  longint unsigned sig_model;
  // fault of the model
  bit m_fi_en; int m_fi_idx, m_fi_state, m_fi_next; bit m_fi_taken;
  // mechanism counters
  int n_blocked = 0, n_seq_start = 0, n_setup = 0, n_exp_eq = 0, n_exp_ne = 0;
  int n_bvisit = 0, n_bdone = 0;
  int n_border = 0, n_dft_detect = 0, n_misr_pass = 0, n_misr_fail = 0, n_normal = 0;
  int low_cnt;
  int n_main_if;   // branches reaching the predictor in sequences 1..17

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned gf_step(longint unsigned r, longint unsigned d);
    longint unsigned t;
    t = (r << 1) ^ d;
    if (t[MW]) t = t ^ ((64'd1 << MW) | 64'h85);
    return t;
  endfunction

  function automatic int model_next(int idx, int s, bit d);
    if (m_fi_en && idx == m_fi_idx && s == m_fi_state && d == m_fi_taken) return m_fi_next;
    if (d) return (s == 3) ? 3 : s + 1;
    return (s == 0) ? 0 : s - 1;
  endfunction

  // One conditional branch. is_if: the branch reaches the predictor
  // (always when the test is off). k: sequence number, 0 outside the test.
  task automatic branch(input bit d, input bit is_if, input int k, input int unsigned pc);
    int unsigned idx;
    bit pred;
    @(negedge clk);
    br_valid = 1'b1; br_taken = d; br_pc = pc;
    #1;
    if (!is_if) begin
      checks++;
      if (!loop_blocked) begin failures++; $display("loop branch not blocked"); end
      n_blocked++;
    end else begin
      idx  = (hist ^ (pc >> 2)) & (ENTRIES - 1);
      pred = (model[idx] >= 2);
      checks++;
      if (pred_taken != pred || loop_blocked) begin
        failures++;
        if (failures < 8) $display("seq %0d idx %0d: pred %0b want %0b", k, idx, pred_taken, pred);
      end
      if (test_en) begin
        if (k >= 4) sig_model = gf_step(sig_model, 64'(pred));
        checks++;
        if (armed != (k >= 4)) begin failures++; $display("armed wrong in sequence %0d", k); end
        if (seq_start) n_seq_start++;
        if (border) n_border++;
        if (k >= 1 && k <= 3) n_setup++;
        if (k >= 1) n_main_if++;
        if (checking && expect_equal(k)) n_exp_eq++;
        if (checking && !expect_equal(k)) n_exp_ne++;
        if (!test_out) low_cnt++;
        if (border_visit) n_bvisit++;
      end
      model[idx] = model_next(idx, model[idx], d);
      hist = ((hist << 1) | int'(d)) & (ENTRIES - 1);
    end
    @(posedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0; br_valid = 1'b0; test_en = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // reset clears the history only; the model takes over the table as is
    foreach (model[i]) model[i] = int'(dut.u_bp.u_pht.table_q[i]);
    hist = 0;
  endtask

  // Full self-test; returns the number of branches on which test_out was 0.
  task automatic self_test(input bit [MW-1:0] golden, output int lows, output bit mfail);
    int unsigned x;
    bit d;
    low_cnt = 0;
    n_main_if = 0;
    @(negedge clk);
    br_valid = 1'b0; misr_clear = 1'b1;
    @(negedge clk);
    misr_clear = 1'b0;
    sig_model = 0;
    // bring the history to 1 with straight-line branches
    for (int i = 0; i < N_BITS; i++) branch(i == N_BITS - 1, 1'b1, 0, 0);
    @(negedge clk);
    br_valid = 1'b0; test_en = 1'b1;
    x = 1;
    for (int k = 1; k <= NUM_SEQ; k++) begin
      if (!is_reverse(k)) begin
        // FORWARD: IF per step, loop branch after each
        for (int i = 1; i <= ENTRIES - 1; i++) begin
          d = lfsr_fb(x, N_BITS);
          branch(d, 1'b1, k, 0);
          x = ((x << 1) | int'(d)) & (ENTRIES - 1);
          branch(i < ENTRIES - 1, 1'b0, k, 0);
        end
      end else begin
        // REVERSE: complemented feedback, then IF(false), X = 1, dummy
        for (int i = 1; i <= ENTRIES - 2; i++) begin
          d = !lfsr_fb(x, N_BITS);
          branch(d, 1'b1, k, 0);
          x = ((x << 1) | int'(d)) & (ENTRIES - 1);
          branch(i < ENTRIES - 2, 1'b0, k, 0);
        end
        checks++;
        if (x != 0) begin failures++; $display("reverse loop did not end at 0"); end
        branch(1'b1, 1'b1, k, 0);
        x = 1;
        branch(1'b0, 1'b0, k, 0);
      end
      checks++;
      if (ghr_value != N_BITS'(x) || x != 1) begin
        failures++; $display("sequence %0d: GHR %0d", k, ghr_value);
      end
    end
    // the main test is 17 traversals of 2^n - 1 predictor branches each
    checks++;
    if (n_main_if != NUM_SEQ * (ENTRIES - 1) || n_blocked == 0) begin
      failures++; $display("main test took %0d predictor branches", n_main_if);
    end
    // border entries: all ones first, then entry 0; 14 visits each, each
    // reached by walking the history with ones or zeros
    @(negedge clk);
    br_valid = 1'b0; border_en = 1'b1;
    for (int e = 0; e < 2; e++) begin
      bit sat;
      int unsigned target;
      target = (e == 0) ? ENTRIES - 1 : 0;
      sat    = (e == 0) ? lfsr_fb(ENTRIES - 1, N_BITS) : 1'b1;
      for (int k = 4; k <= NUM_SEQ; k++) begin
        while (hist != target) begin
          branch(e == 0, 1'b1, 0, 0);
          branch(1'b1, 1'b0, 0, 0);
        end
        branch(is_reverse(k) ? !sat : sat, 1'b1, 0, 0);
        branch(k < NUM_SEQ, 1'b0, 0, 0);
      end
    end
    @(negedge clk);
    br_valid = 1'b0;
    checks++;
    if (!border_done) begin failures++; $display("border test not done"); end
    else n_bdone++;
    border_en = 1'b0; test_en = 1'b0;
    misr_golden = golden; misr_check = 1'b1;
    @(negedge clk);
    misr_check = 1'b0;
    checks++;
    if (64'(misr_signature) != sig_model) begin
      failures++; $display("signature %h, model %h", misr_signature, sig_model);
    end
    lows = low_cnt;
    mfail = misr_fail;
  endtask

  task automatic arm_fault(input int idx);
    int s, t, good;
    bit d;
    s = $urandom_range(0, 3);
    d = 1'($urandom);
    good = d ? ((s == 3) ? 3 : s + 1) : ((s == 0) ? 0 : s - 1);
    do t = $urandom_range(0, 3); while (t == good);
    m_fi_en = 1'b1; m_fi_idx = idx; m_fi_state = s; m_fi_taken = d; m_fi_next = t;
    fi_en = 1'b1; fi_idx = N_BITS'(idx); fi_state = ctr_t'(s); fi_taken = d; fi_next = ctr_t'(t);
    $display("fault: entry %0d, S%0d on %s goes to S%0d", idx, s, d ? "taken" : "not taken", t);
  endtask

  initial begin
    int lows;
    bit mfail;
    bit [MW-1:0] golden;
    m_fi_en = 1'b0;
    do_reset();

    // (1) fault-free run
    self_test('0, lows, mfail);
    golden = misr_signature;
    do_reset();
    self_test(golden, lows, mfail);   // again, now against its own signature
    checks++;
    if (lows != 0 || mfail) begin
      failures++; $display("fault-free run flagged: %0d lows, misr_fail %0b", lows, mfail);
    end
    if (!mfail) n_misr_pass++;

    // (2) faults in ordinary entries
    for (int r = 0; r < 3; r++) begin
      do_reset();
      arm_fault($urandom_range(1, ENTRIES - 2));
      self_test(golden, lows, mfail);
      checks++;
      if (lows == 0) begin failures++; $display("fault not detected by the checker"); end
      else n_dft_detect++;
      checks++;
      if (mfail != (sig_model != 64'(golden))) begin failures++; $display("misr_fail wrong"); end
      if (mfail) n_misr_fail++;
      fi_en = 1'b0; m_fi_en = 1'b0;
    end

    // (3) faults in the border entries: found by the border checker
    for (int r = 0; r < 2; r++) begin
      do_reset();
      arm_fault((r == 0) ? ENTRIES - 1 : 0);
      self_test(golden, lows, mfail);
      checks++;
      if (lows == 0) begin failures++; $display("border fault not detected"); end
      fi_en = 1'b0; m_fi_en = 1'b0;
    end

    // (4) normal operation: addresses take part in the index
    for (int i = 0; i < 2000; i++) begin
      branch(1'($urandom_range(0, 3) != 0), 1'b1, 0, $urandom_range(0, 63) * 4);
      n_normal++;
    end
    @(negedge clk);
    br_valid = 1'b0;

    $display("mechanisms: blocked=%0d seq_start=%0d setup=%0d exp_eq=%0d exp_ne=%0d border=%0d",
             n_blocked, n_seq_start, n_setup, n_exp_eq, n_exp_ne, n_border);
    $display("            border_visit=%0d border_done=%0d", n_bvisit, n_bdone);
    $display("            dft_detect=%0d misr_pass=%0d misr_fail=%0d normal=%0d",
             n_dft_detect, n_misr_pass, n_misr_fail, n_normal);
    checks++; if (n_blocked == 0)    begin failures++; $display("no loop branch blocked"); end
    checks++; if (n_seq_start == 0)  begin failures++; $display("no sequence start"); end
    checks++; if (n_setup == 0)      begin failures++; $display("no set-up branch"); end
    checks++; if (n_exp_eq == 0)     begin failures++; $display("no expected-equal check"); end
    checks++; if (n_exp_ne == 0)     begin failures++; $display("no expected-unequal check"); end
    checks++; if (n_border == 0)     begin failures++; $display("no border exclusion"); end
    checks++; if (n_dft_detect == 0) begin failures++; $display("no checker detection"); end
    checks++; if (n_misr_pass == 0)  begin failures++; $display("no MISR pass"); end
    checks++; if (n_misr_fail == 0)  begin failures++; $display("no MISR failure"); end
    checks++; if (n_bvisit == 0)     begin failures++; $display("no border visit"); end
    checks++; if (n_bdone == 0)      begin failures++; $display("border test never done"); end
    checks++; if (n_normal == 0)     begin failures++; $display("no normal branch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
