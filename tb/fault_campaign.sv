// fault_campaign: single-transition fault campaign on one gshare PHT size,
// used by tb_fault_coverage.
//
// Faulty transitions are injected one at a time: with SAMPLES = 0 every
// one of them (2^n entries x 4 states x 2 outcomes x 3 wrong next states),
// otherwise SAMPLES randomly chosen ones. For each fault the 17-sequence
// self-test (forward/reverse LFSR traversals, loop branches already
// removed) is run while the main DFT checker and three signature
// registers (8, 16 and 32 bits) observe the predictions (the MISRs from
// the 4th sequence on), followed by the border phase (14 visits each to
// the all-ones entry and entry 0) watched by the border checker. The PHT
// is not reset between runs, so each run starts from whatever the last one
// left behind. A fault counts as detected by the DFT hardware if either
// checker's output drops at least once, and by a MISR if its final
// signature differs from the fault-free one.
//
// Checks: the fault-free run is never flagged; the main checker alone
// detects every fault of the ordinary entries and flags none in the
// border entries; main and border checker together detect every fault
// (100%); each MISR, which sees the basic traversal only, detects at least
// 99% of the faults (98% when sampling). Coverage figures are printed; `done` rises at the end.
module fault_campaign #(
  parameter int N_BITS  = 8,
  parameter int SAMPLES = 0
) (
  output bit done,
  output int checks,
  output int failures
);
  import bpu_pkg::*;
  import sbst_prog_pkg::*;

  localparam int ENTRIES = 1 << N_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic br_valid = 1'b0, br_taken = 1'b0, pred_taken, test_en = 1'b0, test_out;
  logic [N_BITS-1:0] pht_idx, ghr_value;
  logic fi_en = 1'b0, fi_taken = 1'b0;
  logic [N_BITS-1:0] fi_idx = '0;
  ctr_t fi_state = S0, fi_next = S0;
  logic misr_clear = 1'b0;
  logic [7:0]  sig8;
  logic [15:0] sig16;
  logic [31:0] sig32;
  logic f8, f16, f32;
  logic checking, seq_start, border, armed;
  logic [2:0] seq_cnt;
  logic border_en = 1'b0, b_out, b_visit, b_done;

  gshare #(.IDX_W(N_BITS), .PC_W(16), .PC_LSB(2)) u_bp (
    .clk, .rst_n, .br_valid, .br_pc(16'h0), .br_taken, .pred_taken, .pht_idx, .ghr_value,
    .fi_en, .fi_idx, .fi_state, .fi_taken, .fi_next);
  bp_fault_detector #(.GHR_W(N_BITS)) u_det (
    .clk, .rst_n, .test_en, .br_valid, .br_ghr(pht_idx), .br_pred(pred_taken), .br_taken,
    .test_out, .seq_cnt, .checking, .seq_start, .border, .armed);
  border_checker #(.GHR_W(N_BITS)) u_bc (
    .clk, .rst_n, .border_en, .br_valid, .br_ghr(pht_idx), .br_pred(pred_taken), .br_taken,
    .test_out(b_out), .visit(b_visit), .done(b_done));
  misr #(.W(8))  u_m8  (.clk, .rst_n, .clear(misr_clear), .en(armed && br_valid),
    .din(pred_taken), .check(1'b0), .golden('0), .signature(sig8),  .fail(f8));
  misr #(.W(16)) u_m16 (.clk, .rst_n, .clear(misr_clear), .en(armed && br_valid),
    .din(pred_taken), .check(1'b0), .golden('0), .signature(sig16), .fail(f16));
  misr #(.W(32)) u_m32 (.clk, .rst_n, .clear(misr_clear), .en(armed && br_valid),
    .din(pred_taken), .check(1'b0), .golden('0), .signature(sig32), .fail(f32));

  always #5 clk = !clk;

  bit flagged, b_flagged;

  always @(negedge clk) begin
    if (br_valid && test_en && !test_out) flagged = 1'b1;
    if (br_valid && border_en && !b_out) b_flagged = 1'b1;
  end

  task automatic run_test();
    int unsigned x;
    bit d;
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1; misr_clear = 1'b1;
    @(negedge clk);
    misr_clear = 1'b0;
    // history to 1
    for (int i = 0; i < N_BITS; i++) begin
      br_valid = 1'b1; br_taken = (i == N_BITS - 1);
      @(negedge clk);
    end
    br_valid = 1'b0; test_en = 1'b1;
    flagged = 1'b0; b_flagged = 1'b0;
    @(negedge clk);
    x = 1;
    for (int k = 1; k <= NUM_SEQ; k++) begin
      for (int i = 0; i < ENTRIES - 1; i++) begin
        d = lfsr_fb(x, N_BITS) ^ is_reverse(k);
        br_valid = 1'b1; br_taken = d;
        @(negedge clk);
        x = ((x << 1) | int'(d)) & (ENTRIES - 1);
      end
    end
    br_valid = 1'b0; test_en = 1'b0; border_en = 1'b1;
    @(negedge clk);
    for (int e = 0; e < 2; e++) begin
      bit sat;
      int unsigned target;
      target = (e == 0) ? ENTRIES - 1 : 0;
      sat    = (e == 0) ? lfsr_fb(ENTRIES - 1, N_BITS) : 1'b1;
      for (int k = 4; k <= NUM_SEQ; k++) begin
        while (x != target) begin
          br_valid = 1'b1; br_taken = (e == 0);
          @(negedge clk);
          x = ((x << 1) | int'(e == 0)) & (ENTRIES - 1);
        end
        d = is_reverse(k) ? !sat : sat;
        br_valid = 1'b1; br_taken = d;
        @(negedge clk);
        x = ((x << 1) | int'(d)) & (ENTRIES - 1);
      end
    end
    br_valid = 1'b0;
    if (!b_done) begin failures++; $display("border phase not done"); end
    border_en = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [7:0] g8; logic [15:0] g16; logic [31:0] g32;
    int total = 0, det_dft = 0, det8 = 0, det16 = 0, det32 = 0;
    int ordinary = 0, ordinary_missed = 0, border_flagged = 0, det_all = 0;
    real c8, c16, c32, cdft, min_cov;
    done = 1'b0; checks = 0; failures = 0;
    // a random sample estimates coverage less precisely
    min_cov = (SAMPLES == 0) ? 99.0 : 98.0;
    repeat (2) @(negedge clk);
    run_test();
    g8 = sig8; g16 = sig16; g32 = sig32;
    checks++;
    if (flagged || b_flagged) begin failures++; $display("fault-free run flagged"); end
    for (int f = 0; f < ((SAMPLES == 0) ? ENTRIES * 24 : SAMPLES); f++) begin
      int e, r, s, d, t, j;
      // fault number -> entry, state, outcome and wrong next state
      e = (SAMPLES == 0) ? f / 24 : $urandom_range(0, ENTRIES - 1);
      r = (SAMPLES == 0) ? f % 24 : $urandom_range(0, 23);
      s = r / 6;
      d = (r / 3) % 2;
      j = r % 3;
      t = 0;
      for (int c = 0; c < 4; c++) begin
        if (ctr_t'(c) == ctr_next(ctr_t'(s), 1'(d))) continue;
        if (j == 0) t = c;
        j--;
      end
      fi_en = 1'b1; fi_idx = N_BITS'(e); fi_state = ctr_t'(s);
      fi_taken = 1'(d); fi_next = ctr_t'(t);
      run_test();
      total++;
      if (flagged) det_dft++;
      if (flagged || b_flagged) det_all++;
      else if (total - det_all < 5) $display("missed by both checkers: entry %0d S%0d %0d -> S%0d", e, s, d, t);
      if (sig8  != g8)  det8++;
      if (sig16 != g16) det16++;
      if (sig32 != g32) det32++;
      if (e != 0 && e != ENTRIES - 1) begin
        ordinary++;
        if (!flagged) begin
          ordinary_missed++;
          if (ordinary_missed < 5) $display("missed: entry %0d S%0d %0d -> S%0d", e, s, d, t);
        end
      end else if (flagged) border_flagged++;
    end
    fi_en = 1'b0;
    cdft = 100.0 * det_dft / total;
    c8  = 100.0 * det8  / total;
    c16 = 100.0 * det16 / total;
    c32 = 100.0 * det32 / total;
    $display("PHT %0d entries, %s: faults injected: %0d (ordinary entries: %0d)",
             ENTRIES, (SAMPLES == 0) ? "all faults" : "random sample", total, ordinary);
    $display("DFT checker coverage: %0.2f%% of all, %0d ordinary-entry faults missed", cdft, ordinary_missed);
    $display("DFT checkers incl. border entries: %0.2f%%", 100.0 * det_all / total);
    $display("MISR coverage: 8-bit %0.2f%%  16-bit %0.2f%%  32-bit %0.2f%%", c8, c16, c32);
    checks++; if (ordinary_missed != 0) failures++;
    checks++; if (border_flagged != 0) failures++;
    checks++; if (det_all != total) failures++;
    checks++; if (c8  < min_cov) failures++;
    checks++; if (c16 < min_cov) failures++;
    checks++; if (c32 < min_cov) failures++;
    done = 1'b1;
  end
endmodule
