// tb_fault_coverage: single-transition fault coverage of the self-test for
// the five PHT sizes of the evaluation (256 to 4096 entries), each with
// 8-, 16- and 32-bit signature registers and with the DFT checkers.
//
// 256 and 512 entries are covered exhaustively (6144 and 12288 faults);
// 1024, 2048 and 4096 entries with 600 randomly chosen faults each, since
// one test of a 4096-entry table alone takes about 70 thousand branches.
// The checks are those of fault_campaign: 100% detection by the DFT
// checkers, no false alarm, and the MISR coverage thresholds. The
// campaigns run side by side; the testbench ends when all are done.
module tb_fault_coverage;
  bit done [5];
  int checks_i [5], failures_i [5];
  int checks = 0, failures = 0;

  fault_campaign #(.N_BITS(8),  .SAMPLES(0))   c256  (.done(done[0]), .checks(checks_i[0]), .failures(failures_i[0]));
  fault_campaign #(.N_BITS(9),  .SAMPLES(0))   c512  (.done(done[1]), .checks(checks_i[1]), .failures(failures_i[1]));
  fault_campaign #(.N_BITS(10), .SAMPLES(600)) c1024 (.done(done[2]), .checks(checks_i[2]), .failures(failures_i[2]));
  fault_campaign #(.N_BITS(11), .SAMPLES(600)) c2048 (.done(done[3]), .checks(checks_i[3]), .failures(failures_i[3]));
  fault_campaign #(.N_BITS(12), .SAMPLES(600)) c4096 (.done(done[4]), .checks(checks_i[4]), .failures(failures_i[4]));

  initial begin
    // watchdog, in units of the campaigns' 10 ns clock period
    #(1_000_000_000 * 2);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    foreach (done[i]) begin
      checks   += checks_i[i];
      failures += failures_i[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
