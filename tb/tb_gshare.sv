// tb_gshare: self-checking testbench of the gshare predictor.
// Random branches at random addresses; the testbench keeps its own
// history register and counter table, computes the index as history xor
// address bits, and compares prediction, index and history every branch.
module tb_gshare;
  import bpu_pkg::*;
  localparam int unsigned IDX_W = 6, PC_W = 16, PC_LSB = 2;
  localparam int unsigned N = 1 << IDX_W;
  logic clk = 1'b0, rst_n = 1'b0;
  logic br_valid = 1'b0, br_taken = 1'b0, pred_taken;
  logic [PC_W-1:0] br_pc = '0;
  logic [IDX_W-1:0] pht_idx, ghr_value;
  int checks = 0, failures = 0;
  int model [N];
  int unsigned hist = 0;

  gshare #(.IDX_W(IDX_W), .PC_W(PC_W), .PC_LSB(PC_LSB)) dut (
    .*, .fi_en(1'b0), .fi_idx('0), .fi_state(S0), .fi_taken(1'b0), .fi_next(S0));

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned idx;
    repeat (2) @(negedge clk);
    // the PHT has no reset: start the model from its power-up contents
    foreach (model[i]) model[i] = int'(dut.u_pht.table_q[i]);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      br_valid = 1'($urandom_range(0, 4) != 0);
      // a few hot branches with biased outcomes, so predictions vary
      br_pc    = PC_W'({$urandom_range(0, 7), 2'b00} * 36);
      br_taken = 1'($urandom_range(0, 9) < 7);
      #1;
      idx = (hist ^ (int'(br_pc) >> PC_LSB)) & (N - 1);
      checks++;
      if (int'(pht_idx) != idx || pred_taken != (model[idx] >= 2) || int'(ghr_value) != hist) begin
        failures++;
        if (failures < 5) $display("t=%0d idx %0d/%0d pred %0b hist %0d/%0d",
                                   t, pht_idx, idx, pred_taken, ghr_value, hist);
      end
      @(posedge clk);
      if (br_valid) begin
        if (br_taken) model[idx] = (model[idx] == 3) ? 3 : model[idx] + 1;
        else          model[idx] = (model[idx] == 0) ? 0 : model[idx] - 1;
        hist = ((hist << 1) | int'(br_taken)) & (N - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
