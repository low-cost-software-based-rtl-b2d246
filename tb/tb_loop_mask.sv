// tb_loop_mask: self-checking testbench of the loop-branch mask.
// With the test enabled, the 1st, 3rd, 5th ... valid branch must pass and
// the others be blocked, whatever the idle cycles between them; with the
// test disabled every branch passes.
module tb_loop_mask;
  logic clk = 1'b0, rst_n = 1'b0, test_en = 1'b0, in_valid = 1'b0;
  logic out_valid, blocked;
  int checks = 0, failures = 0;
  int count;

  loop_mask dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk);
      test_en = 1'(run % 2);
      count = 0;
      for (int t = 0; t < 500; t++) begin
        @(negedge clk);
        in_valid = 1'($urandom_range(0, 2) != 0);
        #1;
        checks++;
        if (!in_valid) begin
          if (out_valid || blocked) failures++;
        end else if (!test_en) begin
          if (!out_valid || blocked) failures++;
        end else begin
          if (out_valid != (count % 2 == 0) || blocked != (count % 2 == 1)) failures++;
          count++;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
      test_en  = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
