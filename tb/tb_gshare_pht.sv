// tb_gshare_pht: self-checking testbench of the PHT of 2-bit counters.
// Random updates are applied to a small table and every read is compared
// with a table of integers kept by the testbench, which saturates at 0 and
// 3. A second phase arms the fault-injection hook and checks that exactly
// the armed transition goes to the wrong state.
module tb_gshare_pht;
  import bpu_pkg::*;
  localparam int unsigned IDX_W = 4;
  localparam int unsigned N = 1 << IDX_W;
  logic clk = 1'b0;
  logic [IDX_W-1:0] rd_idx = '0, up_idx = '0, fi_idx = '0;
  logic rd_pred, up_en = 1'b0, up_taken = 1'b0, fi_en = 1'b0, fi_taken = 1'b0;
  ctr_t rd_state, fi_state = S0, fi_next = S0;
  int checks = 0, failures = 0;
  int model [N];

  gshare_pht #(.IDX_W(IDX_W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      rd_idx = IDX_W'(i);
      #1;
      checks++;
      if (int'(rd_state) != model[i] || rd_pred != (model[i] >= 2)) begin
        failures++;
        if (failures < 5) $display("entry %0d: got %0d want %0d", i, rd_state, model[i]);
      end
    end
  endtask

  initial begin
    // the table has no reset: take its power-up contents as the start
    repeat (2) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      rd_idx = IDX_W'(i);
      #1;
      model[i] = int'(rd_state);
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      up_en    = 1'b1;
      up_idx   = IDX_W'($urandom_range(0, N - 1));
      up_taken = 1'($urandom);
      rd_idx   = up_idx;
      #1;
      checks++;
      if (int'(rd_state) != model[up_idx]) failures++;
      @(posedge clk);
      if (up_taken) model[up_idx] = (model[up_idx] == 3) ? 3 : model[up_idx] + 1;
      else          model[up_idx] = (model[up_idx] == 0) ? 0 : model[up_idx] - 1;
      if (t % 500 == 0) begin
        @(negedge clk);
        up_en = 1'b0;
        check_all();
      end
    end
    // fault injection: entry 5, S1 on taken goes to S3 instead of S2
    @(negedge clk);
    up_en = 1'b0;
    fi_en = 1'b1; fi_idx = 4'd5; fi_state = S1; fi_taken = 1'b1; fi_next = S3;
    // drive entry 5 down to S0, then up twice: S0->S1 (good), S1->S3 (fault)
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); up_en = 1'b1; up_idx = 4'd5; up_taken = 1'b0;
    end
    @(negedge clk); up_taken = 1'b1;
    @(negedge clk); up_taken = 1'b1;
    @(negedge clk); up_en = 1'b0; rd_idx = 4'd5; #1;
    checks++; if (rd_state != S3) begin failures++; $display("fault not applied: %0d", rd_state); end
    // same transition on another entry is unaffected
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); up_en = 1'b1; up_idx = 4'd6; up_taken = 1'b0;
    end
    @(negedge clk); up_taken = 1'b1;
    @(negedge clk); up_taken = 1'b1;
    @(negedge clk); up_en = 1'b0; rd_idx = 4'd6; #1;
    checks++; if (rd_state != S2) begin failures++; $display("fault leaked: %0d", rd_state); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
