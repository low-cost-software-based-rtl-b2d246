// tb_ghr: self-checking testbench of the Global History Register.
// Shifts random directions in with a random enable and compares the
// register with a history kept by the testbench; also checks reset.
module tb_ghr;
  localparam int unsigned W = 12;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, taken = 1'b0;
  logic [W-1:0] value;
  int checks = 0, failures = 0;
  bit [W-1:0] model = '0;

  ghr #(.GHR_W(W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (value !== '0) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      shift_en = 1'($urandom_range(0, 3) != 0);
      taken    = 1'($urandom);
      @(posedge clk);
      if (shift_en) model = {model[W-2:0], taken};
      @(negedge clk);
      shift_en = 1'b0;
      checks++;
      if (value !== model) begin
        failures++;
        if (failures < 5) $display("mismatch %h vs %h", value, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
