// tb_misr: self-checking testbench of the signature register.
// Feeds random bit streams to an 8-bit, 1-input MISR and a 16-bit, 4-input
// MISR and compares each signature with a reference computed by
// polynomial arithmetic over GF(2) in the testbench (multiply by x,
// reduce by the polynomial, add the inputs). Then checks `fail`: clear
// against the true signature, set against a wrong one, and after clear.
module tb_misr;
  import bpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, check = 1'b0;
  logic [0:0] din1 = '0;
  logic [3:0] din4 = '0;
  logic [7:0]  golden8 = '0, sig8;
  logic [15:0] golden16 = '0, sig16;
  logic fail8, fail16;
  int checks = 0, failures = 0;
  longint unsigned ref8 = 0, ref16 = 0;

  misr #(.W(8), .IN_W(1)) dut8 (
    .clk, .rst_n, .clear, .en, .din(din1), .check, .golden(golden8),
    .signature(sig8), .fail(fail8));
  misr #(.W(16), .IN_W(4)) dut16 (
    .clk, .rst_n, .clear, .en, .din(din4), .check, .golden(golden16),
    .signature(sig16), .fail(fail16));

  always #5 clk = !clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // r(x) <- (x * r(x) + d(x)) mod p(x), with p(x) = x^w + taps
  function automatic longint unsigned gf_step(longint unsigned r, int w,
                                              longint unsigned taps, longint unsigned d);
    longint unsigned t;
    t = (r << 1) ^ d;
    if (t[w]) t = t ^ ((64'd1 << w) | taps);
    return t;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    checks++; if (sig8 != 0 || sig16 != 0 || fail8 || fail16) failures++;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      en   = 1'($urandom_range(0, 4) != 0);
      din1 = 1'($urandom);
      din4 = 4'($urandom);
      @(posedge clk);
      if (en) begin
        ref8  = gf_step(ref8, 8, 64'h85, 64'(din1));
        ref16 = gf_step(ref16, 16, 64'hA011, 64'(din4));
      end
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (64'(sig8) != ref8 || 64'(sig16) != ref16) begin
        failures++;
        if (failures < 5) $display("t=%0d sig %h/%h ref %h/%h", t, sig8, sig16, ref8, ref16);
      end
    end
    // compare against the right and a wrong golden signature
    golden8 = 8'(ref8); golden16 = 16'(ref16) ^ 16'h0100;
    check = 1'b1;
    @(negedge clk);
    check = 1'b0;
    checks++; if (fail8 != 1'b0 || fail16 != 1'b1) failures++;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    checks++; if (sig8 != 0 || sig16 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
