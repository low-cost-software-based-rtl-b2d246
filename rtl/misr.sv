// misr: Multiple Input Signature Register with final signature compare.
//
// Compresses IN_W response bits per clock into a W-bit signature. Each
// enabled cycle the register shifts left by one; when the bit shifted out
// is 1 the polynomial taps POLY are xor-ed in (internal-XOR form of the
// polynomial x^W + POLY), and the new inputs are xor-ed into the low bits.
// At the end of a test the signature is compared with a signature computed
// for the fault-free circuit; `fail` is the registered result of that
// comparison, taken on a `check` pulse.
//
// Interface and timing: `clear` (synchronous) loads SEED; `en`/`din` are
// sampled on the rising edge; `check` samples signature != golden into
// `fail` on the rising edge, so `fail` is valid the cycle after `check`.
// Asynchronous active-low reset loads SEED and clears `fail`.
// The register width is the method's parameter (8, 16 and 32 bits are
// evaluated); the polynomials, seed and compare timing are this design's.
module misr
  import bpu_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned IN_W  = 1,
  parameter logic [W-1:0] POLY = W'(misr_poly(W)),
  parameter logic [W-1:0] SEED = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [IN_W-1:0] din,
  input  logic            check,
  input  logic [W-1:0]    golden,
  output logic [W-1:0]    signature,
  output logic            fail
);

  initial begin
    assert (IN_W <= W) else $error("misr: IN_W must not exceed W");
  end

  logic [W-1:0] next_sig;

  always_comb begin
    next_sig = {signature[W-2:0], 1'b0} ^ (signature[W-1] ? POLY : '0);
    next_sig[IN_W-1:0] = next_sig[IN_W-1:0] ^ din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      signature <= SEED;
      fail      <= 1'b0;
    end else begin
      if (clear)   signature <= SEED;
      else if (en) signature <= next_sig;
      if (check)   fail <= (signature != golden);
    end
  end

endmodule
