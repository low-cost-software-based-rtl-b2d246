// ghr: Global History Register of the gshare predictor.
//
// Holds the directions of the last GHR_W resolved branches, the newest in
// bit 0. On every clock edge with shift_en high the register shifts left by
// one and takes `taken` into the least significant bit, so the register
// behaves like a shift register whose serial input the program controls
// through its branch outcomes. That is what lets a test program drive it as
// a software-modelled LFSR with feedback into the least significant bit.
//
// Interface: shift_en/taken are sampled on the rising clock edge; `value`
// is the registered history (visible the cycle after the shift).
// Reset (asynchronous, active low) clears the history to zero; the reset
// value is this design's choice.
module ghr #(
  parameter int unsigned GHR_W = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             taken,
  output logic [GHR_W-1:0] value
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        value <= '0;
    else if (shift_en) value <= {value[GHR_W-2:0], taken};
  end

endmodule
