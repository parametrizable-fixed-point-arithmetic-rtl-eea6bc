// pfp_mult -- signed integer multiplier of the model.
//
// Multiplies a 14-bit signal (inductor voltage or capacitor current) by a
// 14-bit constant (dt/L or dt/C) and returns the full 28-bit product. The
// operands are plain signed integers; their scales simply add, so the
// product carries the scale "signal scale + constant scale" and no
// alignment is needed. The 14x14 size is chosen so that the product maps
// onto one FPGA DSP multiplier and cannot overflow (A_W + B_W bits hold
// every product of two signed numbers).
//
// Interface: a (A_W bits), b (B_W bits) -> p (A_W + B_W bits), all signed.
// Purely combinational: the model is not pipelined, so the whole
// update path settles within one clock period.
module pfp_mult #(
  parameter int unsigned A_W = 14,
  parameter int unsigned B_W = 14
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  always_comb p = (A_W+B_W)'(a) * (A_W+B_W)'(b);

endmodule
