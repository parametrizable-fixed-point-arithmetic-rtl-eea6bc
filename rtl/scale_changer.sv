// scale_changer -- run-time scale (binary point) converter.
//
// Moves a signed fixed-point value from one scale to another, where the scale
// is the number of fractional bits. A positive SHIFT adds fractional bits
// (shift left), a negative SHIFT removes them (arithmetic shift right, which
// truncates toward minus infinity). Because the amount is an input, the
// binary point of a variable can be moved without re-synthesis; this is the
// mechanism that turns plain fixed-point into parametrizable fixed-point.
//
// Structure: a logarithmic barrel shifter, one multiplexer stage per bit of
// the shift amount, each stage choosing between its input and a static
// shift by 2^k. This follows the description of the scale changers as
// barrel shifters built from multiplexers and static shifters. Saturation is
// this design's choice: a left shift that would lose significant bits, or a
// result that does not fit in OUT_W bits (the 28-to-14-bit feedback
// changers), clamps to the largest value of the input's sign and raises
// `sat`.
//
// Interface: in_val (IN_W bits, signed), shift (SHIFT_W bits, signed) ->
// out_val (OUT_W bits, signed), sat. Purely combinational, no latency.
module scale_changer #(
  parameter int unsigned IN_W    = 28,
  parameter int unsigned OUT_W   = 28,
  parameter int unsigned SHIFT_W = 8
) (
  input  logic signed [IN_W-1:0]    in_val,
  input  logic signed [SHIFT_W-1:0] shift,
  output logic signed [OUT_W-1:0]   out_val,
  output logic                      sat
);

  localparam int unsigned W = (IN_W > OUT_W) ? IN_W : OUT_W;

  logic               left;
  logic [SHIFT_W-1:0] amt;
  logic signed [W-1:0] v;
  logic               ovf;
  logic signed [W-1:0] top;          // bits above the kept range, sign-extended

  localparam logic signed [W-1:0] ZERO = '0;
  localparam logic signed [W-1:0] ONES = '1;

  always_comb begin
    left = !shift[SHIFT_W-1];
    amt  = left ? shift : -shift;   // magnitude; -(-2^(N-1)) wraps to 2^(N-1) unsigned
    v    = W'(in_val);              // sign-extend into the working width
    ovf  = 1'b0;
    top  = ZERO;
    for (int k = 0; k < SHIFT_W; k++) begin
      if (amt[k]) begin
        if (left) begin
          if ((1 << k) >= W) begin
            ovf = ovf | (v != '0);
            v   = '0;
          end else begin
            // bits pushed out plus the new sign bit must all equal the sign
            top = v >>> (W - 1 - (1 << k));
            if ((top != ZERO) && (top != ONES))
              ovf = 1'b1;
            v = v <<< (1 << k);
          end
        end else if ((1 << k) >= W) begin
          v = {W{v[W-1]}};            // everything shifted out: sign remains
        end else begin
          v = v >>> (1 << k);
        end
      end
    end
    // narrowing to the output width
    if (W > OUT_W) begin
      top = v >>> (OUT_W - 1);
      if ((top != ZERO) && (top != ONES))
        ovf = 1'b1;
    end
    sat = ovf;
    if (ovf)
      out_val = in_val[IN_W-1] ? {1'b1, {(OUT_W-1){1'b0}}} : {1'b0, {(OUT_W-1){1'b1}}};
    else
      out_val = v[OUT_W-1:0];
  end

endmodule
