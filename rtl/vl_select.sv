// vl_select -- inductor voltage selection of the buck converter model.
//
// Forms the voltage across the inductor from the input voltage, the fed-back
// capacitor voltage and the switch state:
//   upper switch closed           : vL = vin - vC   (eq. 3)
//   lower switch closed           : vL = -vC        (eq. 4)
//   both open (dead time), iL > 0 : vL = -vC        (lower diode conducts)
//   both open, iL < 0             : vL = vin - vC   (upper diode conducts)
//   both open, iL == 0            : vL = 0, the inductor current stays zero
// The subtractor and the multiplexer match the front of the model
// schematic. All three voltages are 14-bit values at the same run-time
// scale (the input-voltage scale), so no alignment is needed. Saturating
// subtraction and negation, and giving the upper switch priority if both
// gates are driven at once, are this design's choices.
//
// Interface: vin, vc_fb (14-bit signed), sw1, sw2, il_neg, il_zero (sign and
// zero flags of the inductor current state) -> vl (14-bit signed), mode.
// Purely combinational.
module vl_select
  import pfp_pkg::*;
(
  input  in_t      vin,
  input  in_t      vc_fb,
  input  logic     sw1,
  input  logic     sw2,
  input  logic     il_neg,
  input  logic     il_zero,
  output in_t      vl,
  output vl_mode_t mode
);

  always_comb begin
    if (sw1)
      mode = VL_HIGH;
    else if (sw2)
      mode = VL_LOW;
    else if (il_zero)
      mode = VL_ZERO;
    else if (il_neg)
      mode = VL_HIGH;
    else
      mode = VL_LOW;

    unique case (mode)
      VL_HIGH: vl = sat_sub_in(vin, vc_fb);
      VL_LOW:  vl = sat_neg_in(vc_fb);
      default: vl = '0;
    endcase
  end

endmodule
