// pfp_pkg -- shared widths, types and helpers of the parametrizable
// fixed-point buck converter model.
//
// A parametrizable fixed-point number is a plain two's-complement integer
// whose binary point position ("scale" = number of fractional bits) is not
// fixed at synthesis time but held in a small run-time register. Operators
// see only integers; the scales are used by the scale changers that align
// operands before every addition.
//
// Widths follow the model schematic: 14-bit inputs, feedbacks and constants
// (sized for the FPGA DSP multipliers), 28-bit products and 28-bit state
// variables (27 magnitude bits plus sign). The 8-bit signed scale type and
// the saturating helpers are choices of this design.
package pfp_pkg;

  localparam int unsigned IN_W    = 14;  // inputs, feedback values, dt/L, dt/C
  localparam int unsigned PROD_W  = 28;  // multiplier products
  localparam int unsigned STATE_W = 28;  // state variables iL and vC
  localparam int unsigned SCALE_W = 8;   // signed scale / shift amount

  typedef logic signed [IN_W-1:0]    in_t;
  typedef logic signed [PROD_W-1:0]  prod_t;
  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [SCALE_W-1:0] scale_t;

  // Run-time scales of the model variables (fractional bit counts).
  typedef struct packed {
    scale_t v_in;    // vin, vC feedback and inductor voltage (14 bit)
    scale_t i_in;    // iL feedback and load current iR (14 bit)
    scale_t dt_l;    // constant dt/L (14 bit)
    scale_t dt_c;    // constant dt/C (14 bit)
    scale_t il_st;   // inductor current state (28 bit)
    scale_t vc_st;   // capacitor voltage state (28 bit)
  } scales_t;

  // Switch conduction state that selects the inductor voltage equation.
  typedef enum logic [1:0] {
    VL_HIGH = 2'd0,  // upper switch conducting: vL = vin - vC   (eq. 3)
    VL_LOW  = 2'd1,  // lower switch conducting: vL = -vC        (eq. 4)
    VL_ZERO = 2'd2   // both open with iL == 0: iL stays at zero
  } vl_mode_t;

  // Per-step event flags of the model, for monitoring.
  typedef struct packed {
    logic sat_inc_il;   // scale changer (a), inductor branch, clamped
    logic sat_fb_il;    // scale changer (b), iL feedback, clamped
    logic sat_inc_vc;   // scale changer (a), capacitor branch, clamped
    logic sat_fb_vc;    // scale changer (b), vC feedback, clamped
    logic sat_il;       // iL accumulator clamped at its limit
    logic sat_vc;       // vC accumulator clamped at its limit
    logic il_zero_stop; // iL stopped at zero in dead time
  } status_t;

  // Shift amount of a scale changer: target scale minus source scale, where
  // the source scale may be a sum of two scales (a product). Clamped to the
  // scale_t range; a shift that large empties or saturates the value anyway.
  function automatic scale_t shift_amt(input scale_t to, input scale_t from_a,
                                       input scale_t from_b);
    logic signed [SCALE_W+1:0] d;
    d = {{2{to[SCALE_W-1]}}, to} - {{2{from_a[SCALE_W-1]}}, from_a}
        - {{2{from_b[SCALE_W-1]}}, from_b};
    if (d > (SCALE_W+2)'(2**(SCALE_W-1) - 1)) return scale_t'(2**(SCALE_W-1) - 1);
    if (d < -(SCALE_W+2)'(2**(SCALE_W-1)))    return scale_t'(-(2**(SCALE_W-1)));
    return d[SCALE_W-1:0];
  endfunction

  // Saturating difference of two IN_W-bit numbers of equal scale.
  function automatic in_t sat_sub_in(input in_t a, input in_t b);
    logic signed [IN_W:0] d;
    d = {a[IN_W-1], a} - {b[IN_W-1], b};
    if (d[IN_W] != d[IN_W-1])
      return d[IN_W] ? {1'b1, {(IN_W-1){1'b0}}} : {1'b0, {(IN_W-1){1'b1}}};
    return d[IN_W-1:0];
  endfunction

  // Saturating negation (the most negative value maps to the most positive).
  function automatic in_t sat_neg_in(input in_t a);
    if (a == {1'b1, {(IN_W-1){1'b0}}})
      return {1'b0, {(IN_W-1){1'b1}}};
    return -a;
  endfunction

endpackage
