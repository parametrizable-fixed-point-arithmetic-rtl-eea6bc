// buck_pfp_model -- real-time buck converter model in parametrizable
// fixed-point arithmetic.
//
// The model integrates the two state variables of a buck converter, the
// inductor current iL and the capacitor voltage vC, with explicit Euler:
//   iL(k) = iL(k-1) + dt/L * vL(k-1)
//   vC(k) = vC(k-1) + dt/C * (iL(k-1) - iR(k-1))
// where vL is vin - vC or -vC depending on which switch conducts. One clock
// cycle is one simulation step; nothing is pipelined, since each step needs
// the result of the previous one.
//
// Every operator works on plain signed integers. The binary point of each
// variable is a run-time "scale" (number of fractional bits) supplied in
// `scales`, and four scale changers (barrel shifters) align values where an
// addition needs equal scales:
//   (a) inductor branch: product (scale v_in + dt_l) -> iL state scale
//   (a) capacitor branch: product (scale i_in + dt_c) -> vC state scale
//   (b) iL state (28 bit) -> 14-bit feedback at the load-current scale
//   (b) vC state (28 bit) -> 14-bit feedback at the input-voltage scale
// The accumulators keep full 28-bit resolution for the tiny per-step
// increments; the feedbacks are truncated to 14 bits, since only the size
// of iL and vC matters once they are multiplied again by dt/L or dt/C.
// Changing the converter (L, C, voltages, currents) only means loading new
// constants and scales; the circuit stays the same.
//
// Datapath and widths (14-bit inputs and constants, 28-bit products and
// states, two-flop gate synchronizers) follow the model schematic. This
// design's own choices: the scales enter as 8-bit signed values and the
// shift amounts are computed here as differences of scales; the dead-time
// zero-current case stops iL at zero when a step would cross zero;
// saturation in the changers and accumulators; synchronous reset loads
// il_init and vc_init; the status flags.
//
// Interface: sw1_in/sw2_in asynchronous gate commands; vin (scale v_in) and
// ir (scale i_in) 14-bit inputs; dt_l and dt_c 14-bit constants (scales
// dt_l, dt_c); il, vc 28-bit states; il_fb, vc_fb 14-bit feedback values.
// Timing: a gate change reaches the equations after 2 clocks (synchronizer)
// and the states one clock later.
module buck_pfp_model
  import pfp_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     sw1_in,
  input  logic     sw2_in,
  input  in_t      vin,
  input  in_t      ir,
  input  in_t      dt_l,
  input  in_t      dt_c,
  input  scales_t  scales,
  input  state_t   il_init,
  input  state_t   vc_init,
  output state_t   il,
  output state_t   vc,
  output in_t      il_fb,
  output in_t      vc_fb,
  output vl_mode_t mode,
  output status_t  status
);

  // ---------------- gate synchronizer ----------------
  logic [1:0] sw;
  pwm_sync #(.N_SW(2), .STAGES(2)) u_sync (
    .clk, .rst, .sw_async({sw2_in, sw1_in}), .sw_sync(sw)
  );

  // ---------------- shift amounts from the run-time scales ----------------
  scale_t sh_inc_il, sh_fb_il, sh_inc_vc, sh_fb_vc;
  always_comb begin
    sh_inc_il = shift_amt(scales.il_st, scales.v_in, scales.dt_l);
    sh_inc_vc = shift_amt(scales.vc_st, scales.i_in, scales.dt_c);
    sh_fb_il  = shift_amt(scales.i_in, scales.il_st, '0);
    sh_fb_vc  = shift_amt(scales.v_in, scales.vc_st, '0);
  end

  // ---------------- inductor branch ----------------
  in_t    vl;
  prod_t  prod_il;
  state_t inc_il;

  vl_select u_vl (
    .vin, .vc_fb, .sw1(sw[0]), .sw2(sw[1]),
    .il_neg(il[STATE_W-1]), .il_zero(il == '0),
    .vl, .mode
  );

  pfp_mult #(.A_W(IN_W), .B_W(IN_W)) u_mult_l (.a(vl), .b(dt_l), .p(prod_il));

  scale_changer #(.IN_W(PROD_W), .OUT_W(STATE_W), .SHIFT_W(SCALE_W)) u_sc_inc_il (
    .in_val(prod_il), .shift(sh_inc_il), .out_val(inc_il), .sat(status.sat_inc_il)
  );

  state_integrator #(.W(STATE_W)) u_il (
    .clk, .rst, .init(il_init), .inc(inc_il),
    .no_cross(sw == 2'b00),
    .state(il), .sat(status.sat_il), .zero_stop(status.il_zero_stop)
  );

  scale_changer #(.IN_W(STATE_W), .OUT_W(IN_W), .SHIFT_W(SCALE_W)) u_sc_fb_il (
    .in_val(il), .shift(sh_fb_il), .out_val(il_fb), .sat(status.sat_fb_il)
  );

  // ---------------- capacitor branch ----------------
  in_t    ic;
  prod_t  prod_vc;
  state_t inc_vc;
  logic   unused_vc_stop;

  always_comb ic = sat_sub_in(il_fb, ir);

  pfp_mult #(.A_W(IN_W), .B_W(IN_W)) u_mult_c (.a(ic), .b(dt_c), .p(prod_vc));

  scale_changer #(.IN_W(PROD_W), .OUT_W(STATE_W), .SHIFT_W(SCALE_W)) u_sc_inc_vc (
    .in_val(prod_vc), .shift(sh_inc_vc), .out_val(inc_vc), .sat(status.sat_inc_vc)
  );

  state_integrator #(.W(STATE_W)) u_vc (
    .clk, .rst, .init(vc_init), .inc(inc_vc),
    .no_cross(1'b0),
    .state(vc), .sat(status.sat_vc), .zero_stop(unused_vc_stop)
  );

  scale_changer #(.IN_W(STATE_W), .OUT_W(IN_W), .SHIFT_W(SCALE_W)) u_sc_fb_vc (
    .in_val(vc), .shift(sh_fb_vc), .out_val(vc_fb), .sat(status.sat_fb_vc)
  );

endmodule
