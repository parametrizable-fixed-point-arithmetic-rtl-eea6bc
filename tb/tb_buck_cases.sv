// tb_buck_cases -- the three buck converter configurations run on the model
// and compared with a double-precision reference.
//
// For each case the testbench plays the role of the configuration software:
// it computes every scale with  scale = 13 - ceil(log2(max_value))  (13 =
// magnitude bits of a 14-bit signal) and the 14-bit constants dt/L and dt/C,
// loads them, and starts the converter at 80 % of its output voltage. The
// gates follow an open-loop PWM with duty Vout/Vin. A resistive load is
// modelled here: each step iR = vC_fb / R is quantized to the load-current
// scale. Alongside, the same explicit-Euler equations are integrated in
// `real` arithmetic, with the gate signals delayed by the same two cycles.
// The mean absolute error over the run, relative to the mean absolute
// reference value, must stay below a bound for iL and vC, and no
// saturation may occur. A last run repeats case 2 with the case-1 formats
// (as a fixed-format model would have) and must show the inductor current
// saturating: the failure mode that run-time scales remove.
//
// Simulation step 20 ns, one clock per step. Case lengths follow the
// settling times of the transients (about 1.2, 0.63 and 13 ms).
module tb_buck_cases;
  import pfp_pkg::*;

  logic clk, rst, sw1_in, sw2_in;
  in_t vin, ir, dt_l, dt_c, il_fb, vc_fb;
  scales_t scales;
  state_t il_init, vc_init, il, vc;
  vl_mode_t mode;
  status_t status;

  buck_pfp_model dut (.*);

  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (1400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real DT = 20.0e-9;

  // integer bits needed to hold |v| < 2^n, then the scale of eq. (5)
  function automatic int int_bits(input real max_value);
    return int'($floor($ln(max_value) / $ln(2.0))) + 1;
  endfunction

  function automatic int scale_of(input real max_value, input int mag_bits);
    return mag_bits - int_bits(max_value);
  endfunction

  function automatic real p2(input int e);
    return 2.0 ** e;
  endfunction

  // run one case; returns relative mean absolute errors (%) and saturations
  task automatic run_case(input string name, input real c_f, input real l_h,
                          input real v_in, input real v_out, input real r_load,
                          input real f_sw, input real t_run,
                          input int il_bits, input int vc_bits,  // integer bits of the states
                          input int start,                       // 0: 80 % transient, 1: from 0 V 0 A, 2: steady state
                          output real err_il, output real err_vc, output int n_sat,
                          output real il_peak);
    int sv, si, sdl, sdc, sil, svc, per, ton, steps;
    real r_il, r_vc, r_il_n, r_vc_n, vl_r, sum_e_il, sum_e_vc, sum_il, sum_vc;
    real il_dut, vc_dut;
    bit [1:0] g0, g1, gin;
    sil = 27 - il_bits;
    svc = 27 - vc_bits;
    sv  = scale_of(v_in, 13);
    si  = 13 - il_bits;
    sdl = scale_of(DT / l_h, 13);
    sdc = scale_of(DT / c_f, 13);
    scales.v_in = 8'(sv);   scales.i_in = 8'(si);
    scales.dt_l = 8'(sdl);  scales.dt_c = 8'(sdc);
    scales.il_st = 8'(sil); scales.vc_st = 8'(svc);
    vin  = in_t'($rtoi(v_in * p2(sv)));
    dt_l = in_t'($rtoi(DT / l_h * p2(sdl) + 0.5));
    dt_c = in_t'($rtoi(DT / c_f * p2(sdc) + 0.5));
    per  = $rtoi(1.0 / (f_sw * DT) + 0.5);
    ton  = $rtoi(per * v_out / v_in + 0.5);
    steps = $rtoi(t_run / DT);
    // start at 80 % of the output voltage with the full load current
    case (start)
      1:       begin r_vc = 0.0;         r_il = 0.0; end
      2:       begin r_vc = v_out;       r_il = v_out / r_load; end
      default: begin r_vc = 0.8 * v_out; r_il = v_out / r_load; end
    endcase
    il_init = state_t'($rtoi(r_il * p2(sil)));
    vc_init = state_t'($rtoi(r_vc * p2(svc)));
    r_il = real'(il_init) / p2(sil);
    r_vc = real'(vc_init) / p2(svc);
    $display("%s: scales v=%0d i=%0d dt/L=%0d dt/C=%0d iL=%0d vC=%0d; dt/L=%0d dt/C=%0d; period %0d ton %0d; %0d steps",
             name, sv, si, sdl, sdc, sil, svc, dt_l, dt_c, per, ton, steps);
    rst = 1'b1; {sw2_in, sw1_in} = 2'b00; ir = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    g0 = 2'b00; g1 = 2'b00;
    sum_e_il = 0.0; sum_e_vc = 0.0; sum_il = 0.0; sum_vc = 0.0; n_sat = 0; il_peak = 0.0;
    for (int k = 0; k < steps; k++) begin
      gin = ((k % per) < ton) ? 2'b01 : 2'b10;
      {sw2_in, sw1_in} = gin;
      // resistive load, quantized to the load-current scale
      ir = in_t'($floor(real'(vc_fb) / p2(sv) / r_load * p2(si)));
      #1;
      n_sat += int'(status != '0);
      // reference step with the gate state the model sees (two cycles late)
      if (g1[0])      vl_r = v_in - r_vc;
      else if (g1[1]) vl_r = -r_vc;
      else            vl_r = (r_il > 0.0) ? -r_vc : v_in - r_vc;
      r_il_n = r_il + DT / l_h * vl_r;
      r_vc_n = r_vc + DT / c_f * (r_il - r_vc / r_load);
      r_il = r_il_n; r_vc = r_vc_n;
      g1 = g0; g0 = gin;
      @(posedge clk);
      #1;
      il_dut = real'(il) / p2(sil);
      vc_dut = real'(vc) / p2(svc);
      if (il_dut > il_peak) il_peak = il_dut;
      sum_e_il += (il_dut > r_il) ? il_dut - r_il : r_il - il_dut;
      sum_e_vc += (vc_dut > r_vc) ? vc_dut - r_vc : r_vc - vc_dut;
      sum_il += (r_il > 0.0) ? r_il : -r_il;
      sum_vc += (r_vc > 0.0) ? r_vc : -r_vc;
    end
    err_il = 100.0 * sum_e_il / sum_il;
    err_vc = 100.0 * sum_e_vc / sum_vc;
    $display("%s: mean abs error iL %0.4f %%, vC %0.4f %%, final iL %0.4f A (ref %0.4f), vC %0.4f V (ref %0.4f), peak iL %0.3f A, saturated steps %0d",
             name, err_il, err_vc, real'(il) / p2(sil), r_il, real'(vc) / p2(svc), r_vc, il_peak, n_sat);
  endtask

  task automatic expect_case(input string name, input real e_il, input real e_vc,
                             input int n_sat, input real b_il, input real b_vc);
    checks++;
    if (e_il > b_il || e_vc > b_vc || n_sat != 0) begin
      failures++;
      $display("%s: error above %0.3f %% / %0.3f %% or saturation", name, b_il, b_vc);
    end
  endtask

  initial begin
    real e_il, e_vc, pk, e3_il;
    int ns;
    // case: C, L, Vin, Vout, R, Fsw, length, integer bits of the states
    run_case("case 1", 100.0e-6, 22.0e-6, 60.0, 5.0, 2.5, 200.0e3, 1.2e-3, 4, 4, 0, e_il, e_vc, ns, pk);
    expect_case("case 1", e_il, e_vc, ns, 0.658, 0.304);
    run_case("case 2", 150.0e-6, 100.0e-6, 16.0, 12.0, 1.0, 200.0e3, 0.63e-3, 5, 5, 0, e_il, e_vc, ns, pk);
    expect_case("case 2", e_il, e_vc, ns, 0.035, 0.015);
    run_case("case 3", 100.0e-6, 10.0e-6, 3.3, 2.7, 36.45, 600.0e3, 13.2e-3, 1, 2, 0, e_il, e_vc, ns, pk);
    expect_case("case 3", e_il, e_vc, ns, 1.360, 0.069);
    // the same cases started in steady state
    run_case("case 1 steady", 100.0e-6, 22.0e-6, 60.0, 5.0, 2.5, 200.0e3, 1.0e-3, 4, 4, 2, e_il, e_vc, ns, pk);
    expect_case("case 1 steady", e_il, e_vc, ns, 0.636, 0.410);
    run_case("case 2 steady", 150.0e-6, 100.0e-6, 16.0, 12.0, 1.0, 200.0e3, 1.0e-3, 5, 5, 2, e_il, e_vc, ns, pk);
    expect_case("case 2 steady", e_il, e_vc, ns, 0.023, 0.014);
    run_case("case 3 steady", 100.0e-6, 10.0e-6, 3.3, 2.7, 36.45, 600.0e3, 1.0e-3, 1, 2, 2, e_il, e_vc, ns, pk);
    expect_case("case 3 steady", e_il, e_vc, ns, 1.745, 0.021);
    e3_il = e_il;
    // case 3 in the case-1 formats: fewer fractional bits, larger current error
    run_case("case 3 steady, case-1 formats", 100.0e-6, 10.0e-6, 3.3, 2.7, 36.45, 600.0e3, 1.0e-3,
             4, 4, 2, e_il, e_vc, ns, pk);
    checks++;
    if (e_il < 2.0 * e3_il) begin
      failures++; $display("case-1 formats did not lose accuracy on case 3");
    end
    // case 2 started from zero: the inductor current overshoots past 16 A.
    // With the case-2 formats it fits; forced into the case-1 formats (four
    // integer bits, as a fixed-format model built for case 1 would have) it
    // must saturate and the error must grow.
    run_case("case 2 start-up", 150.0e-6, 100.0e-6, 16.0, 12.0, 1.0, 200.0e3, 0.63e-3, 5, 5, 1,
             e_il, e_vc, ns, pk);
    checks++;
    if (pk < 16.0) begin failures++; $display("start-up current stayed below 16 A"); end
    expect_case("case 2 start-up", e_il, e_vc, ns, 0.035, 0.015);
    run_case("case 2 start-up, case-1 formats", 150.0e-6, 100.0e-6, 16.0, 12.0, 1.0, 200.0e3, 0.63e-3,
             4, 4, 1, e_il, e_vc, ns, pk);
    checks++;
    if (ns == 0 || e_il < 1.0) begin
      failures++;
      $display("fixed-format run did not saturate as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
