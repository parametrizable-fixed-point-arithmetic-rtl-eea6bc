// tb_buck_pfp_model -- end-to-end testbench of the buck converter model.
//
// Runs the complete model, at its default widths, through a sequence of
// scenarios and compares it every clock, bit for bit, with a reference
// written here from the converter equations: two-stage gate pipeline,
// inductor-voltage selection, floor(x * 2^shift) scale changes clamped to
// the target width, saturating 28-bit accumulation and the dead-time stop at
// zero. Mode and status flags are compared before each edge, the states
// after it.
//
// Scenarios: a realistic 60 V -> 5 V converter (scales of the base case)
// with PWM and dead time; a light load that drives the inductor current
// negative; a long dead time that lets the current decay and stop at zero;
// a run-time change of all scales (no reset); scales chosen to force every
// scale changer and both accumulators into saturation; random phases.
// Every mechanism is counted and must occur at least once.
module tb_buck_pfp_model;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // mechanism counters
  // ------------------------------------------------------------------
  int c_ic_sat;
  int c_high_sw1, c_low_sw2, c_dead_low, c_dead_high, c_zero, c_stop;
  int c_s_inc_il, c_s_fb_il, c_s_inc_vc, c_s_fb_vc, c_s_il, c_s_vc;
  int c_left, c_right, c_rescale, c_reload, c_lat;

  // ------------------------------------------------------------------
  // reference model
  // ------------------------------------------------------------------
  longint m_il, m_vc;
  bit [1:0] m_p0, m_p1;   // gate pipeline: p1 is what the equations use

  function automatic longint clampw(input longint v, input int w, output bit s);
    longint mx, mn;
    mx = (64'sd1 <<< (w - 1)) - 1;
    mn = -(64'sd1 <<< (w - 1));
    s = 1'b0;
    if (v > mx) begin s = 1'b1; return mx; end
    if (v < mn) begin s = 1'b1; return mn; end
    return v;
  endfunction

  function automatic int clamp_shift(input int v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  // floor(x * 2^sh) clamped to w bits
  function automatic longint rescale(input longint x, input int sh, input int w, output bit s);
    logic signed [255:0] t, mx, mn;
    t = 256'(x);
    if (sh >= 0) t = t <<< sh; else t = t >>> (-sh);
    mx = (256'sd1 <<< (w - 1)) - 1;
    mn = -(256'sd1 <<< (w - 1));
    s = 1'b0;
    if (t > mx) begin t = mx; s = 1'b1; end
    if (t < mn) begin t = mn; s = 1'b1; end
    return longint'(t);
  endfunction

  function automatic longint rnd_state();
    state_t t;
    t = state_t'($urandom);
    return longint'(t);
  endfunction

  // expected outputs of the current cycle
  longint e_il, e_vc, e_ilfb, e_vcfb;
  int     e_mode;
  bit     e_s_inc_il, e_s_fb_il, e_s_inc_vc, e_s_fb_vc, e_s_il, e_s_vc, e_stop;

  task automatic model_eval();
    longint vl, ic, pl, pc, incl, incc, sum;
    bit d;
    int sv, si, sdl, sdc, sil, svc;
    sv = int'(scales.v_in); si = int'(scales.i_in); sdl = int'(scales.dt_l);
    sdc = int'(scales.dt_c); sil = int'(scales.il_st); svc = int'(scales.vc_st);
    e_vcfb = rescale(m_vc, clamp_shift(sv - svc), 14, e_s_fb_vc);
    e_ilfb = rescale(m_il, clamp_shift(si - sil), 14, e_s_fb_il);
    if (m_p1[0])          e_mode = 0;
    else if (m_p1[1])     e_mode = 1;
    else if (m_il == 0)   e_mode = 2;
    else if (m_il < 0)    e_mode = 0;
    else                  e_mode = 1;
    case (e_mode)
      0: vl = clampw(longint'(vin) - e_vcfb, 14, d);
      1: vl = clampw(-e_vcfb, 14, d);
      default: vl = 0;
    endcase
    pl   = vl * longint'(dt_l);
    incl = rescale(pl, clamp_shift(sil - sv - sdl), 28, e_s_inc_il);
    sum  = m_il + incl;
    e_il = clampw(sum, 28, e_s_il);
    e_stop = 1'b0;
    if (m_p1 == 2'b00 && m_il != 0 && e_il != 0 && ((e_il < 0) != (m_il < 0))) begin
      e_il = 0; e_stop = 1'b1;
    end
    ic   = clampw(e_ilfb - longint'(ir), 14, d);
    if (d) c_ic_sat++;
    pc   = ic * longint'(dt_c);
    incc = rescale(pc, clamp_shift(svc - si - sdc), 28, e_s_inc_vc);
    e_vc = clampw(m_vc + incc, 28, e_s_vc);
  endtask


  // one simulation step: inputs are already applied
  task automatic step();
    bit [1:0] swin;
    #1;
    model_eval();
    checks++;
    if (int'(mode) != e_mode || longint'(il_fb) != e_ilfb || longint'(vc_fb) != e_vcfb ||
        status.sat_inc_il != e_s_inc_il || status.sat_fb_il != e_s_fb_il ||
        status.sat_inc_vc != e_s_inc_vc || status.sat_fb_vc != e_s_fb_vc ||
        status.sat_il != e_s_il || status.sat_vc != e_s_vc || status.il_zero_stop != e_stop) begin
      failures++;
      if (failures < 10)
        $display("t=%0t comb mismatch: mode %0d(%0d) ilfb %0d(%0d) vcfb %0d(%0d) status %b",
                 $time, mode, e_mode, il_fb, e_ilfb, vc_fb, e_vcfb, status);
    end
    // counters
    if (m_p1[0]) c_high_sw1++;
    else if (m_p1[1]) c_low_sw2++;
    else if (e_mode == 1) c_dead_low++;
    else if (e_mode == 0) c_dead_high++;
    else c_zero++;
    c_stop += int'(e_stop);
    c_s_inc_il += int'(e_s_inc_il); c_s_fb_il += int'(e_s_fb_il);
    c_s_inc_vc += int'(e_s_inc_vc); c_s_fb_vc += int'(e_s_fb_vc);
    c_s_il += int'(e_s_il); c_s_vc += int'(e_s_vc);
    if (int'(scales.il_st) - int'(scales.v_in) - int'(scales.dt_l) > 0) c_left++;
    else c_right++;
    swin = {sw2_in, sw1_in};
    @(posedge clk);
    #1;
    m_il = e_il; m_vc = e_vc;
    m_p1 = m_p0; m_p0 = swin;
    checks++;
    if (longint'(il) != m_il || longint'(vc) != m_vc) begin
      failures++;
      if (failures < 10)
        $display("t=%0t state mismatch: il %0d(%0d) vc %0d(%0d)", $time, il, m_il, vc, m_vc);
    end
  endtask

  task automatic do_reset(input longint il0, input longint vc0);
    rst = 1'b1; il_init = 28'(il0); vc_init = 28'(vc0);
    @(posedge clk); @(posedge clk); @(posedge clk);
    #1;
    rst = 1'b0;
    m_il = il0; m_vc = vc0; m_p0 = 2'b00; m_p1 = 2'b00;
    checks++;
    if (longint'(il) != il0 || longint'(vc) != vc0) begin
      failures++; $display("reset did not load the initial states");
    end
    c_reload++;
  endtask

  // PWM with dead time: period, on time of SW1, dead time (cycles)
  task automatic pwm(input int periods, input int per, input int ton, input int dead);
    for (int p = 0; p < periods; p++)
      for (int c = 0; c < per; c++) begin
        if (c < ton)                                 {sw2_in, sw1_in} = 2'b01;
        else if (c < ton + dead)                     {sw2_in, sw1_in} = 2'b00;
        else if (c < per - dead)                     {sw2_in, sw1_in} = 2'b10;
        else                                         {sw2_in, sw1_in} = 2'b00;
        step();
      end
  endtask

  task automatic base_case();
    // 60 V input, dt = 20 ns, L = 22 uH, C = 100 uF
    scales.v_in = 8'sd7;  scales.i_in = 8'sd10;
    scales.dt_l = 8'sd23; scales.dt_c = 8'sd25;
    scales.il_st = 8'sd23; scales.vc_st = 8'sd23;
    vin  = 14'sd7680;       // 60 V  * 2^7
    dt_l = 14'sd7626;       // 9.09e-4 * 2^23
    dt_c = 14'sd6711;       // 2.0e-4  * 2^25
  endtask

  initial begin
    int lat;
    sw1_in = 1'b0; sw2_in = 1'b0; rst = 1'b1;
    base_case();
    ir = 14'sd2048;        // 2 A * 2^10
    do_reset(longint'(2) <<< 23, longint'(4) <<< 23);   // iL = 2 A, vC = 4 V

    // gate-to-state latency: a single SW1 pulse changes iL three edges later
    {sw2_in, sw1_in} = 2'b10;
    repeat (4) step();
    begin
      longint il_before;
      il_before = m_il;
      {sw2_in, sw1_in} = 2'b01;
      lat = 0;
      // with SW2 on, iL falls; with SW1 on, it rises: find the first rise
      do begin
        longint prev;
        prev = longint'(il);
        step();
        lat++;
        if (longint'(il) > prev) break;
      end while (lat < 10);
      checks++;
      if (lat != 3) begin failures++; $display("gate latency %0d, expected 3", lat); end
      else c_lat++;
      if (il_before == 0) $display("note: zero start current");
    end

    // 1) realistic converter: 200 kHz (250 steps), duty 5/60, dead time 3
    pwm(40, 250, 21, 3);
    // 2) light load: the current goes negative, dead time with iL < 0
    ir = 14'sd0;
    pwm(40, 250, 21, 3);
    // 3) long dead time with no load current: iL decays and stops at zero
    ir = 14'sd200;
    do_reset(longint'(1) <<< 22, longint'(5) <<< 23);  // 0.5 A, 5 V
    {sw2_in, sw1_in} = 2'b00;
    repeat (3000) step();
    // 4) run-time rescale without reset: one more fractional bit everywhere
    pwm(2, 250, 21, 3);
    // (the host would load new constants together with new scales)
    scales.il_st = 8'sd24; scales.vc_st = 8'sd24;
    scales.dt_l  = 8'sd22; dt_l = 14'sd3813;        // 9.09e-4 * 2^22
    c_rescale++;
    pwm(4, 250, 21, 3);
    base_case();
    do_reset(longint'(2) <<< 23, longint'(4) <<< 23);
    // 5) saturation: too many fractional bits for the states and feedbacks
    scales.il_st = 8'sd27; scales.vc_st = 8'sd27; c_rescale++;
    pwm(20, 250, 125, 3);
    scales.i_in = 8'sd14; scales.v_in = 8'sd12;    // feedback overflows 14 bits
    scales.il_st = 8'sd60;                          // increment overflows 28 bits
    c_rescale++;
    pwm(4, 250, 125, 3);
    // 6) random phases: random scales, inputs, gates and durations
    for (int ph = 0; ph < 200; ph++) begin
      scales.v_in  = 8'($urandom_range(0, 16));
      scales.i_in  = 8'($urandom_range(0, 16));
      scales.dt_l  = 8'($urandom_range(10, 30));
      scales.dt_c  = 8'($urandom_range(10, 30));
      scales.il_st = 8'($urandom_range(10, 40));
      scales.vc_st = 8'($urandom_range(10, 40));
      vin  = 14'($urandom_range(0, 8191));
      ir   = 14'($urandom_range(0, 16383));
      dt_l = 14'($urandom_range(0, 8191));
      dt_c = 14'($urandom_range(0, 8191));
      c_rescale++;
      if (ph % 20 == 0)
        do_reset(rnd_state(), rnd_state());
      for (int c = 0; c < 200; c++) begin
        if (c % 10 == 0) {sw2_in, sw1_in} = 2'($urandom);
        step();
      end
    end

    // report and require every mechanism
    $display("SW1 on %0d, SW2 on %0d, dead time lower diode %0d, dead time upper diode %0d",
             c_high_sw1, c_low_sw2, c_dead_low, c_dead_high);
    $display("iL held at zero %0d, stopped at zero %0d", c_zero, c_stop);
    $display("saturation: inc_il %0d fb_il %0d inc_vc %0d fb_vc %0d il %0d vc %0d",
             c_s_inc_il, c_s_fb_il, c_s_inc_vc, c_s_fb_vc, c_s_il, c_s_vc);
    $display("load-current subtraction clamped %0d", c_ic_sat);
    $display("left shifts %0d, right shifts %0d, run-time rescales %0d, reloads %0d",
             c_left, c_right, c_rescale, c_reload);
    if (c_high_sw1 == 0 || c_low_sw2 == 0 || c_dead_low == 0 || c_dead_high == 0 ||
        c_zero == 0 || c_stop == 0 || c_s_inc_il == 0 || c_s_fb_il == 0 ||
        c_s_inc_vc == 0 || c_s_fb_vc == 0 || c_s_il == 0 || c_s_vc == 0 ||
        c_left == 0 || c_right == 0 || c_rescale == 0 || c_reload == 0 || c_lat == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
