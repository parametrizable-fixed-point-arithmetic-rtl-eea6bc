// tb_vl_select -- self-checking testbench of the inductor voltage selector.
// Every switch state and iL sign/zero combination is driven with random and
// extreme voltages; the expected vL and mode come from the converter
// equations written out here independently (with 14-bit saturation).
module tb_vl_select;
  import pfp_pkg::*;
  in_t vin, vc_fb, vl;
  logic sw1, sw2, il_neg, il_zero;
  vl_mode_t mode;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  vl_select dut (.vin, .vc_fb, .sw1, .sw2, .il_neg, .il_zero, .vl, .mode);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp14(input int v);
    if (v > 8191) return 8191;
    if (v < -8192) return -8192;
    return v;
  endfunction

  task automatic check_one(input int vi, input int vc, input bit s1, input bit s2,
                           input int il_sign);  // il_sign: -1, 0, +1
    int e; int em;
    vin = 14'(vi); vc_fb = 14'(vc); sw1 = s1; sw2 = s2;
    il_neg = (il_sign < 0); il_zero = (il_sign == 0);
    #1;
    if (s1)                em = 0;        // upper switch: eq. 3
    else if (s2)           em = 1;        // lower switch: eq. 4
    else if (il_sign > 0)  em = 1;        // dead time, freewheeling through lower diode
    else if (il_sign < 0)  em = 0;        // dead time, reverse current through upper diode
    else                   em = 2;        // discontinuous: iL stays zero
    case (em)
      0: e = clamp14(vi - vc);
      1: e = clamp14(-vc);
      default: e = 0;
    endcase
    checks++;
    seen[em]++;
    if (int'(vl) != e || int'(mode) != em) begin
      failures++;
      if (failures < 10)
        $display("vin=%0d vc=%0d sw=%b%b il=%0d: vl=%0d(%0d) mode=%0d(%0d)",
                 vi, vc, s1, s2, il_sign, vl, e, mode, em);
    end
  endtask

  initial begin
    automatic int vals [5] = '{-8192, -1, 0, 1, 8191};
    foreach (vals[i]) foreach (vals[j])
      for (int s = 0; s < 4; s++)
        for (int z = -1; z <= 1; z++) check_one(vals[i], vals[j], s[0], s[1], z);
    for (int i = 0; i < 5000; i++)
      check_one($urandom_range(0, 16383) - 8192, $urandom_range(0, 16383) - 8192,
                1'($urandom), 1'($urandom), $urandom_range(0, 2) - 1);
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
      failures++; $display("a mode never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
