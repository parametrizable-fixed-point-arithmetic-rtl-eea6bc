// tb_scale_changer -- self-checking testbench of the run-time scale changer.
// Two instances are tested: 28 -> 28 bits (increment alignment) and
// 28 -> 14 bits (feedback truncation). The expected value is floor(x * 2^s)
// computed in a wide integer and clamped to the output range; the sat flag
// must be set exactly when clamping happened.
module tb_scale_changer;
  localparam int SW = 8;
  logic signed [27:0] x;
  logic signed [SW-1:0] s;
  logic signed [27:0] y28;
  logic signed [13:0] y14;
  logic sat28, sat14;
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_sat = 0;

  scale_changer #(.IN_W(28), .OUT_W(28), .SHIFT_W(SW)) dut28 (.in_val(x), .shift(s), .out_val(y28), .sat(sat28));
  scale_changer #(.IN_W(28), .OUT_W(14), .SHIFT_W(SW)) dut14 (.in_val(x), .shift(s), .out_val(y14), .sat(sat14));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: floor(x * 2^sh) clamped to ow bits
  task automatic ref_scale(input logic signed [27:0] xv, input int sh, input int ow,
                           output longint r, output bit st);
    logic signed [255:0] w, mx, mn;
    w = 256'(xv);
    if (sh >= 0) w = w <<< sh;
    else         w = w >>> (-sh);
    mx = (256'sd1 <<< (ow - 1)) - 1;
    mn = -(256'sd1 <<< (ow - 1));
    st = 1'b0;
    if (w > mx) begin w = mx; st = 1'b1; end
    if (w < mn) begin w = mn; st = 1'b1; end
    r = longint'(w);
  endtask

  task automatic check_one(input logic signed [27:0] xv, input int sh);
    longint r28, r14;
    bit s28, s14;
    x = xv; s = SW'(sh);
    #1;
    ref_scale(xv, sh, 28, r28, s28);
    ref_scale(xv, sh, 14, r14, s14);
    checks++;
    if (longint'(y28) != r28 || sat28 != s28 || longint'(y14) != r14 || sat14 != s14) begin
      failures++;
      if (failures < 10)
        $display("x=%0d s=%0d: y28=%0d(%0d) sat=%b(%b) y14=%0d(%0d) sat=%b(%b)",
                 xv, sh, y28, r28, sat28, s28, y14, r14, sat14, s14);
    end
    if (sh > 0) n_left++;
    if (sh < 0) n_right++;
    if (s28 || s14) n_sat++;
  endtask

  initial begin
    // corners
    for (int sh = -128; sh <= 127; sh++) begin
      check_one(28'sd0, sh);
      check_one(28'sd1, sh);
      check_one(-28'sd1, sh);
      check_one(28'h7FFFFFF, sh);
      check_one(28'sh8000000, sh);
      check_one(28'sd12345, sh);
      check_one(-28'sd12345, sh);
    end
    // random values, shifts concentrated where results are interesting
    for (int i = 0; i < 20000; i++) begin
      logic signed [27:0] xv;
      int sh;
      xv = 28'($urandom);
      if ($urandom_range(0, 1) != 0) xv = xv >>> $urandom_range(0, 27);
      sh = (i % 4 == 0) ? $urandom_range(0, 255) - 128 : $urandom_range(0, 60) - 30;
      check_one(xv, sh);
    end
    if (n_left == 0 || n_right == 0 || n_sat == 0) begin
      failures++; $display("coverage hole: left=%0d right=%0d sat=%0d", n_left, n_right, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
