// tb_pfp_mult -- self-checking testbench of the 14x14 signed multiplier.
// Checks the extreme operands and random pairs against a 64-bit product.
module tb_pfp_mult;
  logic signed [13:0] a, b;
  logic signed [27:0] p;
  int checks = 0, failures = 0;

  pfp_mult #(.A_W(14), .B_W(14)) dut (.a, .b, .p);

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int av, input int bv);
    longint e;
    a = 14'(av); b = 14'(bv);
    #1;
    e = longint'(av) * longint'(bv);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d, expected %0d", av, bv, p, e);
    end
  endtask

  initial begin
    automatic int corner [6] = '{-8192, -8191, -1, 0, 1, 8191};
    foreach (corner[i]) foreach (corner[j]) check_one(corner[i], corner[j]);
    for (int i = 0; i < 20000; i++)
      check_one($urandom_range(0, 16383) - 8192, $urandom_range(0, 16383) - 8192);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
