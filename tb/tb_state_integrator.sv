// tb_state_integrator -- self-checking testbench of the Euler accumulator.
// Loads an initial value through reset, then adds random increments every
// clock and compares with a saturating 64-bit model, including the
// stop-at-zero behaviour when no_cross is set. Checks the one-clock latency.
module tb_state_integrator;
  localparam int W = 28;
  localparam longint MAXV = (64'sd1 <<< (W - 1)) - 1;
  localparam longint MINV = -(64'sd1 <<< (W - 1));
  logic clk;
  logic rst, no_cross, sat, zero_stop;
  logic signed [W-1:0] init, inc, state;
  int checks = 0, failures = 0;
  int n_sat = 0, n_stop = 0;
  longint m;

  state_integrator #(.W(W)) dut (.clk, .rst, .init, .inc, .no_cross, .state, .sat, .zero_stop);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nx; bit es, ez;
    rst = 1'b1; init = 28'sd1000; inc = 28'sd5; no_cross = 1'b0;
    @(posedge clk); #1;
    checks++; if (state != 28'sd1000) begin failures++; $display("init not loaded"); end
    rst = 1'b0; m = 1000;
    // latency: the increment shows after exactly one edge
    @(posedge clk); #1;
    checks++; if (state != 28'sd1005) begin failures++; $display("latency wrong"); end
    m = 1005;
    for (int i = 0; i < 50000; i++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (kind < 5)      inc = 28'($urandom_range(0, 2000)) - 28'sd1000;
      else if (kind < 8) inc = 28'($urandom) >>> $urandom_range(4, 12);
      else               inc = 28'($urandom);
      no_cross = ($urandom_range(0, 3) == 0);
      if (i % 5000 == 0) begin  // occasionally reload near a limit or near zero
        rst = 1'b1; init = (i % 10000 == 0) ? 28'sh7FFFF00 : 28'sd3;
      end else rst = 1'b0;
      #1;
      // expected
      if (rst) begin nx = longint'(init); es = 1'b0; ez = 1'b0; end
      else begin
        nx = m + longint'(inc);
        es = 1'b0; ez = 1'b0;
        if (nx > MAXV) begin nx = MAXV; es = 1'b1; end
        if (nx < MINV) begin nx = MINV; es = 1'b1; end
        if (no_cross && m != 0 && nx != 0 && ((nx < 0) != (m < 0))) begin nx = 0; ez = 1'b1; end
        checks++;
        if (sat != es || zero_stop != ez) begin
          failures++;
          if (failures < 10) $display("flags sat=%b(%b) stop=%b(%b)", sat, es, zero_stop, ez);
        end
      end
      n_sat += int'(es); n_stop += int'(ez);
      @(posedge clk); #1;
      m = nx;
      checks++;
      if (longint'(state) != m) begin
        failures++;
        if (failures < 10) $display("step %0d: state=%0d expected %0d", i, state, m);
      end
    end
    if (n_sat == 0 || n_stop == 0) begin
      failures++; $display("coverage hole sat=%0d stop=%0d", n_sat, n_stop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
