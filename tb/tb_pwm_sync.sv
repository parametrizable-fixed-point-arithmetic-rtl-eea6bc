// tb_pwm_sync -- self-checking testbench of the two-flop gate synchronizer.
// Drives random gate patterns between clock edges and checks that each
// output equals the input sampled exactly two rising edges earlier, that
// reset clears the stages, and that an isolated edge takes two cycles.
module tb_pwm_sync;
  logic clk;
  logic rst;
  logic [1:0] sw_async, sw_sync;
  int checks = 0, failures = 0;

  pwm_sync #(.N_SW(2), .STAGES(2)) dut (.clk, .rst, .sw_async, .sw_sync);

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] hist [3];  // hist[0]: sampled at the last edge
  int lat;

  initial begin
    rst = 1'b1; sw_async = 2'b11;
    repeat (3) @(posedge clk);
    #1;
    checks++; if (sw_sync !== 2'b00) begin failures++; $display("reset not cleared"); end
    rst = 1'b0;
    hist[0] = 2'b00; hist[1] = 2'b00; hist[2] = 2'b00;
    for (int i = 0; i < 1000; i++) begin
      sw_async = 2'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = sw_async;
      #1;
      if (i >= 2) begin
        checks++;
        if (sw_sync !== hist[1]) begin
          failures++;
          $display("cycle %0d: sw_sync=%b expected %b", i, sw_sync, hist[1]);
        end
      end
    end
    // isolated edge latency
    sw_async = 2'b00; repeat (4) @(posedge clk); #1;
    sw_async = 2'b01;
    lat = 0;
    do begin @(posedge clk); #1; lat++; end while (sw_sync != 2'b01 && lat < 10);
    checks++;
    if (lat != 2) begin failures++; $display("latency %0d, expected 2", lat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
