// pwm_sync -- input synchronizer for the converter gate signals.
//
// The switch commands (SW1 upper, SW2 lower) come from the controller under
// test, asynchronously to the model clock. Each one is registered twice
// before the model uses it, the usual two-flop synchronizer, which adds a
// fixed latency of STAGES clock cycles (two by default, as the model
// description states). The synchronous, active-high reset that clears the
// stages to "switch open" is this design's choice.
//
// Interface: sw_async[N_SW-1:0] in, sw_sync[N_SW-1:0] out.
// Timing: sw_sync(t) = sw_async sampled at the rising edge STAGES cycles
// earlier.
module pwm_sync #(
  parameter int unsigned N_SW   = 2,
  parameter int unsigned STAGES = 2
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [N_SW-1:0] sw_async,
  output logic [N_SW-1:0] sw_sync
);

  logic [STAGES-1:0][N_SW-1:0] stage_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      stage_q <= '0;
    end else begin
      stage_q[0] <= sw_async;
      for (int s = 1; s < STAGES; s++) stage_q[s] <= stage_q[s-1];
    end
  end

  assign sw_sync = stage_q[STAGES-1];

endmodule
