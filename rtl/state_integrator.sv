// state_integrator -- explicit-Euler accumulator for one state variable.
//
// Holds a 28-bit state (inductor current or capacitor voltage) and adds the
// already re-scaled increment every clock: x(k) = x(k-1) + dx(k-1). One
// clock is one simulation step. The addition saturates at the limits of
// the 28-bit format, the behaviour a fixed-point variable shows when a
// value exceeds its range.
//
// When `no_cross` is set and the step would carry the state across zero
// (from positive to negative or the reverse), the state stops at exactly
// zero. The model drives it during dead time, so the inductor current of a
// converter in discontinuous conduction settles at zero (the diodes block
// reverse current) instead of chattering around it. That stop, the
// synchronous reset that loads `init`, and the saturation are this
// design's choices.
//
// Interface: clk, rst (synchronous, loads init), init, inc, no_cross ->
// state, and the per-step flags sat (the sum was clamped) and zero_stop (the
// zero stop acted). Latency: the new state appears one clock after inc.
module state_integrator #(
  parameter int unsigned W = 28
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] init,
  input  logic signed [W-1:0] inc,
  input  logic                no_cross,
  output logic signed [W-1:0] state,
  output logic                sat,
  output logic                zero_stop
);

  localparam logic signed [W-1:0] MAX_V = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MIN_V = {1'b1, {(W-1){1'b0}}};

  logic signed [W:0]   sum;
  logic signed [W-1:0] next;

  always_comb begin
    sum       = {state[W-1], state} + {inc[W-1], inc};
    sat       = (sum[W] != sum[W-1]);
    zero_stop = 1'b0;
    if (sat)
      next = sum[W] ? MIN_V : MAX_V;
    else
      next = sum[W-1:0];
    if (no_cross && (state != '0) && (next != '0) && (next[W-1] != state[W-1])) begin
      next      = '0;
      zero_stop = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) state <= init;
    else     state <= next;
  end

endmodule
