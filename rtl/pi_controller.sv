// Discrete proportional-integral controller, updated once per sample.
//
// On each sample strobe the error e = setpoint - measured is added to an
// integral, which is clamped to +/-I_MAX so that it cannot wind up past
// the point where it alone drives the output to its limit. The output is
//     out = clamp((KP*e + KI*integral) >>> SHIFT, 0, OUT_MAX)
// i.e. gains KP/2^SHIFT and KI/2^SHIFT per sample. In the speed loop the
// setpoint and measurement are in rpm and the output is the frequency word
// of the PWM core (327 = 50 Hz). That the loop is PI comes from the source;
// it tuned its gains by the Ziegler-Nichols method without giving them, so
// KP, KI, SHIFT, the output range and the anti-wind-up clamp are this
// design's own.
//
// Interface: clk, rst_n (synchronous, active low), sample (strobe),
// setpoint and measured (signed 16 bit). out (16 bit, unsigned, 0..OUT_MAX),
// sat_hi/sat_lo flag an output held at a limit, int_sat an integral at its
// clamp.
// Timing: out is registered; it takes the new value on the clock edge that
// samples the strobe.
module pi_controller #(
  parameter int KP      = 32,
  parameter int KI      = 8,
  parameter int SHIFT   = 8,
  parameter int OUT_MAX = 436
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sample,
  input  logic signed [15:0] setpoint,
  input  logic signed [15:0] measured,
  output logic        [15:0] out,
  output logic               sat_hi,
  output logic               sat_lo,
  output logic               int_sat
);

  // integral large enough for the integral term alone to reach OUT_MAX
  localparam int I_MAX = ((OUT_MAX << SHIFT) + KI - 1) / KI;

  initial begin
    assert (KI > 0 && OUT_MAX > 0 && OUT_MAX < 65536)
      else $error("pi_controller: KI and OUT_MAX must be positive and fit 16 bits");
  end

  logic signed [31:0] integ;
  logic signed [31:0] err, integ_sum, integ_next, u;

  always_comb begin
    err        = 32'(setpoint) - 32'(measured);
    integ_sum  = integ + err;
    if (integ_sum > I_MAX)       integ_next = I_MAX;
    else if (integ_sum < -I_MAX) integ_next = -I_MAX;
    else                         integ_next = integ_sum;
    u = (KP * err + KI * integ_next) >>> SHIFT;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ   <= '0;
      out     <= '0;
      sat_hi  <= 1'b0;
      sat_lo  <= 1'b0;
      int_sat <= 1'b0;
    end else if (sample) begin
      integ   <= integ_next;
      int_sat <= (integ_next == I_MAX) || (integ_next == -I_MAX);
      sat_hi  <= (u > OUT_MAX);
      sat_lo  <= (u < 0);
      if (u > OUT_MAX)  out <= 16'(OUT_MAX);
      else if (u < 0)   out <= '0;
      else              out <= 16'(u);
    end
  end

endmodule
