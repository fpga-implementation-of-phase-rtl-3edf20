// Closed-loop speed controller for an induction motor fed by a three-phase,
// seven-level Z-source cascaded H-bridge inverter.
//
// The encoder on the motor shaft is decoded into a speed in rpm every
// 30 ms. A PI controller compares it with the speed set-point and sets the
// frequency word of the phase-shifted carrier PWM core, which produces the
// 36 gate signals (12 per phase: three H-bridges of four switches). The
// reference amplitude is an input. The chain encoder -> PI -> PWM follows
// the source; that the PI output sets the frequency (rather than the
// amplitude) is this design's own choice, since the motor speed follows the
// supply frequency.
//
// Interface: clk (20 MHz), rst_n (synchronous, active low), speed_ref_rpm
// (signed), amplitude (carrier counts, 1000 = full span), enc_a/enc_b from
// the encoder. Outputs: pwm[35:0] to the gate drivers (pwm[0] = PWM1),
// and for monitoring speed_rpm with speed_valid, freq_word, the PI limit
// flags, the 10 kHz sample_tick, the six carriers and the three references.
// Timing: the frequency word changes one clock after each speed_valid; the
// PWM core picks it up at its next 10 kHz sample.
module speed_ctrl_top
  import pspwm_pkg::*;
#(
  parameter int unsigned WINDOW_CYCLES = 600000,
  parameter int          KP            = 32,
  parameter int          KI            = 8,
  parameter int          SHIFT         = 8,
  parameter int          FREQ_MAX      = 436
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [15:0] speed_ref_rpm,
  input  logic        [11:0] amplitude,
  input  logic               enc_a,
  input  logic               enc_b,
  output logic    [NPWM-1:0] pwm,
  output logic signed [15:0] speed_rpm,
  output logic               speed_valid,
  output logic        [15:0] freq_word,
  output logic               freq_sat_hi,
  output logic               freq_sat_lo,
  output logic               pi_int_sat,
  output logic               sample_tick,
  output car_bus_t           car,
  output carrier_t           ref_r,
  output carrier_t           ref_y,
  output carrier_t           ref_b
);

  qep_speed #(
    .WINDOW_CYCLES(WINDOW_CYCLES)
  ) u_qep (
    .clk  (clk),
    .rst_n(rst_n),
    .enc_a(enc_a),
    .enc_b(enc_b),
    .speed(speed_rpm),
    .valid(speed_valid)
  );

  pi_controller #(
    .KP     (KP),
    .KI     (KI),
    .SHIFT  (SHIFT),
    .OUT_MAX(FREQ_MAX)
  ) u_pi (
    .clk     (clk),
    .rst_n   (rst_n),
    .sample  (speed_valid),
    .setpoint(speed_ref_rpm),
    .measured(speed_rpm),
    .out     (freq_word),
    .sat_hi  (freq_sat_hi),
    .sat_lo  (freq_sat_lo),
    .int_sat (pi_int_sat)
  );

  carrier_t carrier11;   // the sampling module's own up/down count, not used here

  pspwm_core u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .freq_word  (freq_word),
    .amplitude  (amplitude),
    .pwm        (pwm),
    .car        (car),
    .ref_r      (ref_r),
    .ref_y      (ref_y),
    .ref_b      (ref_b),
    .carrier11  (carrier11),
    .sample_tick(sample_tick)
  );

endmodule
