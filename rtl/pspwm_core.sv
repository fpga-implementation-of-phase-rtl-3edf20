// Phase-shifted carrier PWM core for a three-phase, seven-level cascaded
// H-bridge inverter: 6 carriers x 3 phases x 2 = 36 gate signals.
//
// Three parts run from the one clock. Carrier frequency sampling turns the
// frequency word and amplitude into three sine references, 120 degrees
// apart and updated at the 10 kHz carrier rate; its outputs are held in
// registers. Reference carrier generation produces six triangle carriers,
// three shifted by 0, 333 and 666 clocks of the 2000-clock period and three
// more mirrored about 1000. Phase comparison compares every carrier with
// every reference and gives a dead-banded complementary pair for each. This
// partition, its signal names and all numbers follow the architecture
// described for the controller; port widths are this design's own.
//
// Interface: clk (20 MHz), rst_n (synchronous, active low), freq_word
// (phase step per carrier period, 327 = 50 Hz), amplitude (reference
// amplitude in carrier counts; 1000 fills the carrier span, larger values
// saturate). Outputs: pwm[35:0] (pwm[0] = PWM1), and for observation the
// carriers car[0..5], the references ref_*, the sampling module's own
// up/down count carrier11 and sample_tick.
// Timing: pwm is registered and lags the carriers and references by one
// clock.
module pspwm_core
  import pspwm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 1000,
  parameter int unsigned DEAD_BAND   = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [15:0]     freq_word,
  input  logic [11:0]     amplitude,
  output logic [NPWM-1:0] pwm,
  output car_bus_t        car,
  output carrier_t        ref_r,
  output carrier_t        ref_y,
  output carrier_t        ref_b,
  output carrier_t        carrier11,
  output logic            sample_tick
);

  carrier_sampling #(
    .PERIOD (2 * HALF_PERIOD),
    .REF_OFFSET(HALF_PERIOD),
    .REF_MAX(2 * HALF_PERIOD)
  ) u_sampling (
    .clk        (clk),
    .rst_n      (rst_n),
    .freq_word  (freq_word),
    .amplitude  (amplitude),
    .ref_r      (ref_r),
    .ref_y      (ref_y),
    .ref_b      (ref_b),
    .carrier11  (carrier11),
    .sample_tick(sample_tick)
  );

  reference_carrier_gen #(
    .HALF_PERIOD(HALF_PERIOD),
    .SHIFT      ((2 * HALF_PERIOD) / 6)
  ) u_cargen (
    .clk  (clk),
    .rst_n(rst_n),
    .car  (car)
  );

  phase_comparison #(
    .DEAD_BAND(DEAD_BAND)
  ) u_compare (
    .clk  (clk),
    .rst_n(rst_n),
    .car  (car),
    .ref_r(ref_r),
    .ref_y(ref_y),
    .ref_b(ref_b),
    .pwm  (pwm)
  );

endmodule
