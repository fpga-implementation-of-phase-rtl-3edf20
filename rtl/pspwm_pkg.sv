// Shared widths, types and constants of the phase-shifted carrier PWM
// controller.
//
// All carrier and reference values live on one 0..2000 count scale: a
// triangle carrier spans 0..1000 counts, the three inverted carriers span
// 1000..2000, and the sine references are centred on 1000. 11 bits hold
// that range. The 20 MHz clock and 10 kHz carrier give the 2000-clock
// carrier period; these numbers come from the architecture description, the
// type names are this design's own.
package pspwm_pkg;

  // width of a carrier or reference value (0..2000 fits in 11 bits)
  localparam int unsigned CW = 11;

  // carriers per phase: m - 1 for a seven-level inverter (m = 7)
  localparam int unsigned NCAR = 6;

  // phases: RED, YELLOW, BLUE
  localparam int unsigned NPH = 3;

  // PWM outputs: two (complementary, dead-banded) per carrier and phase
  localparam int unsigned NPWM = 2 * NCAR * NPH;

  typedef logic [CW-1:0] carrier_t;
  typedef carrier_t [NCAR-1:0] car_bus_t;   // CAR (index 0) .. CAR5 (index 5)

  typedef enum logic [1:0] {
    PH_RED    = 2'd0,
    PH_YELLOW = 2'd1,
    PH_BLUE   = 2'd2
  } phase_e;

  // signed value of the 9-bit sine table entries (-255..255)
  typedef logic signed [8:0] sine_t;

endpackage
