// Phase comparison: turns the six carriers and three sine references into
// the 36 gate signals.
//
// For every phase reference REF and carrier CARk two comparisons are made:
//     upper output = (CARk <= REF)
//     lower output = (REF  <= CARk - DEAD_BAND)
// The lower output is the complement of the upper one with a dead band:
// when REF lies within DEAD_BAND counts below the carrier, both are low.
// With DEAD_BAND = 100 at 20 MHz that is 5 us around each crossing, so the
// two switches of an inverter leg are never on together. The comparison
// rule, the 100-count band and the output numbering (PWM1/PWM2 from CAR
// with RED, PWM3/PWM4 from CAR1, ... PWM13..24 YELLOW, PWM25..36 BLUE)
// come from the architecture description; the operand order of the lower
// comparison, chosen so that the band separates the pair, is this design's
// reading of it. The carrier difference is formed with a sign bit, so
// CARk < DEAD_BAND simply makes the lower output low.
//
// Interface: car[0..5], ref_r, ref_y, ref_b in; pwm[35:0] out with
// pwm[0] = PWM1 .. pwm[35] = PWM36.
// Timing: outputs are registered, one clock after the inputs.
module phase_comparison
  import pspwm_pkg::*;
#(
  parameter int unsigned DEAD_BAND = 100
) (
  input  logic            clk,
  input  logic            rst_n,
  input  car_bus_t        car,
  input  carrier_t        ref_r,
  input  carrier_t        ref_y,
  input  carrier_t        ref_b,
  output logic [NPWM-1:0] pwm
);

  carrier_t        refs [NPH];
  logic [NPWM-1:0] pwm_d;

  assign refs[PH_RED]    = ref_r;
  assign refs[PH_YELLOW] = ref_y;
  assign refs[PH_BLUE]   = ref_b;

  always_comb begin
    for (int p = 0; p < NPH; p++) begin
      for (int k = 0; k < NCAR; k++) begin
        pwm_d[p*2*NCAR + 2*k]     = (car[k] <= refs[p]);
        pwm_d[p*2*NCAR + 2*k + 1] = ($signed({2'b00, refs[p]})
                                     <= $signed({2'b00, car[k]}) - $signed((CW+2)'(DEAD_BAND)));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pwm <= '0;
    else        pwm <= pwm_d;
  end

  // the two outputs of a pair are never on together (checked out of reset)
  for (genvar n = 0; n < NPWM / 2; n++) begin : g_chk
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(pwm[2*n] && pwm[2*n+1]));
  end

endmodule
