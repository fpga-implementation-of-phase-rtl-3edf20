// Reference carrier generation: the six phase-shifted carriers CAR..CAR5.
//
// Three triangle generators run side by side with delays of 0, SHIFT and
// 2*SHIFT clocks (0, 333 and 666 of the 2000-clock carrier period, i.e. 0,
// 60 and 120 degrees). Each of them is also subtracted from FULL = 2000 to
// give CAR3, CAR4 and CAR5, which are the first three mirrored into the
// upper band 1000..2000. Together the six carriers tile the 0..2000 range
// that the sine references, centred on 1000, are compared against. The
// offsets, the subtraction from 2000 and the names come from the carrier
// generator description.
//
// Interface: clk, rst_n, car[0..5] = CAR, CAR1 .. CAR5.
// Timing: car[0..2] are registered; car[3..5] are combinational differences
// of them, so all six change on the same clock edge.
module reference_carrier_gen
  import pspwm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 1000,
  parameter int unsigned SHIFT       = 333,
  parameter int unsigned FULL        = 2 * HALF_PERIOD
) (
  input  logic     clk,
  input  logic     rst_n,
  output car_bus_t car
);

  for (genvar g = 0; g < 3; g++) begin : g_gen
    triangle_carrier #(
      .HALF_PERIOD(HALF_PERIOD),
      .OFFSET     (g * SHIFT)
    ) u_tri (
      .clk  (clk),
      .rst_n(rst_n),
      .car  (car[g])
    );
    assign car[g+3] = carrier_t'(FULL) - car[g];
  end

endmodule
