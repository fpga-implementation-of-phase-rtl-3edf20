// One reference signal (carrier) generator: a 0..HALF_PERIOD triangle that
// repeats every 2*HALF_PERIOD clocks and is delayed by OFFSET clocks.
//
// As in the carrier generator of the architecture, it is built from two
// counters. A free-running count X (X = X+1) marks position in the carrier
// period and wraps at 2*HALF_PERIOD; its value picks whether a second,
// up/down counter moves up or down this clock. With OFFSET = 0 the carrier
// rises for X = 0..999 and falls for X = 1000..1999. With OFFSET = 333 it
// first falls to 0 at X = 333, rises to 1000 at X = 1333 and falls back to
// 333 at the wrap, exactly as the second generator is described; OFFSET = 666
// gives the third. One step per clock keeps every carrier at 1000 counts
// peak and 10 kHz at the 20 MHz clock. The "count by 2" labels of the
// original carrier diagram are not followed, since its description says
// each carrier counts 1000.
//
// Interface: clk, rst_n (synchronous, active low), car (registered).
// Timing: after reset, car = tri(-OFFSET); on the clock edge that ends
// cycle n it moves one step towards tri(n + 1 - OFFSET), so car during
// cycle n equals tri((n - OFFSET) mod 2*HALF_PERIOD). The reset value and
// the window arithmetic (y = X - OFFSET) are this design's own choices.
module triangle_carrier
  import pspwm_pkg::*;
#(
  parameter int unsigned HALF_PERIOD = 1000,
  parameter int unsigned OFFSET      = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  output carrier_t car
);

  localparam int unsigned PERIOD = 2 * HALF_PERIOD;
  localparam int unsigned XW     = $clog2(PERIOD + 1);

  // triangle value at position 0 of this generator's delayed cycle
  localparam int unsigned Y0    = (PERIOD - (OFFSET % PERIOD)) % PERIOD;
  localparam int unsigned CAR0  = (Y0 <= HALF_PERIOD) ? Y0 : PERIOD - Y0;

  initial begin
    assert (HALF_PERIOD > 0 && HALF_PERIOD < (1 << CW) / 2)
      else $error("HALF_PERIOD does not fit the carrier width");
  end

  logic [XW-1:0] x;        // X = X+1 reference generator count
  logic [XW:0]   xs;       // X + PERIOD - OFFSET, before the modulo
  logic [XW-1:0] y;        // X delayed by OFFSET, modulo PERIOD
  logic          count_up; // up/down counter direction this clock

  always_comb begin
    xs       = {1'b0, x} + (XW+1)'(Y0);
    y        = (xs >= (XW+1)'(PERIOD)) ? XW'(xs - (XW+1)'(PERIOD)) : xs[XW-1:0];
    count_up = (y < XW'(HALF_PERIOD));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x   <= '0;
      car <= carrier_t'(CAR0);
    end else begin
      x   <= (x == XW'(PERIOD - 1)) ? '0 : x + 1'b1;
      car <= count_up ? car + 1'b1 : car - 1'b1;
    end
  end

endmodule
