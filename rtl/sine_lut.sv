// Sine look-up table with three synchronous read ports.
//
// One table serves the RED, YELLOW and BLUE phase indices I, J, K. Entry i
// holds round(AMP * sin(2*pi*i / (DEPTH-1))): the 8-bit index treats 255 as
// 360 degrees, so entry 255 equals entry 0, and the values are signed with
// a magnitude of at most AMP = 255, so that after scaling by AMPLITUDE/256
// the reference swings from about -AMPLITUDE to +AMPLITUDE. The table is
// computed at elaboration; nothing writes it, so it synthesises to a ROM
// (a RAM initialised at configuration on an FPGA).
//
// Interface: clk, idx_* (8-bit indices), sin_* (signed 9-bit values).
// Timing: one clock of read latency on every port.
module sine_lut
  import pspwm_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AMP   = 255
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] idx_r,
  input  logic [$clog2(DEPTH)-1:0] idx_y,
  input  logic [$clog2(DEPTH)-1:0] idx_b,
  output sine_t                    sin_r,
  output sine_t                    sin_y,
  output sine_t                    sin_b
);

  typedef sine_t table_t [DEPTH];

  function automatic table_t make_table();
    table_t t;
    real    v;
    for (int i = 0; i < DEPTH; i++) begin
      v    = real'(AMP) * $sin(2.0 * 3.14159265358979 * real'(i) / real'(DEPTH - 1));
      t[i] = sine_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) begin
    sin_r <= TABLE[idx_r];
    sin_y <= TABLE[idx_y];
    sin_b <= TABLE[idx_b];
  end

endmodule
