// Carrier frequency sampling: produces the three unipolar sine references
// RPH, YPH and BPH, resampled once per carrier period.
//
// A sample counter sf runs over the 2000-clock carrier period (10 kHz at
// 20 MHz); beside it an up/down count (carrier11) rises for the first half
// of the period and falls for the second. At the end of every period
// (sample_tick) a 16-bit phase accumulator adds freq_word and wraps at
// ACC_MAX = 65280 = 255*256, so acc/256 is a ramp over indices 0..254 with
// 255 steps per sine cycle. The output frequency is
// 10 kHz * freq_word / 65280; freq_word = 327 gives 50.09 Hz. The ramp
// index is I (RED); J = I + 170 and K = I + 85 give the other two phases,
// 240 and 120 degrees on (one degree is 255/360 = 0.71 index steps), and
// an index over 255 has 256 taken off. The sine table is then read and the
// result is scaled:
//     ref = 1000 + (SINE(index) * AMPLITUDE) / 256
// with the division done as an arithmetic shift. The sum is saturated to
// 0..REF_MAX, the span of the carriers. All the constants above come from
// the architecture description; the saturation, the round-down shift and the
// two-stage pipeline are this design's own.
//
// Interface: clk, rst_n (synchronous, active low), freq_word (16 bit, below
// ACC_MAX), amplitude (12 bit, unsigned). Outputs ref_r/ref_y/ref_b,
// carrier11 and sample_tick.
// Timing: sample_tick is high in the last cycle of each period, and the
// accumulator takes its new value at the end of that cycle. The sine table
// read adds one clock and the registered scaling one more, so ref_* follow a
// new accumulator value 2 clocks later. ref_* follow a change of amplitude
// after 1 clock.
module carrier_sampling
  import pspwm_pkg::*;
#(
  parameter int unsigned PERIOD     = 2000,
  parameter int unsigned ACC_MAX    = 65280,
  parameter int unsigned OFFS_Y     = 170,
  parameter int unsigned OFFS_B     = 85,
  parameter int unsigned REF_OFFSET = 1000,
  parameter int unsigned REF_MAX    = 2000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] freq_word,
  input  logic [11:0] amplitude,
  output carrier_t    ref_r,
  output carrier_t    ref_y,
  output carrier_t    ref_b,
  output carrier_t    carrier11,
  output logic        sample_tick
);

  localparam int unsigned SW = $clog2(PERIOD + 1);

  // ---- sample counter and its up/down count --------------------------------
  logic [SW-1:0] sf;

  assign sample_tick = (sf == SW'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sf        <= '0;
      carrier11 <= '0;
    end else begin
      sf        <= sample_tick ? '0 : sf + 1'b1;
      carrier11 <= (sf < SW'(PERIOD / 2)) ? carrier11 + 1'b1 : carrier11 - 1'b1;
    end
  end

  // ---- phase accumulator ("frequency update register") --------------------
  logic [15:0] acc;
  logic [16:0] acc_sum;

  assign acc_sum = {1'b0, acc} + {1'b0, freq_word};

  always_ff @(posedge clk) begin
    if (!rst_n)           acc <= '0;
    else if (sample_tick) acc <= (acc_sum >= 17'(ACC_MAX)) ? 16'(acc_sum - 17'(ACC_MAX))
                                                           : acc_sum[15:0];
  end

  // ---- phase indices I, J, K -----------------------------------------------
  logic [7:0] idx_i, idx_j, idx_k;
  logic [8:0] sum_j, sum_k;

  always_comb begin
    idx_i = acc[15:8];                       // acc / 256
    sum_j = {1'b0, idx_i} + 9'(OFFS_Y);
    sum_k = {1'b0, idx_i} + 9'(OFFS_B);
    idx_j = (sum_j > 9'd255) ? 8'(sum_j - 9'd256) : sum_j[7:0];
    idx_k = (sum_k > 9'd255) ? 8'(sum_k - 9'd256) : sum_k[7:0];
  end

  // ---- sine table ----------------------------------------------------------
  sine_t sin_r, sin_y, sin_b;

  sine_lut u_lut (
    .clk  (clk),
    .idx_r(idx_i),
    .idx_y(idx_j),
    .idx_b(idx_k),
    .sin_r(sin_r),
    .sin_y(sin_y),
    .sin_b(sin_b)
  );

  // ---- amplitude scaling, offset, saturation, output registers ------------
  function automatic carrier_t scale(sine_t s, logic [11:0] amp);
    logic signed [21:0] prod;
    logic signed [21:0] lvl;
    prod = 22'(s) * $signed({1'b0, amp});
    lvl  = (prod >>> 8) + $signed(22'(REF_OFFSET));
    if (lvl < 0)                          return '0;
    else if (lvl > $signed(22'(REF_MAX))) return carrier_t'(REF_MAX);
    else                            return carrier_t'(lvl);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_r <= carrier_t'(REF_OFFSET);
      ref_y <= carrier_t'(REF_OFFSET);
      ref_b <= carrier_t'(REF_OFFSET);
    end else begin
      ref_r <= scale(sin_r, amplitude);
      ref_y <= scale(sin_y, amplitude);
      ref_b <= scale(sin_b, amplitude);
    end
  end

endmodule
