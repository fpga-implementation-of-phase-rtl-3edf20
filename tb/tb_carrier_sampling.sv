// Self-checking testbench for carrier_sampling.
//
// Runs the module at its default sizes (2000-clock period) for 420 carrier
// periods while changing the frequency word and amplitude, and checks every
// clock against a model written here with real arithmetic:
//   - sample_tick is high exactly in cycles n with n mod 2000 = 1999,
//   - carrier11 = tri(n mod 2000),
//   - acc steps by freq_word once per period and wraps at 65280,
//   - ref = clamp(1000 + floor(round(255 sin(2 pi idx/255)) * amp / 256),
//     0, 2000) for idx = I, (I+170) mod 256, (I+85) mod 256, I = acc/256,
//     taken from the accumulator two clocks earlier and the amplitude one
//     clock earlier.
// It counts accumulator wraps, phase index wraps and saturated references
// and fails if any of them never happens.
`timescale 1ns/1ps
module tb_carrier_sampling;
  import pspwm_pkg::*;

  localparam int P = 2000;
  localparam int TICKS = 420;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] freq;
  logic [11:0] amp;
  carrier_t rr, ry, rb, c11;
  logic tick;
  int checks = 0, failures = 0;
  int acc_wraps = 0, idx_wraps = 0, sat_hits = 0;

  always #25 clk = ~clk;

  carrier_sampling dut (.clk, .rst_n, .freq_word(freq), .amplitude(amp),
                        .ref_r(rr), .ref_y(ry), .ref_b(rb), .carrier11(c11), .sample_tick(tick));

  function automatic int sine_val(int idx);
    real v = 255.0 * $sin(6.283185307179586 * idx / 255.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int ref_val(int acc, int a, int offs);
    int i = acc / 256;
    int idx = (i + offs) % 256;
    int prod = sine_val(idx) * a;
    int lvl = 1000 + ((prod >= 0) ? prod / 256 : -((-prod + 255) / 256));  // floor
    if (lvl < 0) lvl = 0;
    if (lvl > 2000) lvl = 2000;
    return lvl;
  endfunction

  task automatic chk(string what, int got, int exp_v, int n);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 12) $display("FAIL %s cycle %0d: %0d expected %0d", what, n, got, exp_v);
    end
  endtask

  int acc_m, acc_d1, acc_d2, amp_d1;

  initial begin
    int n, y;
    freq = 16'd327; amp = 12'd900;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    acc_m = 0; acc_d1 = 0; acc_d2 = 0; amp_d1 = 900;
    n = 0;
    for (int t = 0; t < TICKS; t++) begin
      for (int c = 0; c < P; c++) begin
        @(negedge clk);
        // change stimulus in the first cycle of a period, after its tick
        if (c == 0) begin
          if (t == 100) freq = 16'd20000;     // fast phase: many wraps
          if (t == 160) amp  = 12'd2700;      // amplitude printed for the design: saturates
          if (t == 240) begin freq = 16'd65000; amp = 12'd1000; end
          if (t == 300) begin freq = 16'd1234; amp = 12'd0; end
          if (t == 340) amp = 12'd4095;
        end
        // cycle n: model values during this cycle
        chk("sample_tick", int'(tick), int'(n % P == P - 1), n);
        y = n % P;
        chk("carrier11", int'(c11), (y <= P / 2) ? y : P - y, n);
        if (n >= 2) begin
          chk("ref_r", int'(rr), ref_val(acc_d2, amp_d1, 0),   n);
          chk("ref_y", int'(ry), ref_val(acc_d2, amp_d1, 170), n);
          chk("ref_b", int'(rb), ref_val(acc_d2, amp_d1, 85),  n);
          if (rr == 0 || rr == 2000) sat_hits++;
        end
        // advance the model to cycle n+1
        acc_d2 = acc_d1;
        acc_d1 = acc_m;
        amp_d1 = int'(amp);
        if (n % P == P - 1) begin
          acc_m = acc_m + int'(freq);
          if (acc_m >= 65280) begin acc_m -= 65280; acc_wraps++; end
          if (acc_m / 256 + 170 > 255) idx_wraps++;
        end
        n++;
      end
    end
    checks++; if (acc_wraps < 3) begin failures++; $display("FAIL accumulator wrapped %0d times", acc_wraps); end
    checks++; if (idx_wraps < 3) begin failures++; $display("FAIL index wrapped %0d times", idx_wraps); end
    checks++; if (sat_hits < 3) begin failures++; $display("FAIL reference saturated %0d times", sat_hits); end
    $display("INFO acc wraps %0d, index wraps %0d, saturated cycles %0d", acc_wraps, idx_wraps, sat_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((TICKS + 5) * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
