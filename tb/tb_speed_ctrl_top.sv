// End-to-end testbench for speed_ctrl_top at its default parameters.
//
// The controller drives a behavioural motor-and-encoder model in a closed
// loop (20 MHz clock, 30 ms speed gate). The run, about 4.7 s of simulated
// time:
//   0.0 s  set-point 1000 rpm, amplitude 900: after 1.5 s the speed of the
//          next ten gates (0.3 s) must be within 1000 +/- 15 rpm;
//   1.8 s  set-point 2500 rpm, amplitude 2700: beyond the frequency limit,
//          so the PI output and integral must clamp, and the references
//          must saturate at the carrier span;
//   2.25 s set-point -300 rpm: the loop only sets a frequency, not a
//          direction, so the PI output must clamp at its lower limit;
//   2.85 s set-point 1200 rpm, amplitude 900: after 1.5 s the speed must
//          be within 1200 +/- 15 rpm for ten gates.
// Every clock it checks that no complementary pair is high together and
// that each output equals the comparison of the carrier and reference seen
// one clock before. It counts the mechanisms of the design and fails if one
// never happens: 10 kHz samples, sine cycles (accumulator wraps), dead-band
// intervals, reference saturation, PI upper and lower limits, integral
// clamp, speed updates, and all seven output levels of a phase.
`timescale 1ns/1ps
module tb_speed_ctrl_top;
  import pspwm_pkg::*;

  localparam longint CLK_HZ = 20_000_000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [15:0] sref;
  logic [11:0] amp;
  logic enc_a, enc_b;
  logic [NPWM-1:0] pwm;
  logic signed [15:0] speed;
  logic speed_valid, sat_hi, sat_lo, isat, tick;
  logic [15:0] fw;
  car_bus_t car;
  carrier_t rr, ry, rb;
  real motor_rpm;
  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  speed_ctrl_top dut (
    .clk, .rst_n, .speed_ref_rpm(sref), .amplitude(amp), .enc_a, .enc_b,
    .pwm, .speed_rpm(speed), .speed_valid, .freq_word(fw),
    .freq_sat_hi(sat_hi), .freq_sat_lo(sat_lo), .pi_int_sat(isat),
    .sample_tick(tick), .car, .ref_r(rr), .ref_y(ry), .ref_b(rb));

  motor_encoder_model motor (.clk, .freq_word(fw), .enc_a, .enc_b, .rpm(motor_rpm));

  function automatic logic [NPWM-1:0] model(car_bus_t c, int r0, int r1, int r2);
    logic [NPWM-1:0] m;
    int r [3];
    r = '{r0, r1, r2};
    for (int p = 0; p < 3; p++)
      for (int k = 0; k < 6; k++) begin
        m[12*p + 2*k]     = (int'(c[k]) <= r[p]);
        m[12*p + 2*k + 1] = (r[p] + 100 <= int'(c[k]));
      end
    return m;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 12) $display("FAIL %s", msg);
  endtask

  // mechanism counters
  int n_tick = 0, n_cycle = 0, n_dead = 0, n_refsat = 0;
  int n_sathi = 0, n_satlo = 0, n_isat = 0, n_speed = 0;
  bit levels [7];
  longint n = 0;

  // per-clock checks
  logic [NPWM-1:0] exp_q = '0;
  carrier_t prev_r = 11'd1000;
  always @(negedge clk) if (rst_n) begin
    int lvl;
    if (n > 0) begin
      checks++;
      if (pwm != exp_q) fail($sformatf("pwm at clock %0d: %h expected %h", n, pwm, exp_q));
    end
    for (int q = 0; q < NPWM / 2; q++) begin
      if (pwm[2*q] && pwm[2*q+1]) fail($sformatf("pair %0d overlaps at clock %0d", q, n));
      if (!pwm[2*q] && !pwm[2*q+1]) n_dead++;
    end
    exp_q = model(car, int'(rr), int'(ry), int'(rb));
    lvl = 0;
    for (int k = 0; k < 6; k++) lvl += int'(pwm[2*k]);
    levels[lvl] = 1'b1;
    if (tick) n_tick++;
    if (prev_r < 11'd1000 && rr >= 11'd1000) n_cycle++;
    prev_r = rr;
    if (rr == 11'd0 || rr == 11'd2000) n_refsat++;
    if (speed_valid) begin
      n_speed++;
      if (sat_hi) n_sathi++;
      if (sat_lo) n_satlo++;
      if (isat) n_isat++;
    end
    n++;
  end

  task automatic run_ms(int ms);
    repeat (ms * int'(CLK_HZ / 1000)) @(posedge clk);
  endtask

  task automatic check_settled(int target, string what);
    int worst;
    worst = 0;
    // look at the speed reported by the next 10 gates (0.3 s)
    for (int w = 0; w < 10; w++) begin
      @(posedge speed_valid);
      @(negedge clk);
      if ((int'(speed) - target) > worst || (target - int'(speed)) > worst)
        worst = (int'(speed) > target) ? int'(speed) - target : target - int'(speed);
    end
    checks++;
    if (worst > 15) fail($sformatf("%s: speed off by up to %0d rpm (last %0d)", what, worst, speed));
    else $display("INFO %s: speed %0d rpm, worst error %0d rpm, freq word %0d", what, speed, worst, fw);
  endtask

  initial begin
    sref = 16'sd1000;
    amp  = 12'd900;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run_ms(1500);
    check_settled(1000, "1000 rpm");
    sref = 16'sd2500;
    amp  = 12'd2700;
    run_ms(450);
    sref = -16'sd300;
    run_ms(600);
    sref = 16'sd1200;
    amp  = 12'd900;
    run_ms(1500);
    check_settled(1200, "1200 rpm");

    checks++; if (n_tick < 40000) fail($sformatf("only %0d samples", n_tick));
    checks++; if (n_cycle < 10) fail($sformatf("only %0d sine cycles", n_cycle));
    checks++; if (n_dead == 0) fail("dead band never seen");
    checks++; if (n_refsat == 0) fail("reference never saturated");
    checks++; if (n_sathi == 0) fail("PI upper limit never reached");
    checks++; if (n_satlo == 0) fail("PI lower limit never reached");
    checks++; if (n_isat == 0) fail("integral clamp never reached");
    checks++; if (n_speed < 100) fail($sformatf("only %0d speed updates", n_speed));
    for (int l = 0; l < 7; l++) begin
      checks++;
      if (!levels[l]) fail($sformatf("level %0d never produced", l));
    end
    $display("INFO samples %0d, sine cycles %0d, dead-band clocks %0d, saturated-reference clocks %0d",
             n_tick, n_cycle, n_dead, n_refsat);
    $display("INFO speed updates %0d, PI upper limit %0d, lower limit %0d, integral clamp %0d",
             n_speed, n_sathi, n_satlo, n_isat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000 * int'(CLK_HZ / 1000)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
