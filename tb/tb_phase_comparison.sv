// Self-checking testbench for phase_comparison.
//
// Drives random carriers and references, plus hand-picked corner cases
// (equal values, a reference exactly DEAD_BAND below the carrier, carriers
// below DEAD_BAND), and checks each of the 36 outputs one clock later
// against the rule worked out here:
//   PWM(12p + 2k + 1) = CARk <= REF_p,   PWM(12p + 2k + 2) = REF_p + 100 <= CARk
// It also counts how often a pair sits in its dead band (both low).
`timescale 1ns/1ps
module tb_phase_comparison;
  import pspwm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  car_bus_t car;
  carrier_t rr, ry, rb;
  logic [NPWM-1:0] pwm;
  int checks = 0, failures = 0, deadband_hits = 0;

  always #25 clk = ~clk;

  phase_comparison dut (.clk, .rst_n, .car, .ref_r(rr), .ref_y(ry), .ref_b(rb), .pwm);

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

  logic [NPWM-1:0] exp_q;

  task automatic apply_and_check();
    exp_q = model(car, int'(rr), int'(ry), int'(rb));
    @(negedge clk);
    for (int b = 0; b < NPWM; b++) begin
      checks++;
      if (pwm[b] !== exp_q[b]) begin
        failures++;
        if (failures < 10) $display("FAIL PWM%0d = %0b expected %0b", b + 1, pwm[b], exp_q[b]);
      end
    end
    for (int n = 0; n < NPWM / 2; n++)
      if (!pwm[2*n] && !pwm[2*n+1]) deadband_hits++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // reset value
    checks++;
    if (pwm != '0) begin failures++; $display("FAIL outputs not low after reset"); end
    // corner cases on the RED phase, CAR
    foreach (car[k]) car[k] = carrier_t'(500);
    ry = 11'd0; rb = 11'd2000;
    rr = 11'd500; apply_and_check();     // equal: upper on
    rr = 11'd400; apply_and_check();     // exactly 100 below: lower on
    rr = 11'd401; apply_and_check();     // inside band: both off
    rr = 11'd499; apply_and_check();
    foreach (car[k]) car[k] = carrier_t'(k * 20);   // carriers below the band width
    rr = 11'd0;   apply_and_check();
    // random
    for (int t = 0; t < 5000; t++) begin
      foreach (car[k]) car[k] = carrier_t'($urandom_range(2000));
      if ($urandom_range(3) == 0) begin
        rr = car[$urandom_range(5)] - carrier_t'($urandom_range(120));
        ry = car[$urandom_range(5)];
      end else begin
        rr = carrier_t'($urandom_range(2000));
        ry = carrier_t'($urandom_range(2000));
      end
      rb = carrier_t'($urandom_range(2000));
      apply_and_check();
    end
    checks++;
    if (deadband_hits == 0) begin failures++; $display("FAIL dead band never seen"); end
    $display("INFO dead band pairs seen: %0d", deadband_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
