// Self-checking testbench for pspwm_core at its default sizes.
//
// Runs a 50 Hz (freq_word 327), 0.95-amplitude modulation for a little over
// two sine periods (900000 clocks at 20 MHz) and checks:
//   - each carrier against its closed form tri((n - 0/333/666) mod 2000)
//     (CAR..CAR2) or 2000 minus that (CAR3..CAR5), every clock;
//   - each of the 36 outputs, one clock after the carriers and references
//     it is made from, against the comparison rule with a 100-count dead
//     band, and that no pair is ever high together;
//   - the RED reference period (rising crossings of 1000) is
//     65280/327 = 199.6 samples of 2000 clocks, and YELLOW and BLUE cross
//     one third and two thirds of a period after RED;
//   - the six upper outputs of a phase take all seven values 0..6 (seven
//     output levels per phase).
`timescale 1ns/1ps
module tb_pspwm_core;
  import pspwm_pkg::*;

  localparam int P = 2000;
  localparam int NCYC = 900000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] freq = 16'd327;
  logic [11:0] amp  = 12'd950;
  logic [NPWM-1:0] pwm;
  car_bus_t car;
  carrier_t rr, ry, rb, c11;
  logic tick;
  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  pspwm_core dut (.clk, .rst_n, .freq_word(freq), .amplitude(amp), .pwm, .car,
                  .ref_r(rr), .ref_y(ry), .ref_b(rb), .carrier11(c11), .sample_tick(tick));

  function automatic int tri_ref(int n, int off);
    int y = ((n - off) % P + P) % P;
    return (y <= P / 2) ? y : P - y;
  endfunction

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

  int rise [3][$];
  bit levels_seen [7];
  int deadband = 0;

  initial begin
    logic [NPWM-1:0] exp_q;
    int e, lvl;
    carrier_t prev [3];
    carrier_t now_ref [3];
    exp_q = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    prev = '{rr, ry, rb};
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      // carriers
      for (int k = 0; k < 6; k++) begin
        e = tri_ref(n, (k % 3) * 333);
        if (k >= 3) e = P - e;
        checks++;
        if (int'(car[k]) != e) fail($sformatf("CAR%0d cycle %0d: %0d expected %0d", k, n, car[k], e));
      end
      // outputs from the previous cycle's carriers and references
      if (n > 0) begin
        checks++;
        if (pwm != exp_q) fail($sformatf("pwm cycle %0d: %h expected %h", n, pwm, exp_q));
      end
      for (int q = 0; q < NPWM / 2; q++) begin
        checks++;
        if (pwm[2*q] && pwm[2*q+1]) fail($sformatf("pair %0d overlaps at cycle %0d", q, n));
        if (!pwm[2*q] && !pwm[2*q+1]) deadband++;
      end
      exp_q = model(car, int'(rr), int'(ry), int'(rb));
      lvl = 0;
      for (int k = 0; k < 6; k++) lvl += int'(pwm[2*k]);
      levels_seen[lvl] = 1'b1;
      // sine reference crossings
      now_ref = '{rr, ry, rb};
      for (int p = 0; p < 3; p++) begin
        if (prev[p] < 11'd1000 && now_ref[p] >= 11'd1000) rise[p].push_back(n);
        prev[p] = now_ref[p];
      end
    end
    // period of RED: 65280/327 samples
    checks++;
    if (rise[0].size() < 2) fail($sformatf("RED crossed 1000 upwards only %0d times", rise[0].size()));
    else begin
      e = rise[0][1] - rise[0][0];
      if (e < 398000 || e > 402000) fail($sformatf("RED period %0d clocks", e));
      else $display("INFO RED period %0d clocks (%0.2f Hz)", e, 20.0e6 / e);
      // YELLOW one third, BLUE two thirds of a period later
      for (int p = 1; p < 3; p++) begin
        int d;
        d = -1;
        foreach (rise[p][i]) if (rise[p][i] > rise[0][0] && d < 0) d = rise[p][i] - rise[0][0];
        checks++;
        if (d < p * 133000 - 4000 || d > p * 133000 + 4000)
          fail($sformatf("phase %0d crosses %0d clocks after RED", p, d));
      end
    end
    for (int l = 0; l < 7; l++) begin
      checks++;
      if (!levels_seen[l]) fail($sformatf("level %0d never produced", l));
    end
    checks++;
    if (deadband == 0) fail("dead band never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
