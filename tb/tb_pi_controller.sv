// Self-checking testbench for pi_controller.
//
// Feeds random set-points and measurements, with sample strobes at random
// intervals, and checks the output after every strobe against an integer
// model written here: integral clamped to +/-ceil(OUT_MAX*2^SHIFT/KI),
// out = clamp((KP*e + KI*integral) >> SHIFT, 0, OUT_MAX). Checks that the
// output holds between strobes, and that both output limits and the
// integral clamp are reached.
`timescale 1ns/1ps
module tb_pi_controller;

  localparam int KP = 32, KI = 8, SH = 8, OMAX = 436;
  localparam int IMAX = (OMAX * 256 + KI - 1) / KI;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sample = 1'b0;
  logic signed [15:0] sp, ms;
  logic [15:0] out;
  logic shi, slo, isat;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_isat = 0;

  always #25 clk = ~clk;

  pi_controller dut (.clk, .rst_n, .sample, .setpoint(sp), .measured(ms), .out, .sat_hi(shi), .sat_lo(slo), .int_sat(isat));

  int integ_m = 0, out_m = 0, u_m = 0;

  task automatic step_model(int e);
    int u;
    integ_m += e;
    if (integ_m > IMAX) integ_m = IMAX;
    if (integ_m < -IMAX) integ_m = -IMAX;
    u = KP * e + KI * integ_m;
    u = (u >= 0) ? u / 256 : -((-u + 255) / 256);
    u_m = u;
    out_m = (u > OMAX) ? OMAX : (u < 0 ? 0 : u);
    if (u > OMAX) n_hi++;
    if (u < 0) n_lo++;
    if (integ_m == IMAX || integ_m == -IMAX) n_isat++;
  endtask

  initial begin
    sp = 0; ms = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++; if (out != 0) begin failures++; $display("FAIL reset output %0d", out); end
    for (int t = 0; t < 3000; t++) begin
      // phases: small errors, then large positive, then large negative
      if (t < 1000)      begin sp = 16'(1000 + $urandom_range(40)); ms = 16'(1000 + $urandom_range(40)); end
      else if (t < 1500) begin sp = 16'sd2500; ms = 16'(int'($urandom_range(800))); end
      else if (t < 2000) begin sp = 16'sd0;    ms = 16'(int'($urandom_range(3000))); end
      else               begin sp = 16'($urandom_range(3000)); ms = 16'($urandom_range(3000)); end
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      step_model(int'(sp) - int'(ms));
      checks++;
      if (int'(out) != out_m || shi != (u_m > OMAX) || slo != (u_m < 0)
          || isat != (integ_m == IMAX || integ_m == -IMAX)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: out %0d expected %0d", t, out, out_m);
      end
      // hold between strobes
      sp = 16'($urandom_range(3000));
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        checks++;
        if (int'(out) != out_m) begin failures++; $display("FAIL output moved without a strobe"); end
      end
    end
    checks++; if (n_hi == 0)   begin failures++; $display("FAIL upper limit never reached"); end
    checks++; if (n_lo == 0)   begin failures++; $display("FAIL lower limit never reached"); end
    checks++; if (n_isat == 0) begin failures++; $display("FAIL integral clamp never reached"); end
    $display("INFO upper limit %0d, lower limit %0d, integral clamp %0d", n_hi, n_lo, n_isat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
