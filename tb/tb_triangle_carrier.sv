// Self-checking testbench for triangle_carrier.
//
// Three generators with delays of 0, 333 and 666 clocks run for a few
// carrier periods. After reset, cycle n of every generator must show
// tri((n - OFFSET) mod 2000), where tri(y) = y for y <= 1000 and 2000 - y
// above; the peak value 1000 must recur every 2000 clocks (10 kHz at
// 20 MHz) and the offsets must put the peaks 333 and 666 clocks apart.
`timescale 1ns/1ps
module tb_triangle_carrier;
  import pspwm_pkg::*;

  localparam int HALF = 1000;
  localparam int P    = 2 * HALF;
  localparam int OFFS [3] = '{0, 333, 666};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  carrier_t car [3];
  int checks = 0, failures = 0;

  always #25 clk = ~clk;   // 20 MHz

  triangle_carrier #(.HALF_PERIOD(HALF), .OFFSET(0))   u0 (.clk, .rst_n, .car(car[0]));
  triangle_carrier #(.HALF_PERIOD(HALF), .OFFSET(333)) u1 (.clk, .rst_n, .car(car[1]));
  triangle_carrier #(.HALF_PERIOD(HALF), .OFFSET(666)) u2 (.clk, .rst_n, .car(car[2]));

  function automatic int tri_ref(int n, int off);
    int y = ((n - off) % P + P) % P;
    return (y <= HALF) ? y : P - y;
  endfunction

  int last_peak [3];
  int peak_gap_ok [3];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3; i++) begin last_peak[i] = -1; peak_gap_ok[i] = 0; end
    for (int n = 0; n < 5 * P; n++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(car[i]) != tri_ref(n, OFFS[i])) begin
          failures++;
          if (failures < 10) $display("FAIL gen %0d cycle %0d: car=%0d expected %0d", i, n, car[i], tri_ref(n, OFFS[i]));
        end
        if (car[i] == carrier_t'(HALF)) begin
          if (last_peak[i] >= 0) begin
            checks++;
            if (n - last_peak[i] != P) begin
              failures++;
              $display("FAIL gen %0d: peaks %0d clocks apart", i, n - last_peak[i]);
            end else peak_gap_ok[i]++;
          end
          // the peak of generator i falls OFFSET clocks after the peak of generator 0
          if (i > 0) begin
            checks++;
            if (((n - OFFS[i]) % P + P) % P != HALF) begin
              failures++;
              $display("FAIL gen %0d peak at cycle %0d", i, n);
            end
          end
          last_peak[i] = n;
        end
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (peak_gap_ok[i] < 3) begin failures++; $display("FAIL gen %0d saw %0d periods", i, peak_gap_ok[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
