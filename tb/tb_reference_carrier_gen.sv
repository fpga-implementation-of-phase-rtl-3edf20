// Self-checking testbench for reference_carrier_gen.
//
// Checks all six carriers against closed forms for several periods:
// CAR, CAR1, CAR2 = tri((n - 0/333/666) mod 2000) and CAR3..CAR5 = 2000
// minus those, so the six carriers together span 0..2000 and the upper
// three mirror the lower three. Also checks that every carrier reaches both
// ends of its band in each period.
`timescale 1ns/1ps
module tb_reference_carrier_gen;
  import pspwm_pkg::*;

  localparam int HALF = 1000;
  localparam int P    = 2 * HALF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  car_bus_t car;
  int checks = 0, failures = 0;
  int seen_lo [6], seen_hi [6];

  always #25 clk = ~clk;

  reference_carrier_gen dut (.clk, .rst_n, .car);

  function automatic int tri_ref(int n, int off);
    int y = ((n - off) % P + P) % P;
    return (y <= HALF) ? y : P - y;
  endfunction

  initial begin
    int e;
    foreach (seen_lo[i]) begin seen_lo[i] = 0; seen_hi[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 4 * P; n++) begin
      @(negedge clk);
      for (int k = 0; k < 6; k++) begin
        e = tri_ref(n, (k % 3) * 333);
        if (k >= 3) e = P - e;
        checks++;
        if (int'(car[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL CAR%0d cycle %0d: %0d expected %0d", k, n, car[k], e);
        end
        if (int'(car[k]) == (k < 3 ? 0 : HALF)) seen_lo[k]++;
        if (int'(car[k]) == (k < 3 ? HALF : P)) seen_hi[k]++;
      end
    end
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (seen_lo[k] < 3 || seen_hi[k] < 3) begin
        failures++;
        $display("FAIL CAR%0d band ends seen %0d/%0d times", k, seen_lo[k], seen_hi[k]);
      end
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
