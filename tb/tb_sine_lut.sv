// Self-checking testbench for sine_lut.
//
// Reads every index on the three ports (each port with a different index
// pattern) and compares the value one clock later with
// round(255 * sin(2*pi*i/255)) worked out here. Also checks the quarter-wave
// landmarks: entry 0 and 255 are 0 and the peak is +/-255 near i = 64 and
// i = 191.
`timescale 1ns/1ps
module tb_sine_lut;
  import pspwm_pkg::*;

  logic clk = 1'b0;
  logic [7:0] ir, iy, ib;
  sine_t sr, sy, sb;
  int checks = 0, failures = 0;
  int maxv = -1000, minv = 1000;

  always #25 clk = ~clk;

  sine_lut dut (.clk, .idx_r(ir), .idx_y(iy), .idx_b(ib), .sin_r(sr), .sin_y(sy), .sin_b(sb));

  function automatic int expect_sin(int i);
    real v = 255.0 * $sin(6.283185307179586 * i / 255.0);
    int  r = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    return r;
  endfunction

  task automatic check(string port, int idx, sine_t got);
    checks++;
    if (int'(got) != expect_sin(idx)) begin
      failures++;
      $display("FAIL %s index %0d: %0d expected %0d", port, idx, got, expect_sin(idx));
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ir = 8'(i); iy = 8'(255 - i); ib = 8'(i * 7);
      @(negedge clk);        // one clock of read latency has passed
      check("R", i, sr);
      check("Y", 255 - i, sy);
      check("B", (i * 7) % 256, sb);
      if (int'(sr) > maxv) maxv = int'(sr);
      if (int'(sr) < minv) minv = int'(sr);
    end
    // landmarks
    @(negedge clk); ir = 8'd0; iy = 8'd255; ib = 8'd64;
    @(negedge clk);
    checks++; if (sr != 0 || sy != 0) begin failures++; $display("FAIL ends not zero"); end
    checks++; if (sb < 254) begin failures++; $display("FAIL quarter value %0d", sb); end
    checks++; if (maxv != 255 || minv != -255) begin failures++; $display("FAIL range %0d..%0d", minv, maxv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
