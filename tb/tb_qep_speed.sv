// Self-checking testbench for qep_speed.
//
// Part 1 (gate shortened to 10000 clocks): quadrature edges are generated
// here every D clocks, forward and then backward, with an invalid double
// step mixed in. Each latched speed must equal the number of edges that
// arrived in that gate (+/-1 for an edge on the gate boundary), with the
// sign of the direction (the window with the invalid jump may lose a
// few edges), and valid must pulse every 10000 clocks.
// Part 2 (default 600000-clock gate): edges every 400 clocks, i.e. a
// 500-line encoder at 1500 rpm, must read 1500.
`timescale 1ns/1ps
module tb_qep_speed;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a1 = 0, b1 = 0, a2 = 0, b2 = 0;
  logic signed [15:0] sp1, sp2;
  logic v1, v2;
  int checks = 0, failures = 0;

  always #25 clk = ~clk;

  qep_speed #(.WINDOW_CYCLES(10000)) dut1 (.clk, .rst_n, .enc_a(a1), .enc_b(b1), .speed(sp1), .valid(v1));
  qep_speed                          dut2 (.clk, .rst_n, .enc_a(a2), .enc_b(b2), .speed(sp2), .valid(v2));

  // encoder position -> {A,B}: 00, 10, 11, 01 (A leads B going forward)
  function automatic logic [1:0] quad(int pos);
    case (((pos % 4) + 4) % 4)
      0: return 2'b00;
      1: return 2'b10;
      2: return 2'b11;
      default: return 2'b01;
    endcase
  endfunction

  // part 1 stimulus: per-clock direction and edge spacing
  int pos1 = 0, dir1 = 1, gap1 = 50, cnt1 = 0;
  int pos2 = 0, cnt2 = 0;
  bit run = 0;
  bit glitch = 0;

  always @(negedge clk) if (run) begin
    cnt1++;
    if (cnt1 >= gap1) begin
      cnt1 = 0;
      pos1 += dir1;
      {a1, b1} = quad(pos1);
      if (glitch) begin {a1, b1} = ~quad(pos1); glitch = 0; end   // invalid jump
    end
    cnt2++;
    if (cnt2 >= 400) begin cnt2 = 0; pos2++; {a2, b2} = quad(pos2); end
  end

  int last_v1 = -1, nwin = 0, n = 0;

  initial begin
    int e;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run = 1;
    forever begin
      @(negedge clk);
      n++;
      if (v1) begin
        nwin++;
        if (last_v1 >= 0) begin
          checks++;
          if (n - last_v1 != 10000) begin failures++; $display("FAIL valid spacing %0d", n - last_v1); end
        end
        last_v1 = n;
        // skip the first window and the window in which the direction flips
        if (nwin > 1 && nwin != 6 && nwin != 7) begin
          e = dir1 * (10000 / gap1);
          checks++;
          // the window holding the invalid jump loses the steps around it
          if (dir1 * int'(sp1) > dir1 * e + 1 || dir1 * int'(sp1) < dir1 * e - (nwin == 10 ? 6 : 1)) begin
            failures++;
            $display("FAIL window %0d speed %0d expected %0d", nwin, sp1, e);
          end
        end
        if (nwin == 5) begin dir1 = -1; gap1 = 37; end
        if (nwin == 9) glitch = 1;
        if (nwin == 12) break;
      end
    end
    // part 2: wait for the second full-size gate
    @(posedge v2);
    @(posedge v2);
    @(negedge clk);
    checks++;
    if (sp2 < 1499 || sp2 > 1501) begin failures++; $display("FAIL full-size speed %0d expected 1500", sp2); end
    else $display("INFO full-size gate reads %0d rpm", sp2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
