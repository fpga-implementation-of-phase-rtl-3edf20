// Quadrature encoder speed measurement.
//
// The encoder channels A and B are brought into the clock domain through
// two flip-flops each. Every change of the synchronised {A,B} pair is a
// quadrature edge (x4 decoding): the sequence 00 -> 10 -> 11 -> 01 -> 00
// (A leading B) counts up, the reverse counts down, and a jump of both bits
// at once is an invalid step that is ignored. Edges are summed over a fixed
// gate of WINDOW_CYCLES clocks; at the end of the gate the sum is latched
// as the speed and a new gate starts. With a 500-line encoder (2000 edges
// per revolution), a 20 MHz clock and the default 30 ms gate, the latched
// count equals the shaft speed in rpm. The method (fixed-gate edge
// counting), the encoder resolution and the gate length are this design's
// own; the source only says a HEDS5645 encoder feeds the speed to the FPGA.
//
// Interface: clk, rst_n (synchronous, active low), enc_a, enc_b
// (asynchronous). speed is signed, valid pulses for one clock when speed is
// updated.
// Timing: an encoder edge is counted 3 clocks after it arrives; speed is
// updated every WINDOW_CYCLES clocks, counting from reset.
module qep_speed #(
  parameter int unsigned WINDOW_CYCLES = 600000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enc_a,
  input  logic               enc_b,
  output logic signed [15:0] speed,
  output logic               valid
);

  localparam int unsigned WW = $clog2(WINDOW_CYCLES + 1);

  logic [1:0] sync_a, sync_b;   // two-stage synchronisers
  logic [1:0] ab, ab_prev;      // synchronised and previous {A,B}
  logic signed [1:0]  step;     // -1, 0, +1
  logic signed [15:0] count;    // edges in the current gate
  logic [WW-1:0]      gate;     // gate timer
  logic               gate_end;

  assign ab = {sync_a[1], sync_b[1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync_a  <= '0;
      sync_b  <= '0;
      ab_prev <= '0;
    end else begin
      sync_a  <= {sync_a[0], enc_a};
      sync_b  <= {sync_b[0], enc_b};
      ab_prev <= ab;
    end
  end

  // Gray-code successor of a state in the forward direction
  function automatic logic [1:0] fwd(logic [1:0] s);
    unique case (s)
      2'b00: return 2'b10;
      2'b10: return 2'b11;
      2'b11: return 2'b01;
      default: return 2'b00;
    endcase
  endfunction

  always_comb begin
    if (ab == ab_prev)           step = 2'sd0;
    else if (ab == fwd(ab_prev)) step = 2'sd1;
    else if (ab_prev == fwd(ab)) step = -2'sd1;
    else                         step = 2'sd0;   // both bits changed: ignored
  end

  assign gate_end = (gate == WW'(WINDOW_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gate  <= '0;
      count <= '0;
      speed <= '0;
      valid <= 1'b0;
    end else begin
      valid <= gate_end;
      if (gate_end) begin
        gate  <= '0;
        speed <= count + 16'(step);
        count <= '0;
      end else begin
        gate  <= gate + 1'b1;
        count <= count + 16'(step);
      end
    end
  end

endmodule
