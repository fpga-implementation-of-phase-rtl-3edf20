// Behavioural model (not synthesizable) of the induction motor and its
// shaft encoder, for closed-loop simulation of the speed controller.
//
// The motor is reduced to a first-order lag: its speed moves towards
// (1 - SLIP) times the synchronous speed of a 4-pole machine,
// 30 * f rpm, with time constant TAU_S, where the supply frequency f is
// read from the controller's frequency word (f = 10 kHz * word / 65280).
// The encoder is a LINES-line quadrature encoder: the shaft angle in
// edges (4 * LINES per revolution) is integrated every clock and its
// integer part is put out as the Gray sequence 00, 10, 11, 01 on A and B
// (A leads B when turning forward).
// Interface: clk (20 MHz), freq_word in; enc_a, enc_b and the model speed
// rpm out.
`timescale 1ns/1ps
module motor_encoder_model #(
  parameter real CLK_HZ = 20.0e6,
  parameter real TAU_S  = 0.08,
  parameter real SLIP   = 0.04,
  parameter int  LINES  = 500
) (
  input  logic        clk,
  input  logic [15:0] freq_word,
  output logic        enc_a,
  output logic        enc_b,
  output real         rpm
);

  real angle = 0.0;          // shaft angle in encoder edges
  longint edge_pos = 0;

  initial begin
    rpm   = 0.0;
    enc_a = 1'b0;
    enc_b = 1'b0;
  end

  always @(posedge clk) begin
    real f_hz, target;
    f_hz   = 10000.0 * real'(freq_word) / 65280.0;
    target = 30.0 * f_hz * (1.0 - SLIP);
    rpm    = rpm + (target - rpm) / (TAU_S * CLK_HZ);
    angle  = angle + rpm / 60.0 * real'(4 * LINES) / CLK_HZ;
    if (longint'($floor(angle)) != edge_pos) begin
      edge_pos = longint'($floor(angle));
      case (edge_pos % 4)
        0: {enc_a, enc_b} <= 2'b00;
        1: {enc_a, enc_b} <= 2'b10;
        2: {enc_a, enc_b} <= 2'b11;
        default: {enc_a, enc_b} <= 2'b01;
      endcase
    end
  end

endmodule
