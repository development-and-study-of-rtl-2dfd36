// nco: numerically controlled oscillator (phase accumulator).
//
// An N-bit adder and an N-bit register: every rising edge of clk the phase
// advances by the frequency control word k1, modulo 2^N, so the phase wraps
// k1 * f_clk / 2^N times per second. That is the output frequency
//   f_out = k1 * f_clk / 2^N,   T_out = 2^N / (k1 * f_clk).
// qout is the phase MSB, a 50% square wave at f_out used as a test output;
// phase goes on to the PWM comparator.
//
// run (mng[2] in the synthesizer) enables the accumulator. With run = 0 the
// phase is held at zero, so every run starts at phase 0 and the first output
// period is a whole one. The adder-plus-register structure follows the source
// design; holding the phase at zero while stopped and the asynchronous
// active-low reset are this design's own choices.
// Timing: phase is registered; qout is the register's MSB (no extra delay).
`timescale 1ns / 1ps

module nco
  import pulse_synth_pkg::*;
#(
  parameter int unsigned N = PHASE_W  // phase accumulator width
) (
  input  logic         clk,
  input  logic         rst_n,   // asynchronous reset, active low
  input  logic         run,     // 1: accumulate, 0: phase held at zero
  input  logic [N-1:0] k1,      // frequency control word
  output logic [N-1:0] phase,   // accumulator contents
  output logic         qout     // phase MSB, square wave at f_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= '0;
    else if (!run) phase <= '0;
    else           phase <= phase + k1;
  end

  assign qout = phase[N-1];

endmodule
