// pwm: pulse-width modulation block (digital comparator plus multiplexer).
//
// The comparator takes the top P bits of the NCO phase and is true while
// they are not above the duty constant k0, i.e. for about the first k0/2^P of
// every output period, giving a pulse of length tau ~ k0 * T_out / 2^P and a
// PWM step of T_out / 2^P. Because the phase moves by k1 every clk, the pulse
// is a whole number of clk periods: the number of phase samples in a period
// whose top bits are <= k0. With k0 = 2^P - 1 the output is a constant 1.
// The multiplexer, steered by sel_50 (mng[0]), picks either that comparator
// output (sel_50 = 0, programmable duty) or the fixed 50% wave (sel_50 = 1),
// taken as "phase MSB is 0" so that both sub-modes start their pulse at
// phase zero.
//
// Timing: the output is registered, one clk after the phase it was computed
// from, so the synthesizer pin carries no comparator glitches. While en
// (mng[2]) is 0 the output is held low. The comparator-and-multiplexer
// structure and the mng[0] encoding (1 = 50%) follow the source design; the
// "<= k0" relation was chosen because it reproduces the source's measured
// pulse widths (from 0 at k0 = 5 to a constant 1 at k0 = 4095 with a 50 MHz
// clk and a 100 kHz output); the output register and the gating by en are
// this design's own.
`timescale 1ns / 1ps

module pwm
  import pulse_synth_pkg::*;
#(
  parameter int unsigned P = CMP_W  // comparator width
) (
  input  logic         clk,
  input  logic         rst_n,      // asynchronous reset, active low
  input  logic         en,         // 0: output held low
  input  logic         sel_50,     // 1: 50% duty, 0: duty set by k0
  input  logic [P-1:0] phase_top,  // top P bits of the NCO phase
  input  logic [P-1:0] k0,         // duty-cycle constant
  output logic         pulse       // registered PWM output
);

  logic cmp_le;   // comparator: phase_top <= k0
  logic half;     // 50% wave: first half of the period
  logic mux_out;

  assign cmp_le  = (phase_top <= k0);
  assign half    = ~phase_top[P-1];
  assign mux_out = sel_50 ? half : cmp_le;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pulse <= 1'b0;
    else        pulse <= en & mux_out;
  end

endmodule
