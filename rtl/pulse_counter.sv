// pulse_counter: counter block for the "definite number of pulses" mode.
//
// A counter counts completed pulses (falling edges) of the PWM output and a
// comparator checks it against k2. In counter mode (en5 = 0) the pulse train
// passes until the falling edge of the pulse that finds the count equal to
// k2; that edge sets done and the output stays low from then on. So k2 + 1
// pulses come out, which is why k2 is loaded as "number of pulses minus one".
// clr (pls_cnt_clr) clears the count and done and starts a new burst. With
// en5 (pls_cnt_en5) = 1 the block neither counts nor gates: continuous mode.
//
// Timing: pulse_in is sampled on clk; pulse_out = pulse_in & ~done is
// combinational from two registers, with no added delay. The counter plus
// comparator structure, the "k2 = pulses - 1" rule and the signal values of
// each mode (en5 = 1 continuous, en5 = 0 and clr = 0 counting) follow the
// source design; counting falling edges, the synchronous active-high clear and
// the done flag are this design's own.
`timescale 1ns / 1ps

module pulse_counter
  import pulse_synth_pkg::*;
#(
  parameter int unsigned K2W = K2_W  // counter and k2 width
) (
  input  logic           clk,
  input  logic           rst_n,     // asynchronous reset, active low
  input  logic           clr,       // synchronous clear, active high
  input  logic           en5,       // 1: continuous (bypass), 0: counter mode
  input  logic [K2W-1:0] k2,        // number of pulses minus one
  input  logic           pulse_in,  // pulse train from the PWM block
  output logic           pulse_out, // gated pulse train
  output logic           done       // burst finished (counter mode)
);

  logic           pulse_q;   // pulse_in one clk earlier
  logic [K2W-1:0] cnt;       // completed pulses in this burst
  logic           fall;
  logic           at_k2;     // comparator: cnt == k2

  assign fall  = pulse_q & ~pulse_in;
  assign at_k2 = (cnt == k2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pulse_q <= 1'b0;
      cnt     <= '0;
      done    <= 1'b0;
    end else begin
      pulse_q <= pulse_in;
      if (clr) begin
        cnt  <= '0;
        done <= 1'b0;
      end else if (!en5 && !done && fall) begin
        if (at_k2) done <= 1'b1;
        else       cnt  <= cnt + 1'b1;
      end
    end
  end

  assign pulse_out = pulse_in & (en5 | ~done);

endmodule
