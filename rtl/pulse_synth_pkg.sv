// pulse_synth_pkg: sizes and encodings shared by the pulse synthesizer blocks.
//
// PHASE_W is the width n of the NCO phase accumulator, CMP_W the width p of
// the PWM comparator, and K2_W the width of the pulse-count constant and of
// the pulse counter. CMP_W = 12 follows from the stated PWM resolution:
// 10 us / 2^12 = 2.4414 ns, and from the largest duty constant used (4095).
// PHASE_W = 32 and K2_W = 16 are this design's own choices; nothing ties
// them to a particular value.
//
// reg_sel_e is the code shifted into the address register of the serial
// input block to choose which constant the following data bits load.
`timescale 1ns / 1ps

package pulse_synth_pkg;

  parameter int unsigned PHASE_W = 32;  // n, phase accumulator width
  parameter int unsigned CMP_W   = 12;  // p, PWM comparator width
  parameter int unsigned K2_W    = 16;  // pulse-count constant width
  parameter int unsigned ADDR_W  = 2;   // serial address register width

  typedef enum logic [ADDR_W-1:0] {
    SEL_K0   = 2'd0,  // duty-cycle constant k0
    SEL_K1   = 2'd1,  // frequency control word k1
    SEL_K2   = 2'd2,  // pulse-count constant k2 (pulses - 1)
    SEL_NONE = 2'd3   // no register: data bits are ignored
  } reg_sel_e;

endpackage
