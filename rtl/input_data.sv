// input_data: serial loader for the three synthesizer constants.
//
// A control unit (for example a microcontroller) writes the constants over a
// three-wire serial link clocked by data_clk3. On each rising edge of
// data_clk3 one bit of data_in is taken:
//   reg_cnt = 1 : the bit is shifted into the ADDR_W-bit address register,
//   reg_cnt = 0 : the bit is shifted into the constant register the address
//                 register currently selects (see pulse_synth_pkg::reg_sel_e).
// All registers shift MSB first: the new bit enters at bit 0 and the older
// bits move one place up, so after W bits the register holds the W-bit word
// sent most significant bit first. With address SEL_NONE data bits are dropped.
//
// Outputs k0 (duty constant), k1 (frequency word) and k2 (pulse count - 1) are
// the parallel outputs of the shift registers and change bit by bit while a
// word is being shifted in; they are meant to be quasi-static, written while
// the synthesizer is stopped (mng[2] = 0) and read by the clk domain directly.
// The serial-address-plus-shift-register scheme and the three constants
// follow the source design; the bit order, the address code, the use of a
// fourth "none" address and the asynchronous active-low reset are this
// design's own.
`timescale 1ns / 1ps

module input_data
  import pulse_synth_pkg::*;
#(
  parameter int unsigned N   = PHASE_W,  // width of k1
  parameter int unsigned P   = CMP_W,    // width of k0
  parameter int unsigned K2W = K2_W      // width of k2
) (
  input  logic           data_clk3,  // serial clock from the control unit
  input  logic           rst_n,      // asynchronous reset, active low
  input  logic           reg_cnt,    // 1: address bit, 0: data bit
  input  logic           data_in,    // serial address or data bit
  output logic [P-1:0]   k0,         // duty-cycle constant
  output logic [N-1:0]   k1,         // frequency control word
  output logic [K2W-1:0] k2,         // number of pulses minus one
  output reg_sel_e       sel         // current address register contents
);

  always_ff @(posedge data_clk3 or negedge rst_n) begin
    if (!rst_n) begin
      sel <= SEL_NONE;
      k0  <= '0;
      k1  <= '0;
      k2  <= '0;
    end else if (reg_cnt) begin
      sel <= reg_sel_e'({sel[ADDR_W-2:0], data_in});
    end else begin
      unique case (sel)
        SEL_K0:   k0 <= {k0[P-2:0], data_in};
        SEL_K1:   k1 <= {k1[N-2:0], data_in};
        SEL_K2:   k2 <= {k2[K2W-2:0], data_in};
        SEL_NONE: ;
      endcase
    end
  end

endmodule
