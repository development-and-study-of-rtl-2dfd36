// pulse_synth: one-channel programmable pulse synthesizer (top level).
//
// A direct-digital-synthesis pulse source. A phase accumulator (nco) sets the
// output frequency f_out = k1 * f_clk / 2^N; a comparator on its top P phase
// bits (pwm) sets the pulse width k0 * T_out / 2^P or a fixed 50% duty; a
// pulse counter (pulse_counter) either passes the train unchanged (continuous
// mode) or lets exactly k2 + 1 pulses out (counter mode). The constants k0,
// k1, k2 come over a serial link from a control unit (input_data).
//
// Mode selection (from the four set-ups of the source design):
//   continuous, 50%      : mng[0]=1 mng[2]=1 pls_cnt_en5=1
//   continuous, PWM      : mng[0]=0 mng[2]=1 pls_cnt_en5=1
//   counter,    50%      : mng[0]=1 mng[2]=1 pls_cnt_en5=0 pls_cnt_clr=0
//   counter,    PWM      : mng[0]=0 mng[2]=1 pls_cnt_en5=0 pls_cnt_clr=0
// mng[2] = 0 stops the NCO (phase held at 0) and holds the output low.
// mng[1] has no function in this design; the bus keeps the source's naming.
// A burst in counter mode is started by pulsing pls_cnt_clr while mng[2] = 0
// and then setting mng[2] = 1.
//
// Timing: pwm_pulse_cnt follows the phase register by one clk. The serial
// constants are in the data_clk3 domain and are used by the clk domain
// without synchronisation; write them only while mng[2] = 0. An assertion
// flags a data bit shifted into k0, k1 or k2 while mng[2] = 1.
`timescale 1ns / 1ps

module pulse_synth
  import pulse_synth_pkg::*;
#(
  parameter int unsigned N   = PHASE_W,  // phase accumulator width n
  parameter int unsigned P   = CMP_W,    // PWM comparator width p
  parameter int unsigned K2W = K2_W      // pulse counter width
) (
  input  logic       clk,            // NCO clock (50 MHz in the reference set-up)
  input  logic       rst_n,          // asynchronous reset, active low
  input  logic       data_clk3,      // serial clock from the control unit
  input  logic       reg_cnt,        // serial: 1 address bit, 0 data bit
  input  logic       data_in,        // serial address or data bit
  input  logic [2:0] mng,            // [0] 50%/PWM select, [2] run, [1] unused
  input  logic       pls_cnt_en5,    // 1 continuous mode, 0 counter mode
  input  logic       pls_cnt_clr,    // clears the pulse counter
  output logic       pwm_pulse_cnt,  // synthesizer output
  output logic       qout            // NCO MSB, test output
);

  logic [P-1:0]   k0;
  logic [N-1:0]   k1;
  logic [K2W-1:0] k2;
  reg_sel_e       sel;
  logic [N-1:0]   phase;
  logic           pwm_pulse;
  logic           burst_done;

  input_data #(.N(N), .P(P), .K2W(K2W)) u_input (
    .data_clk3 (data_clk3),
    .rst_n     (rst_n),
    .reg_cnt   (reg_cnt),
    .data_in   (data_in),
    .k0        (k0),
    .k1        (k1),
    .k2        (k2),
    .sel       (sel)
  );

  nco #(.N(N)) u_nco (
    .clk   (clk),
    .rst_n (rst_n),
    .run   (mng[2]),
    .k1    (k1),
    .phase (phase),
    .qout  (qout)
  );

  pwm #(.P(P)) u_pwm (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (mng[2]),
    .sel_50    (mng[0]),
    .phase_top (phase[N-1 -: P]),
    .k0        (k0),
    .pulse     (pwm_pulse)
  );

  pulse_counter #(.K2W(K2W)) u_cnt (
    .clk       (clk),
    .rst_n     (rst_n),
    .clr       (pls_cnt_clr),
    .en5       (pls_cnt_en5),
    .k2        (k2),
    .pulse_in  (pwm_pulse),
    .pulse_out (pwm_pulse_cnt),
    .done      (burst_done)
  );

  // constants may change only while the synthesizer is stopped
  a_load_when_stopped : assert property (
    @(posedge data_clk3) disable iff (!rst_n)
      (!reg_cnt && sel != SEL_NONE) |-> !mng[2]
  ) else $error("constant shifted in while mng[2] = 1");

endmodule
