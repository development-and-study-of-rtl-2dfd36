// pulse_synth_tb: end-to-end test of the pulse synthesizer at its default sizes.
//
// Reference set-up: f_clk = 50 MHz (20 ns clk) and f_out = 100 kHz, so the
// frequency word is k1 = floor(2^32 / 500) = 8589934 and one output period
// is 500 clk (T_out = 10 us). The constants are loaded over the serial link
// by a task acting as the control unit (data_clk3 at 13.5 MHz, unrelated in
// phase to clk), always with mng[2] = 0.
//
// Checked, each against numbers worked out here rather than read from the
// design:
//  * continuous 50% mode: output and qout period 500 clk, high time 250 clk;
//  * continuous PWM mode for every k0 of the reference duty-cycle table
//    (k0 = 5 ... 4095): after two settling periods, the mean pulse length over
//    10 periods must be within 1 clk (20 ns) of the reference measurement
//    TAU_REF, and k0 = 5 / 4095 must give a constant 0 / 1;
//  * counter mode, 50% and PWM, with k2 = 6: exactly 7 pulses, then the output
//    stays low; a second burst after pls_cnt_clr gives 7 again;
//  * stopping with mng[2] = 0 holds the output and qout low;
//  * in continuous mode the output is compared every clk with a reference
//    model of the phase accumulator and comparator kept here (phase restarts
//    at 0 with mng[2], output registered one clk after the phase).
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns / 1ps

module pulse_synth_tb;

  logic clk = 1'b0, rst_n = 1'b1;
  logic data_clk3 = 1'b0, reg_cnt = 1'b0, data_in = 1'b0;
  logic [2:0] mng = 3'b000;
  logic pls_cnt_en5 = 1'b1, pls_cnt_clr = 1'b0;
  logic pwm_pulse_cnt, qout;

  int checks = 0, failures = 0;
  int n_serial = 0, n_mode50 = 0, n_pwm = 0, n_burst = 0, n_clear = 0, n_stop = 0;

  localparam int unsigned K1_100K = 8589934;  // floor(2^32 / 500)
  localparam int PERIOD = 500;                // clk per output period
  // reference duty-cycle table: k0 and the measured pulse length in ns
  // (-1: constant 0, -2: constant 1)
  localparam int NK = 15;
  localparam int K0_TAB[NK]  = '{5, 10, 20, 30, 40, 50, 100, 500, 700, 1000,
                                 2000, 3000, 4000, 4090, 4095};
  localparam int TAU_REF[NK] = '{-1, 20, 40, 60, 100, 120, 240, 1220, 1700, 2440,
                                 4880, 7310, 9750, 9980, -2};

  pulse_synth dut (.*);

  always #10 clk = ~clk;

  // cycle-accurate reference: phase m*k1 from the start of a run, output
  // (top 12 phase bits <= k0) or (phase MSB = 0) one clk later
  logic [31:0] k1_ref = '0, ref_phase = '0;
  logic [11:0] k0_ref = '0;
  logic        ref_pulse = 1'b0;
  int          n_cmp = 0;

  always @(posedge clk) begin
    ref_pulse <= mng[2] & (mng[0] ? ~ref_phase[31] : (ref_phase[31:20] <= k0_ref));
    ref_phase <= mng[2] ? ref_phase + k1_ref : 32'd0;
  end

  always @(negedge clk) begin
    if (rst_n && pls_cnt_en5) begin
      n_cmp++;
      checks++;
      if (pwm_pulse_cnt !== ref_pulse) begin
        failures++;
        if (failures < 10) $display("FAIL at %0t: output %0d, reference %0d", $time, pwm_pulse_cnt, ref_pulse);
      end
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // control unit: 2 address bits, then a data word, MSB first
  task automatic write(input logic [1:0] a, input logic [31:0] w, input int width);
    reg_cnt = 1'b1;
    for (int i = 1; i >= 0; i--) begin data_in = a[i]; #37 data_clk3 = 1'b1; #37 data_clk3 = 1'b0; end
    reg_cnt = 1'b0;
    for (int i = width - 1; i >= 0; i--) begin data_in = w[i]; #37 data_clk3 = 1'b1; #37 data_clk3 = 1'b0; end
    unique case (a)
      2'd0: k0_ref = w[11:0];
      2'd1: k1_ref = w;
      default: ;
    endcase
    n_serial++;
    @(negedge clk);
  endtask

  // run for n clk and report high clocks and rising edges of both outputs
  task automatic observe(input int n, output int high, output int rises,
                         output int q_rises, output int first_rise, output int last_rise);
    logic o_d, q_d;
    high = 0; rises = 0; q_rises = 0; first_rise = -1; last_rise = -1;
    o_d = pwm_pulse_cnt; q_d = qout;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      high += int'(pwm_pulse_cnt);
      if (pwm_pulse_cnt && !o_d) begin
        rises++;
        if (first_rise < 0) first_rise = c;
        last_rise = c;
      end
      if (qout && !q_d) q_rises++;
      o_d = pwm_pulse_cnt; q_d = qout;
    end
  endtask

  task automatic stop();
    mng[2] = 1'b0;
    repeat (3) @(negedge clk);
    check(pwm_pulse_cnt == 1'b0 && qout == 1'b0, "output low while stopped");
    n_stop++;
  endtask

  // one counter-mode burst from a clean start; returns pulses and high clk
  task automatic burst(input logic [2:0] mode, output int rises, output int high);
    int q_rises, fr, lr;
    pls_cnt_en5 = 1'b0;
    pls_cnt_clr = 1'b1;
    @(negedge clk);
    pls_cnt_clr = 1'b0;
    n_clear++;
    mng = mode;
    observe(20 * PERIOD, high, rises, q_rises, fr, lr);
    check(q_rises >= 19, "NCO kept running after the burst");
  endtask

  initial begin
    int high, rises, q_rises, fr, lr, exp_high;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    write(2'd1, K1_100K, 32);
    write(2'd2, 32'd6, 16);
    write(2'd0, 32'd1000, 12);

    // continuous mode without PWM (50%)
    pls_cnt_en5 = 1'b1;
    mng = 3'b101;
    observe(10 * PERIOD, high, rises, q_rises, fr, lr);
    check(rises == 10, $sformatf("50%% rises %0d", rises));
    check(rises > 1 && (lr - fr) / (rises - 1) >= PERIOD - 1 && (lr - fr) / (rises - 1) <= PERIOD + 1,
          "50% period");
    check(high >= 10 * PERIOD / 2 - 10 && high <= 10 * PERIOD / 2 + 10,
          $sformatf("50%% high %0d", high));
    check(q_rises >= 9 && q_rises <= 10, $sformatf("qout rises %0d", q_rises));
    n_mode50++;
    stop();

    // continuous mode with PWM, reference duty-cycle table
    for (int i = 0; i < NK; i++) begin
      write(2'd0, 32'(K0_TAB[i]), 12);
      mng = 3'b100;
      repeat (2 * PERIOD) @(negedge clk);
      observe(10 * PERIOD, high, rises, q_rises, fr, lr);
      $display("k0=%4d  pulse %6.1f clk = %5.2f us  DC %5.1f%%  reference %0d ns",
               K0_TAB[i], high / 10.0, high * 0.02 / 10.0, 100.0 * high / (10.0 * PERIOD), TAU_REF[i]);
      if (TAU_REF[i] == -1)
        check(high == 0, $sformatf("k0=%0d not constant 0", K0_TAB[i]));
      else if (TAU_REF[i] == -2)
        check(high == 10 * PERIOD, $sformatf("k0=%0d not constant 1", K0_TAB[i]));
      else begin
        exp_high = TAU_REF[i] / 2;  // 10 periods of 20 ns clk
        check(high >= exp_high - 10 && high <= exp_high + 10,
              $sformatf("k0=%0d high %0d clk in 10 periods, reference %0d", K0_TAB[i], high, exp_high));
        check(rises == 10, $sformatf("k0=%0d rises %0d", K0_TAB[i], rises));
      end
      n_pwm++;
      stop();
    end

    // counter mode, without PWM (k0 unused) and with PWM (k0 = 1000): k2 = 6
    write(2'd0, 32'd1000, 12);
    for (int s = 0; s < 2; s++) begin
      for (int b = 0; b < 2; b++) begin
        burst((s == 0) ? 3'b101 : 3'b100, rises, high);
        check(rises == 7, $sformatf("burst mode %0d: %0d pulses, expected 7", s, rises));
        if (s == 0)
          check(high >= 7 * PERIOD / 2 - 7 && high <= 7 * PERIOD / 2 + 7,
                $sformatf("burst 50%% high %0d", high));
        else
          check(high >= 7 * 122 && high <= 7 * 123 + 1, $sformatf("burst PWM high %0d", high));
        if (rises == 7) n_burst++;
        stop();
      end
    end
    // a larger burst: k2 = 99 -> 100 pulses
    write(2'd2, 32'd99, 16);
    pls_cnt_en5 = 1'b0;
    pls_cnt_clr = 1'b1;
    @(negedge clk);
    pls_cnt_clr = 1'b0;
    mng = 3'b101;
    observe(110 * PERIOD, high, rises, q_rises, fr, lr);
    check(rises == 100, $sformatf("k2=99 burst: %0d pulses", rises));
    stop();
    pls_cnt_en5 = 1'b1;

    $display("mechanisms: serial=%0d 50%%=%0d pwm=%0d burst=%0d clear=%0d stop=%0d compared=%0d",
             n_serial, n_mode50, n_pwm, n_burst, n_clear, n_stop, n_cmp);
    check(n_serial > 0, "serial load never happened");
    check(n_mode50 > 0, "50% mode never ran");
    check(n_pwm > 0, "PWM mode never ran");
    check(n_burst > 0, "no counter-mode burst");
    check(n_clear > 0, "counter never cleared");
    check(n_stop > 0, "never stopped");
    check(n_cmp > 0, "reference comparison never ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
