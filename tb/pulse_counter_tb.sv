// pulse_counter_tb: self-checking test of the counter-mode gate.
//
// The testbench makes its own pulse train (period and high time chosen at
// random per run) and counts the pulses that come out. In counter mode
// (en5 = 0) exactly k2 + 1 whole pulses must pass and then the output must
// stay low, with done set; pls_cnt_clr must start a new burst. In continuous
// mode (en5 = 1) every pulse must pass.
`timescale 1ns / 1ps

module pulse_counter_tb;
  localparam int unsigned K2W = 16;

  logic clk = 1'b0, rst_n = 1'b1, clr = 1'b1, en5 = 1'b0;
  logic [K2W-1:0] k2 = '0;
  logic pulse_in = 1'b0, pulse_out, done;
  int checks = 0, failures = 0;

  pulse_counter dut (.*);

  always #10 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive n pulses of the given shape and count rising edges of pulse_out;
  // also verify pulse_out never exceeds pulse_in and that passed pulses are whole
  task automatic run_train(input int n, input int period, input int high_t, output int got);
    logic o_d;
    int hi_len;
    got = 0;
    o_d = pulse_out;
    hi_len = 0;
    for (int p = 0; p < n; p++) begin
      for (int c = 0; c < period; c++) begin
        pulse_in = (c < high_t);
        @(negedge clk);
        if (pulse_out && !pulse_in) begin failures++; $display("FAIL out without in"); end
        if (pulse_out) hi_len++;
        if (!pulse_out && o_d) begin
          checks++;
          if (hi_len != high_t) begin failures++; $display("FAIL cut pulse %0d", hi_len); end
          hi_len = 0;
        end
        if (pulse_out && !o_d) got++;
        o_d = pulse_out;
      end
    end
    pulse_in = 1'b0;
  endtask

  initial begin
    int got, period, high_t, nk;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // counter mode bursts
    for (int t = 0; t < 12; t++) begin
      nk = (t == 0) ? 6 : $urandom_range(0, 40);
      period = $urandom_range(3, 40);
      high_t = $urandom_range(1, period - 1);
      k2 = K2W'(nk);
      en5 = 1'b0;
      clr = 1'b1;
      @(negedge clk);
      clr = 1'b0;
      run_train(nk + 10, period, high_t, got);
      checks++;
      if (got != nk + 1) begin
        failures++;
        $display("FAIL k2=%0d: %0d pulses, expected %0d", nk, got, nk + 1);
      end
      checks++;
      if (!done) begin failures++; $display("FAIL done not set"); end
    end
    // continuous mode: all pulses pass, clr ignored for gating
    en5 = 1'b1;
    k2 = 16'd2;
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    run_train(30, 10, 4, got);
    checks++;
    if (got != 30) begin failures++; $display("FAIL continuous %0d pulses", got); end
    checks++;
    if (done) begin failures++; $display("FAIL done in continuous mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
