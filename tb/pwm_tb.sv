// pwm_tb: self-checking test of the comparator-and-multiplexer PWM block.
//
// Random phase_top, k0, sel_50 and en values are applied; one clk later the
// registered output must equal the expected value computed here:
// en ? (sel_50 ? phase_top < 2^(P-1) : phase_top <= k0) : 0.
// A sweep of phase_top over one whole period for several k0 values checks
// that the output is high for exactly k0 + 1 of the 2^P phase steps
// (tau ~ k0 * T_out / 2^P), and for 2^(P-1) steps in 50% mode.
`timescale 1ns / 1ps

module pwm_tb;
  localparam int unsigned P = 12;

  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, sel_50 = 1'b0;
  logic [P-1:0] phase_top = '0, k0 = '0;
  logic pulse;
  int checks = 0, failures = 0;
  localparam int K0_LIST[8] = '{0, 1, 10, 100, 1000, 2048, 4090, 4095};

  pwm dut (.*);

  always #10 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_v;
    int high;

    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      phase_top = P'($urandom());
      k0 = (t % 5 == 0) ? phase_top + P'($urandom_range(0, 1)) : P'($urandom());
      sel_50 = ($urandom_range(0, 3) == 0);
      en = ($urandom_range(0, 7) != 0);
      if (!en) exp_v = 1'b0;
      else if (sel_50) exp_v = (int'(phase_top) < (1 << (P - 1)));
      else exp_v = (int'(phase_top) <= int'(k0));
      @(negedge clk);
      checks++;
      if (pulse !== exp_v) begin
        failures++;
        $display("FAIL ph=%0d k0=%0d s50=%0d en=%0d got %0d", phase_top, k0, sel_50, en, pulse);
      end
    end
    en = 1'b1;
    for (int s = 0; s <= 8; s++) begin
      sel_50 = (s == 8);
      k0 = (s < 8) ? P'(K0_LIST[s]) : P'(0);
      high = 0;
      phase_top = '0;
      @(negedge clk);
      for (int i = 1; i <= (1 << P); i++) begin
        phase_top = P'(i);
        @(negedge clk);
        high += pulse;
      end
      checks++;
      if (high != ((s < 8) ? K0_LIST[s] + 1 : (1 << (P - 1)))) begin
        failures++;
        $display("FAIL sweep k0=%0d s50=%0d high=%0d", k0, sel_50, high);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
