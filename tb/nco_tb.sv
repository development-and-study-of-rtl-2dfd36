// nco_tb: self-checking test of the phase accumulator.
//
// The phase is compared every clk with an independent count m * k1 mod 2^32.
// The output period of qout is measured for the reference word
// k1 = round(2^32 / 500), which at f_clk = 50 MHz gives f_out = 100 kHz: the
// period must be 500 clk (one cycle either way allowed for the rounding of k1).
// run = 0 must hold the phase at zero.
`timescale 1ns / 1ps

module nco_tb;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0;
  logic [N-1:0] k1 = '0, phase;
  logic qout;
  int checks = 0, failures = 0;

  nco dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned m;
    int last_rise, cyc, periods;
    logic q_d;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random words, phase tracked against m * k1
    for (int t = 0; t < 8; t++) begin
      k1 = $urandom();
      run = 1'b0;
      @(negedge clk);
      checks++;
      if (phase !== '0) begin failures++; $display("FAIL stop does not clear"); end
      run = 1'b1;
      for (m = 1; m <= 300; m++) begin
        @(negedge clk);
        checks++;
        if (phase !== N'(m * k1)) begin
          failures++;
          $display("FAIL phase m=%0d got %h exp %h", m, phase, N'(m * k1));
        end
        checks++;
        if (qout !== phase[N-1]) begin failures++; $display("FAIL qout"); end
      end
    end
    // reference frequency: 100 kHz at 50 MHz
    run = 1'b0;
    k1 = 32'd8589935;  // round(2^32/500)
    @(negedge clk);
    run = 1'b1;
    last_rise = -1; cyc = 0; periods = 0; q_d = qout;
    while (periods < 10) begin
      @(negedge clk);
      cyc++;
      if (qout && !q_d) begin
        if (last_rise >= 0) begin
          checks++;
          if (cyc - last_rise < 499 || cyc - last_rise > 501) begin
            failures++;
            $display("FAIL period %0d clk", cyc - last_rise);
          end
          periods++;
        end
        last_rise = cyc;
      end
      q_d = qout;
    end
    // hold while stopped
    run = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (phase !== '0 || qout !== 1'b0) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
