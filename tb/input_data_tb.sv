// input_data_tb: self-checking test of the serial constant loader.
//
// A task plays the control unit: it shifts a 2-bit address with reg_cnt = 1
// and then a word MSB first with reg_cnt = 0, one bit per data_clk3 period.
// After each write all three constants are compared with a model kept in the
// testbench, so a write must land in the selected register only. Writes to
// the "none" address must change nothing. Random words are used for each
// register, plus the all-ones and all-zeros extremes.
`timescale 1ns / 1ps

module input_data_tb;
  import pulse_synth_pkg::*;

  localparam int unsigned N = 32, P = 12, K2W = 16;

  logic data_clk3 = 1'b0, rst_n = 1'b1, reg_cnt = 1'b0, data_in = 1'b0;
  logic [P-1:0] k0;
  logic [N-1:0] k1;
  logic [K2W-1:0] k2;
  reg_sel_e sel;

  logic [P-1:0]   m0 = '0;
  logic [N-1:0]   m1 = '0;
  logic [K2W-1:0] m2 = '0;
  int checks = 0, failures = 0;

  input_data dut (.*);

  task automatic sclk();
    #5 data_clk3 = 1'b1;
    #5 data_clk3 = 1'b0;
  endtask

  // address bits then data bits, both MSB first
  task automatic write(input logic [1:0] a, input logic [31:0] w, input int width);
    reg_cnt = 1'b1;
    for (int i = 1; i >= 0; i--) begin data_in = a[i]; sclk(); end
    reg_cnt = 1'b0;
    for (int i = width - 1; i >= 0; i--) begin data_in = w[i]; sclk(); end
  endtask

  task automatic check(input string what);
    checks++;
    if (k0 !== m0 || k1 !== m1 || k2 !== m2) begin
      failures++;
      $display("FAIL %s: k0=%h/%h k1=%h/%h k2=%h/%h", what, k0, m0, k1, m1, k2, m2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    check("after reset");
    checks++;
    if (sel !== SEL_NONE) begin failures++; $display("FAIL reset address"); end
    for (int it = 0; it < 40; it++) begin
      w = $urandom();
      unique case (it % 4)
        0: begin write(2'd0, w, P);   m0 = w[P-1:0];   end
        1: begin write(2'd1, w, N);   m1 = w;          end
        2: begin write(2'd2, w, K2W); m2 = w[K2W-1:0]; end
        3: begin write(2'd3, w, 20);                   end
      endcase
      check($sformatf("write %0d", it));
    end
    write(2'd1, 32'hFFFF_FFFF, N); m1 = '1; check("k1 ones");
    write(2'd0, 32'h0, P);         m0 = '0; check("k0 zeros");
    write(2'd2, 32'h6, K2W);       m2 = 16'd6; check("k2 = 6");
    checks++;
    if (sel !== SEL_K2) begin failures++; $display("FAIL address readback"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
