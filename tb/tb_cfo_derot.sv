// tb_cfo_derot: NCO plus CORDIC de-rotator.
//
// A constant input of amplitude 10000 is rotated with three phase
// increments (positive, negative, large) and some idle cycles between
// samples. Sample n after reset of the accumulator must come out as
// 10000 * exp(j*2*pi*n*inc/2^32) within 4 LSB per component, with its index
// tag, one cycle after the input. A full-scale input checks saturation
// instead of wrap-around. Watchdog: 100000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_cfo_derot;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] phase_inc = '0, in_idx = '0, out_idx;
  logic in_valid = 0, out_valid;
  cplx_t in_data = '0, out_data;
  int checks = 0, failures = 0;

  cfo_derot dut (.clk, .rst_n, .phase_inc, .in_valid, .in_data, .in_idx,
                 .out_valid, .out_data, .out_idx);

  task automatic run(logic [31:0] inc, int nsamp);
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1; phase_inc = inc;
    for (int n = 0; n < nsamp; n++) begin
      real ph, er, ei, dr, di;
      @(negedge clk);
      in_valid = 1'b1; in_data.re = 16'sd10000; in_data.im = 16'sd0; in_idx = 32'(n * 7);
      @(negedge clk);
      in_valid = 1'b0;
      ph = 6.283185307179586 * real'(n) * real'(inc) / 4294967296.0;
      er = 10000.0 * $cos(ph); ei = 10000.0 * $sin(ph);
      dr = real'(out_data.re) - er; di = real'(out_data.im) - ei;
      checks++;
      if (!out_valid || out_idx != 32'(n * 7) || dr > 4.0 || dr < -4.0 || di > 4.0 || di < -4.0) begin
        failures++;
        if (failures < 10) $display("inc %0d n %0d: got %0d %0d exp %f %f", inc, n, out_data.re, out_data.im, er, ei);
      end
      if (n % 5 == 0) @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(32'd12345678, 400);
    run(-32'd98765432, 400);
    run(32'h4000_0000 + 32'd77, 64);
    // full-scale input rotated by 45 degrees must saturate, not wrap
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1; phase_inc = 32'h2000_0000;
    @(negedge clk); in_valid = 1'b1; in_data.re = 16'sd32767; in_data.im = 16'sd32767;
    @(negedge clk); in_valid = 1'b1;
    @(negedge clk); in_valid = 1'b0;
    checks++;
    if (out_data.re > 16'sd2 || out_data.re < -16'sd2 || out_data.im < 16'sd32000) begin
      failures++;
      $display("saturation: got %0d %0d", out_data.re, out_data.im);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
