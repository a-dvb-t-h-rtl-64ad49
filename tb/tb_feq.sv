// tb_feq: frequency-domain equaliser terms.
//
// Random received cells R and channel estimates H (full 16-bit range) are
// applied with random sideband values; one cycle later the outputs must be
// exactly Z = R*conj(H), G = |H|^2, and the carrier index, data flag and
// last flag must be passed along unchanged. Watchdog: 20000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_feq;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_data = 0, in_last = 0;
  logic [13:0] in_k = '0;
  cplx_t in_r = '0, in_h = '0;
  logic out_valid, out_data, out_last;
  logic [13:0] out_k;
  logic signed [2*DW:0] z_re, z_im;
  logic [2*DW:0] g;
  int checks = 0, failures = 0;

  feq dut (.clk, .rst_n, .in_valid, .in_k, .in_data, .in_last, .in_r, .in_h,
           .out_valid, .out_k, .out_data, .out_last, .z_re, .z_im, .g);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      longint rr, ri, hr, hi, er, ei, eg;
      @(negedge clk);
      in_valid = 1'b1;
      in_k = 14'($urandom); in_data = 1'($urandom); in_last = 1'($urandom);
      in_r.re = 16'($urandom); in_r.im = 16'($urandom);
      in_h.re = 16'($urandom); in_h.im = 16'($urandom);
      if (n == 0) begin in_r.re = -16'sd32768; in_h.re = -16'sd32768; in_h.im = -16'sd32768; end
      rr = longint'(in_r.re); ri = longint'(in_r.im);
      hr = longint'(in_h.re); hi = longint'(in_h.im);
      er = rr * hr + ri * hi;
      ei = ri * hr - rr * hi;
      eg = hr * hr + hi * hi;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || longint'(z_re) != er || longint'(z_im) != ei || longint'(g) != eg
          || out_k != in_k || out_data != in_data || out_last != in_last) begin
        failures++;
        if (failures < 10) $display("n %0d: z %0d %0d g %0d exp %0d %0d %0d", n, z_re, z_im, g, er, ei, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
