// tb_demapper: hard-decision de-mapper against the mapper's bit mapping.
//
// For each constellation, random bit patterns are mapped with a reference
// table, passed through a random complex channel gain H (magnitude 0.5 to
// 1.5 of the pilot unit) plus small noise, and turned into the FEQ terms
// Z = R*conj(H), G = |H|^2 as the equaliser would. The de-mapper output
// bits must equal the sent bits. Pilot cells (in_data = 0) must produce no
// output and in_last must give one sym_last pulse. Watchdog: 50000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_demapper;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  constel_e constel;
  logic in_valid = 0, in_data = 0, in_last = 0;
  logic [13:0] in_k = '0;
  logic signed [2*DW:0] z_re = '0, z_im = '0;
  logic [2*DW:0] g = '0;
  logic out_valid, sym_last;
  logic [13:0] out_k;
  logic [5:0] out_bits;
  int checks = 0, failures = 0, n_out = 0, n_last = 0;

  demapper dut (.clk, .rst_n, .constel, .in_valid, .in_data, .in_last, .in_k,
                .z_re, .z_im, .g, .out_valid, .out_k, .out_bits, .sym_last);

  always @(posedge clk) if (rst_n) begin
    if (out_valid) n_out++;
    if (sym_last) n_last++;
  end

  function automatic int ref_axis(logic s, logic b1, logic b2, constel_e c);
    int m;
    case (c)
      QPSK:    m = LVL_QPSK;
      QAM16:   m = (b1 ? 3 : 1) * LVL_QAM16;
      default: case ({b1, b2})
                 2'b00: m = 1 * LVL_QAM64;
                 2'b01: m = 3 * LVL_QAM64;
                 2'b11: m = 5 * LVL_QAM64;
                 default: m = 7 * LVL_QAM64;
               endcase
    endcase
    return s ? -m : m;
  endfunction

  initial begin
    int seed = 7;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3; c++) begin
      logic [5:0] mask;
      constel = constel_e'(c);
      mask = (c == 0) ? 6'h03 : (c == 1) ? 6'h0f : 6'h3f;
      for (int n = 0; n < 400; n++) begin
        logic [5:0] b;
        real cr, ci, a, p, hr, hi, rr, ri;
        b = 6'($urandom(seed + n * 3 + c * 1000)) & mask;
        cr = ref_axis(b[0], b[2], b[4], constel_e'(c));
        ci = ref_axis(b[1], b[3], b[5], constel_e'(c));
        a  = 512.0 + real'($urandom % 1024);
        p  = 6.2831853 * real'($urandom % 1000) / 1000.0;
        hr = a * $cos(p); hi = a * $sin(p);
        rr = (hr * cr - hi * ci) / 1024.0 + real'(int'($urandom % 9) - 4);
        ri = (hr * ci + hi * cr) / 1024.0 + real'(int'($urandom % 9) - 4);
        @(negedge clk);
        in_valid = 1; in_data = 1; in_last = 0; in_k = 14'(n);
        begin
          int ir, ii, ihr, ihi;
          ir = $rtoi(rr); ii = $rtoi(ri); ihr = $rtoi(hr); ihi = $rtoi(hi);
          z_re = (2*DW+1)'(ir * ihr + ii * ihi);
          z_im = (2*DW+1)'(ii * ihr - ir * ihi);
          g    = (2*DW+1)'(ihr * ihr + ihi * ihi);
        end
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || (out_bits & mask) != b || out_k != 14'(n)) begin
          failures++;
          if (failures < 10) $display("constel %0d: sent %b got %b", c, b, out_bits);
        end
      end
    end
    // pilot cell, then last cell of a symbol
    @(negedge clk); n_out = 0; n_last = 0;
    @(negedge clk); in_valid = 1; in_data = 0; in_last = 0;
    @(negedge clk); in_valid = 1; in_data = 0; in_last = 1;
    @(negedge clk); in_valid = 0; in_last = 0;
    repeat (3) @(negedge clk);
    checks++; if (n_out != 0) begin failures++; $display("pilot gave output"); end
    checks++; if (n_last != 1) begin failures++; $display("sym_last count %0d", n_last); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
