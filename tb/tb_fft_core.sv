// tb_fft_core: checks the FFT/IFFT against a direct DFT computed in real
// arithmetic, for a 2K forward transform and a 4K inverse transform of
// random data, and checks the compute time (done L*N/2 + 1 cycles after start).
// The core returns the DFT sum divided by 2^ceil(log2N/2).
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_fft_core;
  import dvb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [3:0] log2n;
  logic inverse, wr_en, start, busy, done;
  logic [LOGMAX-1:0] wr_addr, rd_addr;
  cplx_t wr_data, rd_data;

  fft_core dut (.clk, .rst_n, .log2n, .inverse, .wr_en, .wr_addr, .wr_data,
                .start, .busy, .done, .rd_addr, .rd_data);

  real xr [8192], xi [8192];

  task automatic run(int l, bit inv);
    int n, cyc;
    real gain, maxerr, er, ei, sr, si, a;
    n = 1 << l;
    log2n = 4'(l); inverse = inv;
    for (int i = 0; i < n; i++) begin
      xr[i] = real'($urandom_range(2000)) - 1000.0;
      xi[i] = real'($urandom_range(2000)) - 1000.0;
    end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = LOGMAX'(i);
      wr_data.re = 16'($rtoi(xr[i])); wr_data.im = 16'($rtoi(xi[i]));
    end
    @(negedge clk); wr_en = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != l * n / 2 + 1) begin
      failures++; $display("compute took %0d cycles, expected %0d", cyc, l * n / 2 + 1);
    end
    gain = real'(1 << ((l + 1) / 2));
    maxerr = 0;
    // check 64 output bins against the direct DFT
    for (int t = 0; t < 64; t++) begin
      int k;
      k = (t * 97 + 5) % n;
      sr = 0; si = 0;
      for (int i = 0; i < n; i++) begin
        a = (inv ? 1.0 : -1.0) * 6.283185307179586 * real'((i * k) % n) / real'(n);
        sr += xr[i] * $cos(a) - xi[i] * $sin(a);
        si += xr[i] * $sin(a) + xi[i] * $cos(a);
      end
      sr = sr / gain; si = si / gain;
      @(negedge clk); rd_addr = LOGMAX'(k);
      @(negedge clk);
      er = real'(rd_data.re) - sr; ei = real'(rd_data.im) - si;
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      checks++;
      if (er > 3.0 || ei > 3.0) begin
        failures++;
        if (failures < 5) $display("N=%0d inv=%0d bin %0d: got %0d,%0d want %f,%f", n, inv, k, $signed(rd_data.re), $signed(rd_data.im), sr, si);
      end
    end
  endtask

  initial begin
    wr_en = 0; start = 0; rd_addr = '0; wr_addr = '0; wr_data = '0; log2n = 4'd11; inverse = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(11, 0);
    run(12, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
