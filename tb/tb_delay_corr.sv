// tb_delay_corr: delay correlation sums of eq. (1).
//
// Random samples are fed with idle gaps. The testbench keeps its own
// history of the CW-bit reduced samples and computes
// P(n) = sum r(n-k-NF) conj(r(n-k)) and E(n) = sum |r(n-k)|^2 over the
// last W samples directly. Once out_full is set (and it must be set at
// exactly NF+W samples) every output must match exactly, with its index
// tag. Run for (NF, W) = (64, 16), then, after `restart`, (256, 40) and
// (2048, 256). Watchdog: 200000 cycles.
`timescale 1ns/1ps
module tb_delay_corr;
  import dvb_pkg::*;

  localparam int CW = 12;
  localparam int SW = 2 * CW + 2 + 11;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic restart = 0, in_valid = 0, out_valid, out_full;
  logic [3:0] log2n = 4'd6;
  logic [11:0] win = 12'd16;
  cplx_t in_data = '0;
  logic [31:0] in_idx = '0, out_idx;
  logic signed [SW-1:0] p_re, p_im;
  logic [SW-1:0] e_pow;
  int checks = 0, failures = 0;

  delay_corr dut (.clk, .rst_n, .restart, .log2n, .win, .in_valid, .in_data, .in_idx,
                  .out_valid, .out_idx, .out_full, .p_re, .p_im, .e_pow);

  int hre [$], him [$];
  int nf = 64, w = 16, nin = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint pr, pi, ep;
    int i0, expect_full;
    i0 = int'(out_idx);
    expect_full = (i0 + 1 >= nf + w);
    checks++;
    if (out_full != expect_full) begin
      failures++;
      if (failures < 10) $display("idx %0d: out_full %0d", i0, out_full);
    end
    if (out_full && expect_full) begin
      pr = 0; pi = 0; ep = 0;
      for (int k = 0; k < w; k++) begin
        longint ar, ai, br, bi;
        ar = hre[i0 - k - nf]; ai = him[i0 - k - nf];
        br = hre[i0 - k];      bi = him[i0 - k];
        pr += ar * br + ai * bi;
        pi += ai * br - ar * bi;
        ep += br * br + bi * bi;
      end
      checks++;
      if (longint'(p_re) != pr || longint'(p_im) != pi || longint'(e_pow) != ep) begin
        failures++;
        if (failures < 10) $display("idx %0d: P %0d %0d E %0d exp %0d %0d %0d", i0, p_re, p_im, e_pow, pr, pi, ep);
      end
    end
  end

  task automatic feed(int ln, int ww, int count);
    @(negedge clk);
    restart = 1'b1; log2n = 4'(ln); win = 12'(ww);
    @(negedge clk);
    restart = 1'b0;
    nf = 1 << ln; w = ww;
    hre.delete(); him.delete();
    for (int n = 0; n < count; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data.re = 16'($urandom); in_data.im = 16'($urandom);
      in_idx = 32'(n);
      hre.push_back(int'(in_data.re) >>> (DW - CW));
      him.push_back(int'(in_data.im) >>> (DW - CW));
      if (n % 3 == 0) begin @(negedge clk); in_valid = 1'b0; end
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    feed(6, 16, 400);
    feed(8, 40, 1000);
    feed(11, 256, 6000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
