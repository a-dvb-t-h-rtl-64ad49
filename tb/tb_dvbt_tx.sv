// tb_dvbt_tx: inner transmitter (mapper, frame adaption, IFFT, guard).
//
// 2K mode, GI 1/8, QPSK, random input bits, random out_ready. Four symbols
// are captured. For each: N + G samples with out_first on the first one,
// the guard equal to the last G useful samples, and a direct DFT of the
// useful part (divided by the IFFT's gain N / 2^ceil(log2 N / 2)) that
// gives back, on every used carrier, the pilot (+-4/3 UNIT, reference PRBS
// sign, scattered pattern of symbol index mod 4) or the QPSK cell of the
// next input bits, within 8 LSB; unused carriers must be near zero.
// Watchdog: 3000000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_dvbt_tx;
  import dvb_pkg::*;

  localparam int N = 2048, G = 256, K = 1705, NSYM = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic din_valid = 0, din_ready, out_valid, out_ready = 0, out_first;
  logic [5:0] din_bits = '0;
  cplx_t out_data;
  logic [1:0] sym_phase;
  int checks = 0, failures = 0;

  dvbt_tx dut (.clk, .rst_n, .enable(1'b1), .mode(MODE_2K), .gi(GI_1_8), .constel(QPSK),
               .din_valid, .din_ready, .din_bits, .out_valid, .out_ready, .out_data,
               .out_first, .sym_phase);

  logic [1:0] bits_q [$];
  always @(negedge clk) begin
    din_valid = 1'($urandom % 4 != 0);
    din_bits  = 6'($urandom);
    out_ready = 1'($urandom % 3 != 0);
  end
  always @(posedge clk) if (rst_n && din_valid && din_ready) bits_q.push_back(din_bits[1:0]);

  int xre [$], xim [$], firsts [$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (out_first) firsts.push_back(xre.size());
    xre.push_back(int'(out_data.re));
    xim.push_back(int'(out_data.im));
  end

  real cw [N], sw [N];

  initial begin
    for (int i = 0; i < N; i++) begin
      cw[i] = $cos(6.283185307179586 * real'(i) / real'(N));
      sw[i] = $sin(6.283185307179586 * real'(i) / real'(N));
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (xre.size() >= NSYM * (N + G));
    for (int s = 0; s < NSYM; s++) begin
      int b0, bad_g, bad_c;
      logic [10:0] prbs;
      b0 = s * (N + G);
      checks++;
      if (firsts.size() <= s || firsts[s] != b0) begin failures++; $display("symbol %0d: out_first misplaced", s); end
      bad_g = 0;
      for (int i = 0; i < G; i++) if (xre[b0 + i] != xre[b0 + N + i] || xim[b0 + i] != xim[b0 + N + i]) bad_g++;
      checks++;
      if (bad_g != 0) begin failures++; $display("symbol %0d: %0d guard samples differ", s, bad_g); end
      prbs = '1; bad_c = 0;
      for (int k = 0; k < N; k++) begin
        int bin;
        real yr, yi, er, ei;
        bin = (k - (K - 1) / 2 + N) % N;
        yr = 0; yi = 0;
        for (int n = 0; n < N; n++) begin
          int ix;
          ix = (bin * n) % N;
          yr += real'(xre[b0 + G + n]) * cw[ix] + real'(xim[b0 + G + n]) * sw[ix];
          yi += real'(xim[b0 + G + n]) * cw[ix] - real'(xre[b0 + G + n]) * sw[ix];
        end
        yr = yr / 32.0; yi = yi / 32.0;
        if (k >= K) begin er = 0; ei = 0; end
        else if (is_cp(k) || k % 12 == 3 * (s % 4)) begin
          er = prbs[10] ? -1365.0 : 1365.0; ei = 0;
        end else begin
          logic [1:0] b;
          b = bits_q.pop_front();
          er = b[0] ? -724.0 : 724.0; ei = b[1] ? -724.0 : 724.0;
        end
        if (k < K) prbs = prbs_next(prbs);
        checks++;
        if ((yr - er) * (yr - er) + (yi - ei) * (yi - ei) > 64.0) begin
          bad_c++; failures++;
          if (bad_c < 4) $display("symbol %0d k %0d: %f %f expected %f %f", s, k, yr, yi, er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
