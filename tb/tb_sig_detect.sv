// tb_sig_detect: mode/GI detection, symbol timing and fractional CFO.
//
// The testbench makes an OFDM-like signal: each symbol is NF random complex
// samples with its last G samples copied in front as the guard interval,
// after a stretch of weaker noise and with a carrier offset of eps
// subcarriers (rotation exp(j 2 pi eps n / NF)). Two cases, each after a
// reset: 2K with GI 1/4 and eps = 0.2, and 8K with GI 1/32 and eps = -0.35
// (the 2K and 4K tries must fail first, one `scan_next` each).
// Checks: detected, mode, GI, one acq_done, phase_inc within 3 % of
// -eps * 2^32 / NF, and every reported peak within NF/128 of the true
// end of a symbol. Watchdog: 2000000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_sig_detect;
  import dvb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 0, detected, peak_valid, acq_done, scan_next;
  cplx_t in_data = '0;
  logic [31:0] in_idx = '0, phase_inc, peak_idx;
  fft_mode_e mode;
  gi_e gi;
  int checks = 0, failures = 0;

  sig_detect dut (.clk, .rst_n, .in_valid, .in_data, .in_idx, .detected, .mode, .gi,
                  .phase_inc, .peak_valid, .peak_idx, .acq_done, .scan_next);

  int n_acq = 0, n_scan = 0, n_peak = 0, bad_peak = 0;
  int c_nf = 2048, c_g = 512, c_pre = 3000;

  always @(posedge clk) if (rst_n) begin
    if (acq_done) n_acq++;
    if (scan_next) n_scan++;
    if (peak_valid) begin
      int rel, per, ph;
      n_peak++;
      per = c_nf + c_g;
      rel = int'(peak_idx) - c_pre;
      ph = ((rel % per) + per) % per;   // true end of a symbol is ph = per - 1
      if (rel < 0 || (ph < per - 1 - c_nf / 128 && ph > c_nf / 128 - 1)) begin
        bad_peak++;
        if (bad_peak < 5) $display("peak at %0d (phase %0d of %0d)", rel, ph, per);
      end
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  task automatic run(int lg, int g, real eps, int nsym, fft_mode_e em, gi_e eg, int nscan);
    real sre [], sim [];
    int nf, n;
    real expect_inc, err;
    nf = 1 << lg;
    c_nf = nf; c_g = g;
    n_acq = 0; n_scan = 0; n_peak = 0; bad_peak = 0;
    @(negedge clk); rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    sre = new[nf]; sim = new[nf];
    n = 0;
    for (int i = 0; i < c_pre; i++) begin
      @(negedge clk);
      in_valid = 1'b1; in_idx = 32'(n); n++;
      in_data.re = DW'($rtoi(800.0 * gauss())); in_data.im = DW'($rtoi(800.0 * gauss()));
      @(negedge clk); in_valid = 1'b0;
      repeat (2) @(negedge clk);
    end
    for (int s = 0; s < nsym; s++) begin
      for (int i = 0; i < nf; i++) begin sre[i] = 3000.0 * gauss(); sim[i] = 3000.0 * gauss(); end
      for (int i = 0; i < nf + g; i++) begin
        int j;
        real ph, xr, xi;
        j = (i < g) ? nf - g + i : i - g;
        ph = 6.283185307179586 * eps * real'(n) / real'(nf);
        xr = sre[j] + 300.0 * gauss(); xi = sim[j] + 300.0 * gauss();
        @(negedge clk);
        in_valid = 1'b1; in_idx = 32'(n); n++;
        in_data.re = DW'($rtoi(xr * $cos(ph) - xi * $sin(ph)));
        in_data.im = DW'($rtoi(xr * $sin(ph) + xi * $cos(ph)));
        @(negedge clk); in_valid = 1'b0;
        repeat (2) @(negedge clk);
      end
    end
    expect_inc = -eps / real'(nf) * 4294967296.0;
    err = real'($signed(phase_inc)) - expect_inc;
    if (err < 0) err = -err;
    if (expect_inc < 0) expect_inc = -expect_inc;
    checks++;
    if (!detected || mode != em || gi != eg || n_acq != 1 || n_scan != nscan) begin
      failures++;
      $display("NF %0d: detected %0d mode %0d gi %0d acq %0d scan %0d", nf, detected, mode, gi, n_acq, n_scan);
    end
    checks++;
    if (err > 0.03 * expect_inc) begin
      failures++;
      $display("NF %0d: phase_inc %0d, expected %f", nf, $signed(phase_inc), -eps / real'(nf) * 4294967296.0);
    end
    checks++;
    if (bad_peak != 0 || n_peak < 2) begin
      failures++;
      $display("NF %0d: %0d peaks, %0d misplaced", nf, n_peak, bad_peak);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(11, 512, 0.2, 14, MODE_2K, GI_1_4, 0);
    run(13, 256, -0.35, 12, MODE_8K, GI_1_32, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
