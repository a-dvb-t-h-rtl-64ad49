// tb_dvbt_top: end-to-end test of the DVB-T/H baseband processor.
//
// The transmitter sends 4K-mode, GI 1/8, 16-QAM symbols of random bits.
// The testbench is the channel: a static two-path channel
// y(n) = x(n) + 0.3*exp(j*1.0)*x(n-3), a carrier offset of 2.3 subcarrier
// spacings, and a stretch of noise before the signal. The receiver gets
// one sample every PACE cycles. SLIP samples are deleted and, later, one
// sample is repeated SLIP times, as sampling clock slips would do.
//
// Checks: detected mode and GI, integer CFO = 2, fractional CFO increment
// within 2 % of -0.3 subcarrier, no FFT-window overrun, and the de-mapped
// bits of every symbol during which the receiver reported a filled channel
// estimator (est_ok high before and after it) against the transmitted
// bits (symbol alignment found on the first checked symbol); at least 12
// symbols must be checked.
// Every mechanism must occur at least once: mode scan step (the 2K try
// fails first), acquisition, sample add, sample drop, time prediction,
// frequency interpolation.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_dvbt_top;
  import dvb_pkg::*;

  localparam int PACE     = 10;
  localparam int NSYM_TX  = 38;
  localparam int PRE      = 3000;
  localparam real CFO     = 2.3;
  localparam int NFT      = 4096;
  localparam int GT       = 512;
  localparam int SLIP     = 24;   // above the dead band NF/512, below the advance NF/128

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // DUT
  logic tx_din_ready, tx_out_valid, tx_out_first, tx_din_valid;
  logic [5:0] tx_din_bits;
  cplx_t tx_out_data, rx_in_data;
  logic [1:0] tx_sym_phase;
  logic rx_in_valid, rx_out_valid, rx_sym_last, rx_detected, rx_est_ok;
  logic [13:0] rx_out_k;
  logic [5:0] rx_out_bits;
  fft_mode_e rx_mode;
  gi_e rx_gi;
  logic signed [5:0] rx_icfo;
  logic [31:0] rx_fcfo_inc;
  logic [6:0] rx_events;
  logic tx_enable;

  dvbt_top dut (
    .clk, .rst_n,
    .tx_enable, .tx_mode(MODE_4K), .tx_gi(GI_1_8), .tx_constel(QAM16),
    .tx_din_valid, .tx_din_ready, .tx_din_bits,
    .tx_out_valid, .tx_out_ready(1'b1), .tx_out_data, .tx_out_first, .tx_sym_phase,
    .rx_constel(QAM16), .rx_in_valid, .rx_in_data,
    .rx_out_valid, .rx_out_k, .rx_out_bits, .rx_sym_last, .rx_detected, .rx_mode,
    .rx_gi, .rx_icfo, .rx_fcfo_inc, .rx_est_ok, .rx_events
  );

  // -------- transmitter side: random bits, remembered per symbol --------
  logic [3:0] txc [NSYM_TX+2][3409];
  int ts = 0, ci = 0;
  function automatic int ndata(int ph);
    int n = 0;
    for (int k = 0; k < n_used(MODE_4K); k++)
      if (!(is_cp(k) || is_sp(k, 2'(ph)))) n++;
    return n;
  endfunction
  int nd [4];
  initial for (int p = 0; p < 4; p++) nd[p] = ndata(p);

  assign tx_din_valid = 1'b1;
  always_ff @(posedge clk) begin
    if (!rst_n) tx_din_bits <= 6'($urandom);
    else if (tx_din_ready) begin
      txc[ts][ci] <= tx_din_bits[3:0];
      tx_din_bits <= 6'($urandom);
      if (ci == nd[ts % 4] - 1) begin ci <= 0; ts <= ts + 1; end
      else ci <= ci + 1;
    end
  end
  assign tx_enable = (ts < NSYM_TX);

  // -------- channel --------
  real qre[$], qim[$];
  real h1re, h1im;
  real dl_re [4], dl_im [4];
  int  tx_pos = 0, nsent = 0, sym_seen = 0;
  bit  dropped = 0, repeated = 0;
  initial begin
    h1re = 0.3 * $cos(1.0); h1im = 0.3 * $sin(1.0);
    for (int i = 0; i < 4; i++) begin dl_re[i] = 0; dl_im[i] = 0; end
    for (int i = 0; i < PRE; i++) begin
      qre.push_back(real'($urandom_range(600)) - 300.0);
      qim.push_back(real'($urandom_range(600)) - 300.0);
    end
  end

  always @(posedge clk) if (rst_n && tx_out_valid) begin
    real xr, xi, yr, yi, ph;
    int n;
    if (tx_out_first) begin tx_pos = 0; sym_seen++; end
    xr = real'(tx_out_data.re); xi = real'(tx_out_data.im);
    for (int i = 3; i > 0; i--) begin dl_re[i] = dl_re[i-1]; dl_im[i] = dl_im[i-1]; end
    dl_re[0] = xr; dl_im[0] = xi;
    yr = xr + h1re * dl_re[3] - h1im * dl_im[3];
    yi = xi + h1re * dl_im[3] + h1im * dl_re[3];
    n = nsent;
    ph = 6.283185307179586 * CFO * real'(n) / real'(NFT);
    // clock slips: delete the last SLIP samples of symbol 22, repeat the last
    // sample of symbol 31 SLIP times; both lie after the FFT window, which
    // ends NF/128 samples before the symbol end
    if (sym_seen == 22 && tx_pos >= GT + NFT - SLIP) begin
      dropped = 1;
    end else begin
      qre.push_back(yr * $cos(ph) - yi * $sin(ph));
      qim.push_back(yr * $sin(ph) + yi * $cos(ph));
      nsent++;
      if (sym_seen == 31 && tx_pos == GT + NFT - 1 && !repeated) begin
        repeated = 1;
        for (int i = 0; i < SLIP; i++) begin
          qre.push_back(yr * $cos(ph) - yi * $sin(ph));
          qim.push_back(yr * $sin(ph) + yi * $cos(ph));
        end
      end
    end
    tx_pos++;
  end

  function automatic logic signed [15:0] q16(real v);
    if (v > 32767.0) return 16'sd32767;
    if (v < -32768.0) return -16'sd32768;
    return 16'($rtoi(v < 0 ? v - 0.5 : v + 0.5));
  endfunction

  int pace = 0;
  always_ff @(posedge clk) begin
    rx_in_valid <= 1'b0;
    if (rst_n) begin
      pace <= (pace == PACE - 1) ? 0 : pace + 1;
      if (pace == 0 && qre.size() > 0) begin
        rx_in_valid   <= 1'b1;
        rx_in_data.re <= q16(qre.pop_front());
        rx_in_data.im <= q16(qim.pop_front());
      end
    end
  end

  // -------- receiver side --------
  int ev [7];
  initial for (int i = 0; i < 7; i++) ev[i] = 0;
  always @(posedge clk) if (rst_n) for (int i = 0; i < 7; i++) if (rx_events[i]) ev[i]++;

  logic [3:0] rxc [3409];
  int rn = 0, rs = 0, off = -1000, checked_syms = 0, total_err = 0;
  bit ok_at_start = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_out_valid) begin
      rxc[rn] = rx_out_bits[3:0];
      rn++;
    end
    if (rx_sym_last) begin
      if (ok_at_start && rx_est_ok && rs >= 1) begin
        int best_e, e, s;
        if (off == -1000) begin
          best_e = 1 << 30;
          for (int c = 0; c < ts; c++) if (nd[c % 4] == rn) begin
            e = 0;
            for (int i = 0; i < rn; i++) if (rxc[i] != txc[c][i]) e++;
            if (e < best_e) begin best_e = e; off = c - rs; end
          end
        end
        s = rs + off;
        e = 0;
        if (s < 0 || s >= ts || nd[s % 4] != rn) e = rn;
        else for (int i = 0; i < rn; i++) if (rxc[i] != txc[s][i]) e++;
        checks++;
        checked_syms++;
        total_err += e;
        if (e > 0) begin
          failures++;
          $display("symbol %0d (tx %0d): %0d of %0d cells wrong", rs, s, e, rn);
        end
      end
      ok_at_start = rx_est_ok;
      rn = 0;
      rs++;
    end
  end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (ts >= NSYM_TX && qre.size() == 0);
    repeat (200000) @(posedge clk);
    $display("rx symbols %0d, checked %0d, cell errors %0d", rs, checked_syms, total_err);
    $display("mode %0d gi %0d icfo %0d fcfo_inc %0d", rx_mode, rx_gi, rx_icfo, $signed(rx_fcfo_inc));
    $display("events acq %0d scan %0d add %0d drop %0d overrun %0d pred %0d interp %0d",
             ev[0], ev[1], ev[2], ev[3], ev[4], ev[5], ev[6]);
    checks++; if (rx_mode != MODE_4K) failures++;
    checks++; if (rx_gi != GI_1_8) failures++;
    checks++; if (rx_icfo != 6'sd2) failures++;
    begin
      real expect_inc, err;
      expect_inc = -0.3 / real'(NFT) * 4294967296.0;
      err = real'($signed(rx_fcfo_inc)) - expect_inc;
      if (err < 0) err = -err;
      checks++;
      if (err > -0.02 * expect_inc) failures++;
    end
    checks++; if (checked_syms < 12) failures++;
    checks++; if (ev[4] != 0) failures++;
    for (int i = 0; i < 7; i++) if (i != 4) begin
      checks++;
      if (ev[i] == 0) begin failures++; $display("event %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
