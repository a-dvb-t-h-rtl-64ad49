// tb_wl_mobile_2k_gi4: the 2K-mode mobile workload (2K, GI 1/4, 193 Hz): a six-path typical-urban
// channel (delays 0, 0.2, 0.5, 1.6, 2.3, 5.0 us at 64/7 MHz sampling,
// powers -3, 0, -2, -6, -8, -10 dB) with every path fading at a Doppler
// frequency of 193 Hz (sum of eight sinusoids per path), GI 1/4, QPSK,
// and a carrier offset of 1.3 subcarriers. No noise is added, so what is
// left is the estimation error of the time prediction and frequency
// interpolation on a channel that changes from symbol to symbol.
// Checks: mode, GI, integer CFO, fractional CFO within 5 %, no scan step,
// no overrun, at least 5 symbols decoded with a filled channel estimator,
// bit error ratio below BER_MAX, and the acquisition, prediction and
// interpolation events seen. BER_MAX = 10 % only shows that the receiver
// stays locked and decodes: the measured ratio is 4 to 8 %, far from the
// document's results, because window restarts keep the estimator from
// filling for long and the linear prediction lags the fading.
// Watchdog: 2000000 cycles.
`timescale 1ns/1ps
module tb_wl_mobile_2k_gi4;
  import dvb_pkg::*;

  localparam int PACE     = 10;
  localparam int NSYM_TX  = 40;
  localparam int PRE      = 2000;
  localparam real CFO     = 1.3;
  localparam real SFO     = 0.0;
  localparam real FDN     = 2.1109e-05;  // Doppler / sample rate
  localparam real BER_MAX = 0.1;
  localparam int NFT      = 2048;
  localparam int GT       = 512;

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

  dvbt_tx u_tx (
    .clk, .rst_n, .enable(tx_enable), .mode(MODE_2K), .gi(GI_1_4), .constel(QPSK),
    .din_valid(tx_din_valid), .din_ready(tx_din_ready), .din_bits(tx_din_bits),
    .out_valid(tx_out_valid), .out_ready(1'b1), .out_data(tx_out_data),
    .out_first(tx_out_first), .sym_phase(tx_sym_phase)
  );

  dvbt_rx dut (
    .clk, .rst_n, .constel(QPSK), .in_valid(rx_in_valid), .in_data(rx_in_data),
    .out_valid(rx_out_valid), .out_k(rx_out_k), .out_bits(rx_out_bits), .sym_last(rx_sym_last),
    .detected(rx_detected), .mode(rx_mode), .gi(rx_gi), .icfo(rx_icfo), .fcfo_inc(rx_fcfo_inc),
    .est_ok(rx_est_ok), .ev_acq(rx_events[0]), .ev_scan_next(rx_events[1]),
    .ev_slip_add(rx_events[2]), .ev_slip_drop(rx_events[3]), .ev_overrun(rx_events[4]),
    .ev_pred(rx_events[5]), .ev_interp(rx_events[6])
  );

  // -------- transmitter side: random bits, remembered per symbol --------
  logic [5:0] txc [NSYM_TX+2][1705];
  int ts = 0, ci = 0;
  function automatic int ndata(int ph);
    int n = 0;
    for (int k = 0; k < n_used(MODE_2K); k++)
      if (!(is_cp(k) || is_sp(k, 2'(ph)))) n++;
    return n;
  endfunction
  int nd [4];
  initial for (int p = 0; p < 4; p++) nd[p] = ndata(p);

  assign tx_din_valid = 1'b1;
  always_ff @(posedge clk) begin
    if (!rst_n) tx_din_bits <= 6'($urandom);
    else if (tx_din_ready) begin
      txc[ts][ci] <= tx_din_bits;
      tx_din_bits <= 6'($urandom);
      if (ci == nd[ts % 4] - 1) begin ci <= 0; ts <= ts + 1; end
      else ci <= ci + 1;
    end
  end
  assign tx_enable = (ts < NSYM_TX);

  // -------- channel --------
  // taps: delay in samples and amplitude; each tap is a sum of NS
  // complex sinusoids with random Doppler angles and phases (static when
  // FDN = 0). The receiver clock runs (1 + SFO) times slower than the
  // transmitter's: the output is linearly interpolated at t = m*(1 + SFO).
  localparam int NT = 6, NS = 8;
  int  tdel [NT] = '{0, 2, 5, 15, 21, 46};
  real tamp [NT] = '{0.4356, 0.6152, 0.4887, 0.3084, 0.2449, 0.1946};
  real dop [NT][NS], phs [NT][NS];
  real xre [$], xim [$];
  real qre [$], qim [$];
  real tpos = 0.0;
  int  nsent = 0;
  initial begin
    for (int i = 0; i < NT; i++)
      for (int k = 0; k < NS; k++) begin
        dop[i][k] = FDN * $cos(6.283185307179586 * real'($urandom % 1000) / 1000.0);
        phs[i][k] = 6.283185307179586 * real'($urandom % 1000) / 1000.0;
      end
    for (int i = 0; i < PRE; i++) begin
      qre.push_back(real'($urandom_range(600)) - 300.0);
      qim.push_back(real'($urandom_range(600)) - 300.0);
    end
  end

  function automatic void tap(int i, int m, output real hr, output real hi);
    hr = 0; hi = 0;
    for (int k = 0; k < NS; k++) begin
      real a;
      a = 6.283185307179586 * dop[i][k] * real'(m) + phs[i][k];
      hr += $cos(a); hi += $sin(a);
    end
    hr = hr * tamp[i] / $sqrt(real'(NS)); hi = hi * tamp[i] / $sqrt(real'(NS));
  endfunction

  always @(posedge clk) if (rst_n && tx_out_valid) begin
    xre.push_back(real'(tx_out_data.re));
    xim.push_back(real'(tx_out_data.im));
    while (int'($floor(tpos)) + 1 < xre.size()) begin
      int  a0;
      real f, yr, yi, ph;
      a0 = int'($floor(tpos)); f = tpos - real'(a0);
      yr = 0; yi = 0;
      for (int i = 0; i < NT; i++) begin
        real hr, hi, sr, si;
        int  j;
        j = a0 - tdel[i];
        if (j >= 0) begin
          sr = (1.0 - f) * xre[j] + f * xre[j + 1];
          si = (1.0 - f) * xim[j] + f * xim[j + 1];
          tap(i, nsent, hr, hi);
          yr += hr * sr - hi * si;
          yi += hr * si + hi * sr;
        end
      end
      ph = 6.283185307179586 * CFO * real'(nsent) / real'(NFT);
      qre.push_back(yr * $cos(ph) - yi * $sin(ph));
      qim.push_back(yr * $sin(ph) + yi * $cos(ph));
      nsent++;
      tpos += 1.0 + SFO;
    end
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
  int must [3] = '{0, 5, 6};
  initial for (int i = 0; i < 7; i++) ev[i] = 0;
  always @(posedge clk) if (rst_n) for (int i = 0; i < 7; i++) if (rx_events[i]) ev[i]++;

  logic [5:0] rxc [1705];
  int rn = 0, rs = 0, off = -1000, checked_syms = 0, total_err = 0, bit_err = 0, bits_chk = 0;
  bit ok_at_start = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_out_valid) begin
      rxc[rn] = rx_out_bits;
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
        checked_syms++;
        total_err += e;
        if (!(s < 0 || s >= ts || nd[s % 4] != rn))
          for (int i = 0; i < rn; i++) bit_err += $countones((rxc[i] ^ txc[s][i]) & 6'h03);
        else bit_err += rn * 2;
        bits_chk += rn * 2;
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
    $display("rx symbols %0d, checked %0d, cells wrong %0d", rs, checked_syms, total_err);
    $display("mode %0d gi %0d icfo %0d fcfo_inc %0d", rx_mode, rx_gi, rx_icfo, $signed(rx_fcfo_inc));
    $display("events acq %0d scan %0d add %0d drop %0d overrun %0d pred %0d interp %0d",
             ev[0], ev[1], ev[2], ev[3], ev[4], ev[5], ev[6]);
    checks++; if (rx_mode != MODE_2K) failures++;
    checks++; if (rx_gi != GI_1_4) failures++;
    checks++; if (int'(rx_icfo) != 1) failures++;
    begin
      real expect_inc, err;
      expect_inc = -0.3000 / real'(NFT) * 4294967296.0;
      err = real'($signed(rx_fcfo_inc)) - expect_inc;
      if (err < 0) err = -err;
      checks++;
      if (err > 0.05 * (expect_inc < 0 ? -expect_inc : expect_inc)) failures++;
    end
    checks++; if (checked_syms < 5) failures++;
    $display("bit errors %0d of %0d", bit_err, bits_chk);
    checks++; if (real'(bit_err) > BER_MAX * real'(bits_chk)) failures++;
    for (int i = 1; i < 5; i += 3) begin
      checks++;
      if (ev[i] != 0) begin failures++; $display("event %0d should not happen", i); end
    end
    foreach (must[i]) begin
      checks++;
      if (ev[must[i]] == 0) begin failures++; $display("event %0d never happened", must[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
