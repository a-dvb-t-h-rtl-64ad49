// tb_dvbt_rx: receiver test with a 2K-mode signal.
//
// A dvbt_tx instance (2K, GI 1/4, 64-QAM, random bits) feeds the receiver
// through a channel made here: carrier offset of -3.4 subcarriers (integer
// part -3, fractional part -0.4), a weak echo 0.2*exp(-j*0.5) two samples
// late, and noise before the signal. One sample every PACE cycles.
// Checks: mode 2K found at the first try (no scan step), GI 1/4, integer
// CFO -3, fractional CFO increment within 2 % of 0.4 subcarrier, no window
// slip and no overrun (the sampling clock is exact), every de-mapped
// symbol with a filled channel estimator (est_ok before and after it)
// equal to the sent bits, at least 10 such symbols, and the acquisition,
// time-prediction and interpolation events seen.
// Watchdog: 2000000 cycles.
//
// The stimulus sizes follow the reference where it gives them; the
// reference model and the tolerances are this testbench's own.
`timescale 1ns/1ps
module tb_dvbt_rx;
  import dvb_pkg::*;

  localparam int PACE     = 10;
  localparam int NSYM_TX  = 26;
  localparam int PRE      = 2000;
  localparam real CFO     = -3.4;
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
    .clk, .rst_n, .enable(tx_enable), .mode(MODE_2K), .gi(GI_1_4), .constel(QAM64),
    .din_valid(tx_din_valid), .din_ready(tx_din_ready), .din_bits(tx_din_bits),
    .out_valid(tx_out_valid), .out_ready(1'b1), .out_data(tx_out_data),
    .out_first(tx_out_first), .sym_phase(tx_sym_phase)
  );

  dvbt_rx dut (
    .clk, .rst_n, .constel(QAM64), .in_valid(rx_in_valid), .in_data(rx_in_data),
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
  real qre[$], qim[$];
  real h1re, h1im;
  real dl_re [4], dl_im [4];
  int  tx_pos = 0, nsent = 0, sym_seen = 0;
  initial begin
    h1re = 0.2 * $cos(-0.5); h1im = 0.2 * $sin(-0.5);
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
    yr = xr + h1re * dl_re[2] - h1im * dl_im[2];
    yi = xi + h1re * dl_im[2] + h1im * dl_re[2];
    n = nsent;
    ph = 6.283185307179586 * CFO * real'(n) / real'(NFT);
    qre.push_back(yr * $cos(ph) - yi * $sin(ph));
    qim.push_back(yr * $sin(ph) + yi * $cos(ph));
    nsent++;
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
  int must [3] = '{0, 5, 6};
  initial for (int i = 0; i < 7; i++) ev[i] = 0;
  always @(posedge clk) if (rst_n) for (int i = 0; i < 7; i++) if (rx_events[i]) ev[i]++;

  logic [5:0] rxc [1705];
  int rn = 0, rs = 0, off = -1000, checked_syms = 0, total_err = 0;
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
    checks++; if (rx_mode != MODE_2K) failures++;
    checks++; if (rx_gi != GI_1_4) failures++;
    checks++; if (rx_icfo != -6'sd3) failures++;
    begin
      real expect_inc, err;
      expect_inc = 0.4 / real'(NFT) * 4294967296.0;
      err = real'($signed(rx_fcfo_inc)) - expect_inc;
      if (err < 0) err = -err;
      checks++;
      if (err > 0.02 * expect_inc) failures++;
    end
    checks++; if (checked_syms < 10) failures++;
    for (int i = 1; i < 5; i++) begin
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
