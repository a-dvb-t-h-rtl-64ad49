// dvbt_rx: DVB-T/H inner receiver (document Sec. 3.2, Fig. 2).
//
// Time domain: every input sample gets an index; sig_detect runs the delay
// correlation on the raw samples to find the signal, its FFT mode and GI
// ratio, the symbol-end peaks and the fractional CFO. Until a signal is
// detected the rest of the receiver is held idle. cfo_derot removes the
// fractional CFO and fft_window cuts FFT windows (with sample add/drop)
// into its window buffer.
//
// Frequency domain, one symbol at a time, sequenced here:
//   COPY  window buffer -> FFT memory (N cycles)
//   FFT   forward FFT (log2N * N/2 cycles)
//   ICFO  integer CFO and scattered-pilot phase (icfo_est); the integer CFO
//         is added to the de-rotator, so it is removed in the time domain
//         from the next symbol on (this design's choice: the document says
//         that both parts are compensated, not where the integer part is).
//         The next two symbols were (partly) collected before the
//         correction took effect, so their estimates are not used and
//         the channel estimator restarts.
//   CE    carriers k = 0 .. Kused-1 are read from their bins, shifted by
//         this symbol's residual integer CFO (zero while held),
//         into chan_est, then feq and demapper; the scattered-pilot phase
//         is that of this symbol.
// Total per 2K symbol about 2k + 11.3k + 1.9k + 1.7k = 17k cycles, so the
// input may deliver a sample at most every 9 cycles in 2K mode (8K: 74k
// cycles per 8448 samples); see fft_core for the FFT rate.
//
// Output: one cell's bits per out_valid (data carriers only, in carrier
// order), out_k its carrier index, sym_last after each symbol; est_ok
// once the channel estimator holds a pilot estimate for every column.
module dvbt_rx
  import dvb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  constel_e    constel,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output logic [13:0] out_k,
  output logic [5:0]  out_bits,
  output logic        sym_last,
  output logic        detected,
  output fft_mode_e   mode,
  output gi_e         gi,
  output logic signed [5:0] icfo,
  output logic [31:0] fcfo_inc,
  output logic        est_ok,
  // event pulses
  output logic        ev_acq,
  output logic        ev_scan_next,
  output logic        ev_slip_add,
  output logic        ev_slip_drop,
  output logic        ev_overrun,
  output logic        ev_pred,
  output logic        ev_interp
);
  logic [31:0] idx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) idx <= '0;
    else if (in_valid) idx <= idx + 1;

  // ---------------- time domain ----------------
  logic        pk_v;
  logic [31:0] pk_idx;

  sig_detect u_det (
    .clk, .rst_n, .in_valid, .in_data, .in_idx(idx),
    .detected, .mode, .gi, .phase_inc(fcfo_inc),
    .peak_valid(pk_v), .peak_idx(pk_idx), .acq_done(ev_acq), .scan_next(ev_scan_next)
  );

  // the de-rotator removes the fractional CFO and, once estimated, the
  // integer CFO as well (one subcarrier = 2^32 / NF per sample), so that
  // later symbols arrive unshifted and without a symbol-to-symbol phase step
  logic signed [5:0] icfo_sym;
  logic [31:0]       derot_inc;
  assign derot_inc = fcfo_inc - (32'(icfo) << (32 - fft_log2(mode)));

  logic        dr_v;
  cplx_t       dr_d;
  logic [31:0] dr_idx;
  cfo_derot u_derot (
    .clk, .rst_n, .phase_inc(derot_inc), .in_valid(in_valid && detected), .in_data, .in_idx(idx),
    .out_valid(dr_v), .out_data(dr_d), .out_idx(dr_idx)
  );

  logic [3:0]        log2n;
  logic [LOGMAX-1:0] glen;
  logic              win_ready, win_take, win_suspect;
  logic [LOGMAX-1:0] wb_addr;
  cplx_t             wb_data;
  assign log2n = 4'(fft_log2(mode));
  assign glen  = LOGMAX'(gi_len(mode, gi));

  fft_window u_win (
    .clk, .rst_n, .enable(detected), .log2n, .glen,
    .peak_valid(pk_v), .peak_idx(pk_idx), .now_idx(idx),
    .in_valid(dr_v), .in_data(dr_d), .in_idx(dr_idx),
    .win_ready, .win_take, .rd_addr(wb_addr), .rd_data(wb_data),
    .slip_add(ev_slip_add), .slip_drop(ev_slip_drop), .suspect(win_suspect),
    .overrun(ev_overrun)
  );

  // ---------------- frequency domain ----------------
  typedef enum logic [2:0] {R_IDLE, R_COPY, R_FFT, R_ICFO, R_CE, R_WAIT} rstate_e;
  rstate_e st;

  logic              f_wr, f_start, f_done;
  logic [LOGMAX-1:0] f_waddr, f_raddr, ic_addr;
  cplx_t             f_rdata;
  logic              ic_start, ic_done;
  logic [1:0]        sp_ph;
  logic [LOGMAX:0]   cnt;
  logic              rd_v1, rd_v;  // FFT read: address stage, data stage
  logic              ce_start, ce_busy, ce_clear, slip_seen;
  logic [1:0]        ic_hold;     // symbols to skip after an ICFO update
  logic signed [5:0] sh_sym;      // integer shift applied to this symbol's bins
  int                kused, nfull;
  assign kused = n_used(mode);
  assign nfull = 1 << fft_log2(mode);

  fft_core u_fft (
    .clk, .rst_n, .log2n, .inverse(1'b0),
    .wr_en(f_wr), .wr_addr(f_waddr), .wr_data(wb_data),
    .start(f_start), .busy(), .done(f_done),
    .rd_addr(st == R_ICFO ? ic_addr : f_raddr), .rd_data(f_rdata)
  );

  icfo_est u_icfo (
    .clk, .rst_n, .mode, .start(ic_start), .rd_addr(ic_addr), .rd_data(f_rdata),
    .icfo(icfo_sym), .sp_phase(sp_ph), .done(ic_done), .busy()
  );

  logic        ce_v, ce_data, ce_last;
  logic [13:0] ce_k;
  cplx_t       ce_r, ce_h;
  chan_est u_ce (
    .clk, .rst_n, .mode, .sym_start(ce_start), .sp_phase(sp_ph), .clear(ce_clear), .busy(ce_busy),
    .in_valid(rd_v), .in_data(f_rdata),
    .out_valid(ce_v), .out_k(ce_k), .out_r(ce_r), .out_h(ce_h), .out_data(ce_data),
    .out_last(ce_last), .est_ok, .pred_used(ev_pred), .interp_used(ev_interp)
  );

  logic        fq_v, fq_data, fq_last;
  logic [13:0] fq_k;
  logic signed [2*DW:0] z_re, z_im;
  logic [2*DW:0]        g;
  feq u_feq (
    .clk, .rst_n, .in_valid(ce_v), .in_k(ce_k), .in_data(ce_data), .in_last(ce_last),
    .in_r(ce_r), .in_h(ce_h),
    .out_valid(fq_v), .out_k(fq_k), .out_data(fq_data), .out_last(fq_last),
    .z_re, .z_im, .g
  );

  demapper u_dm (
    .clk, .rst_n, .constel, .in_valid(fq_v), .in_data(fq_data), .in_last(fq_last), .in_k(fq_k),
    .z_re, .z_im, .g, .out_valid, .out_k, .out_bits, .sym_last
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; cnt <= '0; wb_addr <= '0; f_wr <= 1'b0; f_waddr <= '0;
      f_start <= 1'b0; win_take <= 1'b0; ic_start <= 1'b0; ce_start <= 1'b0;
      f_raddr <= '0; rd_v1 <= 1'b0; rd_v <= 1'b0; icfo <= '0;
      ce_clear <= 1'b0; slip_seen <= 1'b0; ic_hold <= '0; sh_sym <= '0;
    end else begin
      // a window slip (or a peak that suggests one) changes the phase slope
      // of the later symbols, so the stored pilots are stale as well
      if (ev_slip_add || ev_slip_drop || win_suspect) slip_seen <= 1'b1;
      f_wr <= 1'b0; f_start <= 1'b0; win_take <= 1'b0; ic_start <= 1'b0;
      ce_start <= 1'b0; rd_v1 <= 1'b0; rd_v <= rd_v1;
      if (!detected) begin icfo <= '0; ic_hold <= '0; end
      case (st)
        R_IDLE: if (win_ready && detected) begin
          st <= R_COPY; cnt <= '0; wb_addr <= '0;
        end
        R_COPY: begin
          // read address cnt, write the value read last cycle
          if (cnt != 0) begin
            f_wr <= 1'b1; f_waddr <= wb_addr;
          end
          if (int'(cnt) == nfull) begin
            st <= R_FFT; f_start <= 1'b1; win_take <= 1'b1;
          end else begin
            wb_addr <= LOGMAX'(cnt);
            cnt     <= cnt + 1'b1;
          end
        end
        R_FFT: if (f_done) begin
          st <= R_ICFO; ic_start <= 1'b1;
        end
        R_ICFO: if (ic_done) begin
          st <= R_CE; ce_start <= 1'b1; cnt <= '0;
          slip_seen <= 1'b0;
          if (ic_hold != 0) begin
            // collected before the last correction took effect
            ic_hold  <= ic_hold - 1'b1;
            sh_sym   <= '0;
            ce_clear <= 1'b1;
          end else begin
            icfo     <= icfo + icfo_sym;  // accumulated integer CFO, fed back
            sh_sym   <= icfo_sym;
            ce_clear <= (icfo_sym != 0) || slip_seen;
            if (icfo_sym != 0) ic_hold <= 2'd2;
          end
        end
        R_CE: begin
          if (int'(cnt) < kused) begin
            f_raddr <= LOGMAX'(carrier_bin(int'(cnt), mode, int'(sh_sym)));
            rd_v1   <= 1'b1;
            cnt     <= cnt + 1'b1;
          end else begin
            st <= R_WAIT;
          end
        end
        R_WAIT: if (!ce_busy && !ce_start) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
