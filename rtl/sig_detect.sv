// sig_detect: signal (mode and GI) detection, symbol timing and fractional
// CFO estimation, all from the delay correlation c(n) = P(n)/E(n) of
// eq. (1) (computed by delay_corr).
//
// SCAN   For NF = 2K, 4K, 8K in turn the correlator runs with the smallest
//        guard window W = NF/32. A peak is |c(n)| > 0.5, tested exactly as
//        4|P|^2 > E^2. The distance between the rising edges of two
//        successive peaks (edges closer than NF/2 are ignored) is one
//        symbol period NF + G; it is matched to the four guard lengths
//        NF/32 .. NF/4 within +-NF/128. No match within the dwell time
//        moves on to the next NF. This is this design's reading of "from
//        the peaks' characteristics, the mode and GI ratio can be
//        obtained".
// TIME   With NF and G known the window becomes W = G and the maximum of
//        |P|^2 over one symbol period is taken as the symbol end (the
//        peak of |c| "is always at about the end of an OFDM symbol"). The
//        phase of P there gives the fractional CFO of eq. (2): the
//        per-sample de-rotation is angle(P)/NF (full turn = 2^32).
// TRACK  Each following peak is searched within +-NF/128 of where it is
//        expected and reported, so that the FFT window can follow a drift
//        (sample add/drop). Four symbols in a row without a peak above 0.5
//        return to SCAN and clear `detected`.
//
// `detected` gates the rest of the receiver (power saving, Sec. 3.2).
// Peaks are reported as sample indices (`peak_idx`, the `in_idx` tag of
// the sample at the peak) with a one-cycle `peak_valid`.
module sig_detect
  import dvb_pkg::*;
#(
  parameter int CW = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic [31:0] in_idx,
  output logic        detected,
  output fft_mode_e   mode,
  output gi_e         gi,
  output logic [31:0] phase_inc,
  output logic        peak_valid,
  output logic [31:0] peak_idx,
  output logic        acq_done,     // pulse: mode/GI/timing/FCFO acquired
  output logic        scan_next     // pulse: a mode tried without success
);
  localparam int WMAX = 2048;
  localparam int SW   = 2 * CW + 2 + $clog2(WMAX);

  typedef enum logic [1:0] {S_SCAN, S_TIME, S_TRACK} sd_state_e;
  sd_state_e st;

  logic        restart;
  logic [11:0] win;
  logic        c_valid, c_full;
  logic [31:0] c_idx;
  logic signed [SW-1:0] p_re, p_im;
  logic [SW-1:0] e_pow;

  delay_corr #(.WMAX(WMAX), .CW(CW)) u_corr (
    .clk, .rst_n, .restart, .log2n(4'(fft_log2(mode))), .win,
    .in_valid, .in_data, .in_idx,
    .out_valid(c_valid), .out_idx(c_idx), .out_full(c_full),
    .p_re, .p_im, .e_pow
  );

  // peak test |c| > 0.5  <=>  4|P|^2 > E^2
  logic [2*SW+1:0] mag2, e2;
  logic            above, above_q;
  assign mag2  = (2*SW+2)'(p_re * p_re) + (2*SW+2)'(p_im * p_im);
  assign e2    = (2*SW+2)'(e_pow) * (2*SW+2)'(e_pow);
  assign above = c_full && ((mag2 << 2) > e2);

  int nf, glen, per, dadv;
  assign nf   = 1 << fft_log2(mode);
  assign glen = gi_len(mode, gi);
  assign per  = nf + glen;
  assign dadv = nf >> 7;

  // normalise the peak correlation to 24 bits for the arctangent
  logic signed [SW-1:0] bre, bim;
  logic signed [23:0]   nre, nim;
  logic signed [31:0]   ang;
  always_comb begin
    int sh;
    sh = 0;
    for (int s = 0; s <= SW - 24; s++)
      if (((bre >>> s) > SW'(24'sh3f_ffff)) || ((bre >>> s) < -SW'(24'sh40_0000)) ||
          ((bim >>> s) > SW'(24'sh3f_ffff)) || ((bim >>> s) < -SW'(24'sh40_0000)))
        sh = s + 1;
    nre = 24'(bre >>> sh);
    nim = 24'(bim >>> sh);
  end
  cordic_vec #(.XW(24)) u_ang (.x(nre), .y(nim), .angle(ang));

  logic [31:0]     cnt, e1, best_idx, expect_pk;
  logic            e1_v, best_above;
  logic [31:0]     holdoff;
  logic [2*SW+1:0] best;
  logic [2:0]      miss;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_SCAN; mode <= MODE_2K; gi <= GI_1_32; restart <= 1'b1; win <= 12'd64;
      detected <= 1'b0; phase_inc <= '0; peak_valid <= 1'b0; peak_idx <= '0;
      acq_done <= 1'b0; scan_next <= 1'b0; above_q <= 1'b0;
      cnt <= '0; e1 <= '0; e1_v <= 1'b0; holdoff <= '0; best <= '0; best_idx <= '0;
      best_above <= 1'b0; expect_pk <= '0; miss <= '0; bre <= '0; bim <= '0;
    end else begin
      restart    <= 1'b0;
      peak_valid <= 1'b0;
      acq_done   <= 1'b0;
      scan_next  <= 1'b0;
      if (c_valid) above_q <= above;
      case (st)
        S_SCAN: if (c_valid && !restart) begin
          cnt <= cnt + 1;
          if (holdoff != 0) holdoff <= holdoff - 1;
          if (above && !above_q && holdoff == 0) begin
            holdoff <= 32'(nf / 2);
            e1 <= c_idx; e1_v <= 1'b1;
            if (e1_v) begin
              for (int g = 0; g < 4; g++)
                if (int'(c_idx - e1) >= nf + (nf >> (5 - g)) - (nf >> 7) &&
                    int'(c_idx - e1) <= nf + (nf >> (5 - g)) + (nf >> 7)) begin
                  gi <= gi_e'(g);
                  win <= 12'(nf >> (5 - g));
                  restart <= 1'b1;
                  cnt <= '0; best <= '0;
                  st <= S_TIME;
                end
            end
          end
          if (cnt == 32'(nf + nf / 32 + 3 * (nf + nf / 4))) begin
            mode <= (mode == MODE_8K) ? MODE_2K : fft_mode_e'(mode + 1'b1);
            win  <= 12'((mode == MODE_8K ? 2048 : nf * 2) / 32);
            restart <= 1'b1; scan_next <= 1'b1;
            cnt <= '0; e1_v <= 1'b0; holdoff <= '0;
          end
        end
        S_TIME: if (c_valid && c_full && !restart) begin
          cnt <= cnt + 1;
          if (mag2 > best) begin
            best <= mag2; best_idx <= c_idx; best_above <= above;
            bre <= p_re; bim <= p_im;
          end
          if (cnt == 32'(per - 1)) begin
            if (best_above) begin
              st <= S_TRACK;
              detected <= 1'b1; acq_done <= 1'b1;
              peak_valid <= 1'b1; peak_idx <= best_idx;
              expect_pk <= best_idx + 32'(per);
              best <= '0; miss <= '0;
            end else begin
              st <= S_SCAN; restart <= 1'b1; win <= 12'(nf / 32);
              cnt <= '0; e1_v <= 1'b0; holdoff <= '0;
            end
          end
        end
        S_TRACK: if (c_valid) begin
          if (c_idx >= expect_pk - 32'(dadv) && mag2 > best) begin
            best <= mag2; best_idx <= c_idx; best_above <= above;
          end
          if (c_idx == expect_pk + 32'(dadv)) begin
            best <= '0;
            if (best_above) begin
              peak_valid <= 1'b1; peak_idx <= best_idx;
              expect_pk <= best_idx + 32'(per);
              miss <= '0;
            end else begin
              expect_pk <= expect_pk + 32'(per);
              miss <= miss + 1'b1;
              if (miss == 3'd3) begin
                st <= S_SCAN; detected <= 1'b0; restart <= 1'b1;
                win <= 12'(nf / 32); cnt <= '0; e1_v <= 1'b0; holdoff <= '0;
              end
            end
          end
        end
        default: st <= S_SCAN;
      endcase
      // FCFO: latched once, the cycle after acquisition (bre/bim settled)
      if (acq_done) phase_inc <= 32'(ang >>> fft_log2(mode));
    end
  end

endmodule
