// chan_est: channel estimator of the document (Sec. 3.2, eqs. (4)-(9)).
//
// Carriers of one FFT symbol arrive in order k = 0 .. Kused-1. Every third
// carrier (k = 3j, a "column") carries a scattered pilot once every four
// symbols; all continual pilots also lie on columns.
//  1. Pilot estimate, eq. (4): at a pilot H = +-3/4 * R (pilots are sent
//     with amplitude 4/3; the sign is the reference PRBS bit w_k). 3/4 is
//     done with shifts and adds.
//  2. Linear prediction in time, eqs. (5)-(8): two pilot buffers hold, per
//     column, the latest and the previous scattered-pilot estimate (taken
//     d and d+4 symbols ago, d = 1, 2, 3). A column without a pilot in this
//     symbol gets H = (1 + d/4) * latest - (d/4) * previous, a constant
//     multiply by shifts and adds. The first 8 symbols after reset use the
//     latest estimate alone (the previous one is not yet filled).
//  3. Quadratic interpolation in frequency, eq. (9): the two carriers
//     between columns j and j+1 get the value of the least-squares
//     parabola through columns j-1 .. j+2 (second-order regression over
//     four points). The regression reduces to four fixed weights per
//     output position (Q10): interior (-6, 586, 552, -108) and its mirror;
//     at the band edges the window is the outermost four columns with
//     weights (643, 347, 108, -74) / (370, 483, 313, -142) and mirrors.
//
// The output is the input stream delayed by 9 carriers, with its channel
// estimate and a data flag (not a pilot). After the last input carrier the
// block runs 9 flush steps on its own; `busy` is high from `sym_start`
// until the last output. `est_ok` is high once four symbols have been
// seen, so that every column has a pilot estimate. `clear` (sampled with
// sym_start) restarts that count, e.g. after a frequency correction made
// the stored pilots stale.
//
// The continual-pilot table is the 2K one (see dvb_pkg). Pilot buffers:
// JMAX = 2273 words each (one per column in 8K mode).
module chan_est
  import dvb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fft_mode_e   mode,
  input  logic        sym_start,
  input  logic [1:0]  sp_phase,
  input  logic        clear,      // with sym_start: forget the pilot history
  output logic        busy,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output logic [13:0] out_k,
  output cplx_t       out_r,
  output cplx_t       out_h,
  output logic        out_data,
  output logic        out_last,
  output logic        est_ok,
  output logic        pred_used,   // pulse: a column was predicted from both buffers
  output logic        interp_used  // pulse: a carrier was interpolated
);
  localparam int DLY = 9;
  localparam int HW  = DW + 4;

  cplx_t latest [JMAX];
  cplx_t prev   [JMAX];
  cplx_t colbuf [8];
  cplx_t rline  [16];
  logic  dline  [16];

  logic        run;
  logic [13:0] t;          // step; input carrier k = t while t < Kused
  logic [1:0]  ph;
  logic [10:0] prbs;
  logic [1:0]  kmod3, omod3;
  logic [11:0] kj, oj;     // column of input and output carrier
  logic [3:0]  nsym;
  int          kused, jlast;

  assign kused = n_used(mode);
  assign jlast = (kused - 1) / 3;
  assign busy  = run;

  function automatic logic signed [DW-1:0] satw(logic signed [HW-1:0] v);
    if (v > HW'((1 << (DW - 1)) - 1)) return DW'((1 << (DW - 1)) - 1);
    if (v < -HW'(1 << (DW - 1)))      return DW'(-(1 << (DW - 1)));
    return v[DW-1:0];
  endfunction

  // ---- step 1 and 2: column estimate of input carrier ----
  logic  in_step, is_col, is_sp_c, is_cp_c;
  logic [1:0] d;
  cplx_t ls, lat, prv, hc;
  assign in_step = run && int'(t) < kused && in_valid;
  assign is_col  = (kmod3 == 2'd0);
  assign is_sp_c = is_col && (kj[1:0] == ph);
  assign is_cp_c = is_cp(int'(t));
  assign d       = ph - kj[1:0];
  assign lat     = latest[kj];
  assign prv     = prev[kj];

  function automatic logic signed [DW-1:0] ls34(logic signed [DW-1:0] r, logic neg);
    logic signed [HW-1:0] v;
    v = (HW'(r) >>> 1) + (HW'(r) >>> 2);
    return neg ? satw(-v) : satw(v);
  endfunction

  function automatic logic signed [DW-1:0] predict(logic signed [DW-1:0] a,
                                                   logic signed [DW-1:0] b, logic [1:0] dd);
    logic signed [HW-1:0] df, m;
    df = HW'(a) - HW'(b);
    case (dd)
      2'd1:    m = df;
      2'd2:    m = df <<< 1;
      default: m = (df <<< 1) + df;
    endcase
    return satw(HW'(a) + (m >>> 2));
  endfunction

  always_comb begin
    ls.re = ls34(in_data.re, prbs[10]);
    ls.im = ls34(in_data.im, prbs[10]);
    if (is_sp_c || is_cp_c) hc = ls;
    else if (nsym >= 4'd8) begin
      hc.re = predict(lat.re, prv.re, d);
      hc.im = predict(lat.im, prv.im, d);
    end else hc = lat;
  end

  // ---- step 3: output carrier o = t - DLY ----
  logic        out_step;
  logic [11:0] jb;
  logic signed [11:0] w [4];
  cplx_t       hint;
  assign out_step = run && int'(t) >= DLY && (int'(t) >= kused || in_valid);

  always_comb begin
    logic signed [HW+12-1:0] sr, si;
    if (oj == 0)                     jb = 12'd0;
    else if (int'(oj) == jlast - 1)  jb = 12'(jlast - 3);
    else                             jb = oj - 1'b1;
    if (oj == 0) begin
      if (omod3 == 2'd1) w = '{12'sd643, 12'sd347, 12'sd108, -12'sd74};
      else               w = '{12'sd370, 12'sd483, 12'sd313, -12'sd142};
    end else if (int'(oj) == jlast - 1) begin
      if (omod3 == 2'd1) w = '{-12'sd142, 12'sd313, 12'sd483, 12'sd370};
      else               w = '{-12'sd74, 12'sd108, 12'sd347, 12'sd643};
    end else begin
      if (omod3 == 2'd1) w = '{-12'sd6, 12'sd586, 12'sd552, -12'sd108};
      else               w = '{-12'sd108, 12'sd552, 12'sd586, -12'sd6};
    end
    sr = '0; si = '0;
    for (int i = 0; i < 4; i++) begin
      sr = sr + (HW+12)'(colbuf[3'(jb + 12'(i))].re) * (HW+12)'(w[i]);
      si = si + (HW+12)'(colbuf[3'(jb + 12'(i))].im) * (HW+12)'(w[i]);
    end
    sr = (sr + (HW+12)'(512)) >>> 10;
    si = (si + (HW+12)'(512)) >>> 10;
    hint.re = satw(HW'(sr));
    hint.im = satw(HW'(si));
  end

  always_ff @(posedge clk) begin
    if (in_step) begin
      if (is_sp_c) begin
        prev[kj]   <= lat;
        latest[kj] <= ls;
      end
      if (is_col) colbuf[kj[2:0]] <= hc;
      rline[t[3:0]] <= in_data;
      dline[t[3:0]] <= !is_col || !(is_sp_c || is_cp_c);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; t <= '0; ph <= '0; prbs <= '1; kmod3 <= '0; omod3 <= '0;
      kj <= '0; oj <= '0; nsym <= '0; est_ok <= 1'b0;
      out_valid <= 1'b0; out_k <= '0; out_r <= '0; out_h <= '0; out_data <= 1'b0;
      out_last <= 1'b0; pred_used <= 1'b0; interp_used <= 1'b0;
    end else begin
      out_valid <= 1'b0; out_last <= 1'b0; pred_used <= 1'b0; interp_used <= 1'b0;
      if (!run) begin
        if (sym_start) begin
          run <= 1'b1; t <= '0; ph <= sp_phase; prbs <= '1;
          if (clear) begin nsym <= '0; est_ok <= 1'b0; end
          kmod3 <= '0; omod3 <= '0; kj <= '0; oj <= '0;
        end
      end else begin
        if (in_step) begin
          prbs  <= prbs_next(prbs);
          kmod3 <= (kmod3 == 2'd2) ? 2'd0 : kmod3 + 1'b1;
          if (kmod3 == 2'd2) kj <= kj + 1'b1;
          pred_used <= is_col && !is_sp_c && !is_cp_c && nsym >= 4'd8;
        end
        if (out_step) begin
          out_valid <= 1'b1;
          out_k     <= t - 14'(DLY);
          out_r     <= rline[4'(t - 14'(DLY))];
          out_data  <= dline[4'(t - 14'(DLY))];
          out_h     <= (omod3 == 2'd0) ? colbuf[oj[2:0]] : hint;
          interp_used <= (omod3 != 2'd0);
          omod3 <= (omod3 == 2'd2) ? 2'd0 : omod3 + 1'b1;
          if (omod3 == 2'd2) oj <= oj + 1'b1;
          if (int'(t) == kused - 1 + DLY) begin
            out_last <= 1'b1;
            run      <= 1'b0;
            if (nsym != 4'hf) nsym <= nsym + 1'b1;
            if (nsym >= 4'd3) est_ok <= 1'b1;
          end
        end
        if (in_step || (int'(t) >= kused && out_step)) t <= t + 1'b1;
      end
    end
  end

endmodule
