// fft_core: in-place radix-2 FFT/IFFT for the 2K, 4K and 8K modes.
//
// The document names an FFT processor (receiver) and an IFFT (transmitter)
// but not their insides; this is a plain memory-based decimation-in-time
// design, one butterfly per clock. Samples are written in natural order
// through the load port (stored bit-reversed), `start` runs log2(N) stages of
// N/2 butterflies, and the result is read in natural order through a
// one-cycle-latency read port. The size is chosen at run time (log2n = 11,
// 12 or 13); the twiddle table is sized for LOGMAX and is sub-sampled for
// smaller sizes. Twiddles: cos/sin(2*pi*i/2^LOGMAX) in Q14, computed at
// initialisation.
//
// Scaling: the internal word is IW bits, of which FRAC are guard bits
// below the input LSB; stages 0, 2, 4, ... halve their
// outputs, so the result is the DFT sum divided by 2^ceil(log2n/2). The IFFT is
// computed as conj(FFT(conj(x))). Outputs saturate to DW bits.
//
// Timing: compute takes log2n * N/2 cycles (2K: 11264, 8K: 53248); `done`
// is high in the cycle after the last butterfly, log2n*N/2 + 1 cycles after
// `start`. Read data appears one cycle
// after rd_addr.
module fft_core
  import dvb_pkg::*;
#(
  parameter int LOGN_MAX = LOGMAX,
  parameter int IW       = 28,
  parameter int FRAC     = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [3:0]          log2n,
  input  logic                inverse,
  input  logic                wr_en,
  input  logic [LOGN_MAX-1:0] wr_addr,
  input  cplx_t               wr_data,
  input  logic                start,
  output logic                busy,
  output logic                done,
  input  logic [LOGN_MAX-1:0] rd_addr,
  output cplx_t               rd_data
);
  localparam int N = 1 << LOGN_MAX;

  logic signed [IW-1:0] mre [N];
  logic signed [IW-1:0] mim [N];
  logic signed [15:0]   twr [N/2];
  logic signed [15:0]   twi [N/2];

  initial begin
    for (int i = 0; i < N / 2; i++) begin
      twr[i] = 16'($rtoi($floor(16384.0 * $cos(6.283185307179586 * i / N) + 0.5)));
      twi[i] = 16'($rtoi($floor(-16384.0 * $sin(6.283185307179586 * i / N) + 0.5)));
    end
  end

  function automatic logic [LOGN_MAX-1:0] bitrev(logic [LOGN_MAX-1:0] a, logic [3:0] l);
    logic [LOGN_MAX-1:0] r;
    for (int i = 0; i < LOGN_MAX; i++) r[i] = a[LOGN_MAX-1-i];
    return r >> (LOGN_MAX - int'(l));
  endfunction

  function automatic logic signed [DW-1:0] sat(logic signed [IW-1:0] v);
    if (v > IW'((1 << (DW - 1)) - 1)) return DW'((1 << (DW - 1)) - 1);
    if (v < -IW'(1 << (DW - 1)))      return DW'(-(1 << (DW - 1)));
    return v[DW-1:0];
  endfunction

  // drop the FRAC guard bits, rounding
  function automatic logic signed [IW-1:0] rnd(logic signed [IW-1:0] v);
    return (v + IW'(1 << (FRAC - 1))) >>> FRAC;
  endfunction

  logic [3:0]          stage;
  logic [LOGN_MAX-2:0] bf;
  logic [LOGN_MAX-1:0] i0, i1;
  logic [LOGN_MAX-2:0] tidx;
  logic                run;

  // butterfly addressing
  always_comb begin
    logic [LOGN_MAX-1:0] half, grp, j;
    half = LOGN_MAX'(1) << stage;
    j    = LOGN_MAX'(bf) & (half - 1'b1);
    grp  = LOGN_MAX'(bf) >> stage;
    i0   = ((grp << 1) << stage) | j;
    i1   = i0 | half;
    tidx = (LOGN_MAX-1)'(j << (LOGN_MAX - 1 - int'(stage)));
  end

  logic signed [IW-1:0]    ar, ai, br, bi, x0r, x0i, x1r, x1i;
  logic signed [IW+16-1:0] pr, pi;
  always_comb begin
    ar = mre[i0]; ai = mim[i0];
    br = mre[i1]; bi = mim[i1];
    pr = (IW+16)'(br) * (IW+16)'(twr[tidx]) - (IW+16)'(bi) * (IW+16)'(twi[tidx]);
    pi = (IW+16)'(br) * (IW+16)'(twi[tidx]) + (IW+16)'(bi) * (IW+16)'(twr[tidx]);
    pr = (pr + (IW+16)'(8192)) >>> 14;
    pi = (pi + (IW+16)'(8192)) >>> 14;
    x0r = ar + pr[IW-1:0]; x0i = ai + pi[IW-1:0];
    x1r = ar - pr[IW-1:0]; x1i = ai - pi[IW-1:0];
    if (!stage[0]) begin
      x0r = (x0r + 1) >>> 1; x0i = (x0i + 1) >>> 1;
      x1r = (x1r + 1) >>> 1; x1i = (x1i + 1) >>> 1;
    end
  end

  logic last_bf;
  assign last_bf = (LOGN_MAX'(bf) == (LOGN_MAX'(1) << (log2n - 1)) - 1'b1);

  always_ff @(posedge clk) begin
    if (wr_en && !run) begin
      mre[bitrev(wr_addr, log2n)] <= IW'(wr_data.re) <<< FRAC;
      mim[bitrev(wr_addr, log2n)] <= inverse ? -(IW'(wr_data.im) <<< FRAC) : IW'(wr_data.im) <<< FRAC;
    end else if (run) begin
      mre[i0] <= x0r; mim[i0] <= x0i;
      mre[i1] <= x1r; mim[i1] <= x1i;
    end
    rd_data.re <= sat(rnd(mre[rd_addr]));
    rd_data.im <= inverse ? sat(-rnd(mim[rd_addr])) : sat(rnd(mim[rd_addr]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; stage <= '0; bf <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run <= 1'b1; stage <= '0; bf <= '0;
        end
      end else if (last_bf) begin
        bf <= '0;
        if (stage == log2n - 1'b1) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          stage <= stage + 1'b1;
        end
      end else begin
        bf <= bf + 1'b1;
      end
    end
  end

  assign busy = run;

endmodule
