// delay_corr: delay correlation of document eq. (1).
//
//   P(n) = sum_{k=0}^{W-1} r(n-k-NF) * conj(r(n-k))
//   E(n) = sum_{k=0}^{W-1} |r(n-k)|^2
//
// so that c(n) = P(n)/E(n). NF (2^log2n) and the window W are set at run
// time; `restart` clears the sums and the fill count. The inputs are first
// reduced to CW bits (the most significant bits of the DW-bit sample). Both
// delays are circular buffers (NF up to 2^LOGN_MAX samples, W up to WMAX
// products) and the window sums are updated recursively:
// S(n) = S(n-1) + q(n) - q(n-W).
//
// Timing: one sample per `in_valid`; the outputs for that sample appear two
// cycles later with `out_valid`, tagged with the input's sample index
// `in_idx`. `out_full` is high once NF+W samples have been seen since the
// restart, i.e. when P and E are true window sums.
module delay_corr
  import dvb_pkg::*;
#(
  parameter int LOGN_MAX = LOGMAX,
  parameter int WMAX     = 2048,
  parameter int CW       = 12,
  parameter int SW       = 2 * CW + 2 + $clog2(WMAX)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restart,
  input  logic [3:0]          log2n,
  input  logic [$clog2(WMAX):0] win,
  input  logic                in_valid,
  input  cplx_t               in_data,
  input  logic [31:0]         in_idx,
  output logic                out_valid,
  output logic [31:0]         out_idx,
  output logic                out_full,
  output logic signed [SW-1:0] p_re,
  output logic signed [SW-1:0] p_im,
  output logic [SW-1:0]       e_pow
);
  localparam int N  = 1 << LOGN_MAX;
  localparam int PW = 2 * CW + 1;

  logic signed [CW-1:0] dre [N];
  logic signed [CW-1:0] dim [N];
  logic signed [PW-1:0] qre [WMAX];
  logic signed [PW-1:0] qim [WMAX];
  logic        [PW-1:0] qpw [WMAX];

  logic [LOGN_MAX-1:0]     wp;
  logic [$clog2(WMAX)-1:0] qp;

  // stage 1: delayed sample and products
  logic                 s1_v;
  logic [31:0]          s1_idx;
  logic signed [PW-1:0] s1_qre, s1_qim;
  logic        [PW-1:0] s1_pw;

  logic signed [CW-1:0] xr, xi, yr, yi;
  assign xr = in_data.re[DW-1 -: CW];
  assign xi = in_data.im[DW-1 -: CW];
  assign yr = dre[wp - (LOGN_MAX'(1) << log2n)];
  assign yi = dim[wp - (LOGN_MAX'(1) << log2n)];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dre[wp] <= xr;
      dim[wp] <= xi;
    end
    if (s1_v) begin
      qre[qp] <= s1_qre;
      qim[qp] <= s1_qim;
      qpw[qp] <= s1_pw;
    end
  end

  logic [$clog2(WMAX)-1:0] qold;
  assign qold = qp - ($clog2(WMAX))'(win);

  logic [15:0] qn;  // lag products accumulated since restart (saturating)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; qp <= '0; qn <= '0;
      s1_v <= 1'b0; s1_idx <= '0; s1_qre <= '0; s1_qim <= '0; s1_pw <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_full <= 1'b0;
      p_re <= '0; p_im <= '0; e_pow <= '0;
    end else begin
      s1_v      <= in_valid && !restart;
      out_valid <= s1_v && !restart;
      if (in_valid) begin
        wp     <= wp + 1'b1;
        s1_idx <= in_idx;
        s1_qre <= PW'(yr * xr) + PW'(yi * xi);
        s1_qim <= PW'(yi * xr) - PW'(yr * xi);
        s1_pw  <= PW'(xr * xr) + PW'(xi * xi);
      end
      if (restart) begin
        qn <= '0; p_re <= '0; p_im <= '0; e_pow <= '0; out_full <= 1'b0;
      end else if (s1_v) begin
        qp      <= qp + 1'b1;
        out_idx <= s1_idx;
        if (qn != 16'hffff) qn <= qn + 1'b1;
        if (32'(qn) >= 32'(win)) begin
          p_re  <= p_re + SW'(s1_qre) - SW'(qre[qold]);
          p_im  <= p_im + SW'(s1_qim) - SW'(qim[qold]);
          e_pow <= e_pow + SW'(s1_pw) - SW'(qpw[qold]);
        end else begin
          p_re  <= p_re + SW'(s1_qre);
          p_im  <= p_im + SW'(s1_qim);
          e_pow <= e_pow + SW'(s1_pw);
        end
        out_full <= 32'(qn) + 1 >= (32'(1) << log2n) + 32'(win);
      end
    end
  end

endmodule
