// feq: frequency-domain equalizer.
//
// The document only says that the channel estimates are sent to the FEQ
// for compensation. To avoid a divider this FEQ forms Z = R * conj(H) and
// the reliability G = |H|^2; the de-mapper then compares Z with decision
// thresholds scaled by G, which is the same as deciding on R/H.
//
// Timing: one cycle latency; sideband (k, data flag, last) passed along.
module feq
  import dvb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [13:0] in_k,
  input  logic        in_data,
  input  logic        in_last,
  input  cplx_t       in_r,
  input  cplx_t       in_h,
  output logic        out_valid,
  output logic [13:0] out_k,
  output logic        out_data,
  output logic        out_last,
  output logic signed [2*DW:0] z_re,
  output logic signed [2*DW:0] z_im,
  output logic [2*DW:0]        g
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_k <= '0; out_data <= 1'b0; out_last <= 1'b0;
      z_re <= '0; z_im <= '0; g <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_k    <= in_k;
        out_data <= in_data;
        z_re <= (2*DW+1)'(in_r.re * in_h.re) + (2*DW+1)'(in_r.im * in_h.im);
        z_im <= (2*DW+1)'(in_r.im * in_h.re) - (2*DW+1)'(in_r.re * in_h.im);
        g    <= (2*DW+1)'(in_h.re * in_h.re) + (2*DW+1)'(in_h.im * in_h.im);
      end
    end
  end
endmodule
