// cfo_derot: fractional CFO compensation ahead of the FFT.
//
// A numerically controlled oscillator accumulates the per-sample phase
// increment `phase_inc` (full turn = 2^32) and every valid sample is
// rotated by the accumulated phase with a CORDIC (the document's "simple
// phase de-rotate circuit"; the CORDIC is this design's choice). The
// increment comes from the signal detector: angle(c(n_b)) / NF, which
// undoes the rotation exp(j*2*pi*eps*n) of a carrier offset eps.
//
// Timing: one cycle latency; the sample index tag is passed along.
module cfo_derot
  import dvb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] phase_inc,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic [31:0] in_idx,
  output logic        out_valid,
  output cplx_t       out_data,
  output logic [31:0] out_idx
);
  logic [31:0] acc;
  logic signed [DW-1:0] xo, yo;

  cordic_rot #(.XW(DW)) u_rot (
    .x(in_data.re), .y(in_data.im), .phase(acc), .xo, .yo
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; out_valid <= 1'b0; out_data <= '0; out_idx <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        acc         <= acc + phase_inc;
        out_data.re <= xo;
        out_data.im <= yo;
        out_idx     <= in_idx;
      end
    end
  end
endmodule
