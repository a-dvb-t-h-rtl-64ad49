// demapper: hard-decision de-mapper for QPSK, 16-QAM and 64-QAM.
//
// Input is the FEQ output Z = R*conj(H) with G = |H|^2 for a cell; with the
// pilot-derived H (unit pilot gain = UNIT), the transmitted cell in UNIT
// scale is c = Z * UNIT / G. Each axis is decided separately: sign, then
// the magnitude level L from the thresholds 2, 4, 6 level spacings, all
// compared as |Z| * UNIT against threshold * G (no divider). Bits follow
// the mapping of qam_mapper (sign first, Gray-coded level after; even bits
// in-phase, odd bits quadrature). Only data carriers produce output.
//
// Timing: one cycle latency. out_bits holds 2/4/6 valid LSBs.
//
// The constellations and bit mapping follow the DVB-T standard that the
// reference builds on; hard decisions and the divider-free comparison are
// this design's own choices (the reference leaves the de-mapper's insides
// open).
module demapper
  import dvb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  constel_e    constel,
  input  logic        in_valid,
  input  logic        in_data,
  input  logic        in_last,
  input  logic [13:0] in_k,
  input  logic signed [2*DW:0] z_re,
  input  logic signed [2*DW:0] z_im,
  input  logic [2*DW:0]        g,
  output logic        out_valid,
  output logic [13:0] out_k,
  output logic [5:0]  out_bits,
  output logic        sym_last
);
  localparam int AW = 2 * DW + 1 + 12;

  function automatic logic [1:0] level(logic signed [2*DW:0] z, logic [2*DW:0] gg, constel_e c);
    logic [AW-1:0] mag, sp;
    logic signed [AW-1:0] zw;
    logic [1:0] l;
    zw  = AW'(z);
    mag = (zw < 0 ? -zw : zw) * AW'(UNIT);
    case (c)
      QAM16:   sp = AW'(gg) * AW'(2 * LVL_QAM16);
      default: sp = AW'(gg) * AW'(2 * LVL_QAM64);
    endcase
    l = 2'd0;
    if (c == QAM16) begin
      if (mag > sp) l = 2'd1;
    end else if (c == QAM64) begin
      if (mag > sp)       l = 2'd1;
      if (mag > 2 * sp)   l = 2'd2;
      if (mag > 3 * sp)   l = 2'd3;
    end
    return l ^ (l >> 1);  // Gray
  endfunction

  logic [1:0] gi_l, gq_l;
  assign gi_l = level(z_re, g, constel);
  assign gq_l = level(z_im, g, constel);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_k <= '0; out_bits <= '0; sym_last <= 1'b0;
    end else begin
      out_valid <= in_valid && in_data;
      sym_last  <= in_valid && in_last;
      if (in_valid) begin
        out_k <= in_k;
        out_bits[0] <= z_re < 0;
        out_bits[1] <= z_im < 0;
        case (constel)
          QPSK:    out_bits[5:2] <= '0;
          QAM16:   out_bits[5:2] <= {2'b00, gq_l[0], gi_l[0]};
          default: out_bits[5:2] <= {gq_l[0], gi_l[0], gq_l[1], gi_l[1]};
        endcase
      end
    end
  end
endmodule
