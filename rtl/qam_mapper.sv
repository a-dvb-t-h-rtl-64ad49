// qam_mapper: maps a group of bits to one QPSK, 16-QAM or 64-QAM cell.
//
// Cells are scaled to unit average power (UNIT = 1024), as in the DVB-T/H
// standard. Bit layout (this design's own Gray mapping, the bit order of
// the standard is not used): even bits b0,b2,b4 drive the in-phase axis, odd
// bits b1,b3,b5 the quadrature axis; the first bit of an axis is the sign
// (0 = positive), the following bits are the Gray-coded magnitude level
// (level L gives amplitude (2L+1) * spacing). QPSK uses b0..b1, 16-QAM
// b0..b3, 64-QAM b0..b5.
//
// Interface: in_valid/in_bits, one cell per cycle; out_valid/out_cell one
// cycle later. No back-pressure.
module qam_mapper
  import dvb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  constel_e constel,
  input  logic     in_valid,
  input  logic [5:0] in_bits,
  output logic     out_valid,
  output cplx_t    out_cell
);

  function automatic logic signed [DW-1:0] axis(logic sgn, logic [1:0] g, constel_e c);
    int lvl, sp;
    logic [1:0] l;
    l = {g[1], g[1] ^ g[0]};  // Gray to binary
    case (c)
      QPSK:    begin lvl = 0;            sp = LVL_QPSK;  end
      QAM16:   begin lvl = int'(g[1]);   sp = LVL_QAM16; end
      default: begin lvl = int'(l);      sp = LVL_QAM64; end
    endcase
    axis = DW'((2 * lvl + 1) * sp);
    if (sgn) axis = -axis;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_cell  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_cell.re <= axis(in_bits[0], {in_bits[2], in_bits[4]}, constel);
        out_cell.im <= axis(in_bits[1], {in_bits[3], in_bits[5]}, constel);
      end
    end
  end

endmodule
