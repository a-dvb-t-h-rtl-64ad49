// cordic_pkg: arctangent table shared by the CORDIC helpers.
// ATAN[i] = atan(2^-i) with a full turn (2*pi) = 2^32.
//
// The table, the 2^32 phase scale and the use of CORDIC at all are this
// design's own; the reference only asks for the angle of a correlation and
// a phase de-rotation, without saying how they are computed.
package cordic_pkg;
  localparam int NIT = 16;
  localparam logic [31:0] ATAN [NIT] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465, 32'd10679838, 32'd5340245, 32'd2670163, 32'd1335087,
    32'd667544, 32'd333772, 32'd166886, 32'd83443, 32'd41722, 32'd20861};
  // 1/K for 16 iterations, Q15
  localparam int INV_GAIN = 19898;
endpackage
