// cordic_vec: combinational vectoring CORDIC, angle of (x + j*y).
// The vector is first folded into the right half plane (+-pi), then 16
// micro-rotations drive y to zero while the rotation angles are summed.
// Output angle: signed, full turn = 2^32 (so +-pi = +-2^31). Inputs of
// up to XW bits; two guard bits are added internally.
//
// The fractional CFO needs the angle of the delay correlation, as the
// reference states; computing it with a vectoring CORDIC, and the iteration
// count and widths, are this design's own choices.
module cordic_vec
  import cordic_pkg::*;
#(
  parameter int XW = 24
) (
  input  logic signed [XW-1:0] x,
  input  logic signed [XW-1:0] y,
  output logic signed [31:0]   angle
);
  localparam int W = XW + 2;
  always_comb begin
    logic signed [W-1:0] cx, cy, tx;
    logic [31:0] a;
    cx = W'(x); cy = W'(y); a = '0;
    if (x < 0) begin
      cx = -W'(x); cy = -W'(y); a = 32'h8000_0000;
    end
    for (int i = 0; i < NIT; i++) begin
      tx = cx;
      if (cy > 0) begin
        cx = cx + (cy >>> i);
        cy = cy - (tx >>> i);
        a  = a + ATAN[i];
      end else begin
        cx = cx - (cy >>> i);
        cy = cy + (tx >>> i);
        a  = a - ATAN[i];
      end
    end
    angle = signed'(a);
  end
endmodule
