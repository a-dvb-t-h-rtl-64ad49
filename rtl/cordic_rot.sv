// cordic_rot: combinational rotation CORDIC, (x + j*y) * exp(j*phase).
// Phase: full turn = 2^32. Phases outside +-pi/2 are first rotated by pi;
// 16 micro-rotations follow and the CORDIC gain is removed with a Q15
// constant multiply. Output saturates to XW bits.
//
// The reference asks for "a simple phase de-rotate circuit just before" the
// FFT; building it as a CORDIC, with 16 iterations, a single-cycle
// (combinational) form and saturation, is this design's own choice.
module cordic_rot
  import cordic_pkg::*;
#(
  parameter int XW = 16
) (
  input  logic signed [XW-1:0] x,
  input  logic signed [XW-1:0] y,
  input  logic [31:0]          phase,
  output logic signed [XW-1:0] xo,
  output logic signed [XW-1:0] yo
);
  localparam int W = XW + 2;
  function automatic logic signed [XW-1:0] sat(logic signed [W+15:0] v);
    if (v > (W+16)'((1 << (XW - 1)) - 1)) return XW'((1 << (XW - 1)) - 1);
    if (v < -(W+16)'(1 << (XW - 1)))      return XW'(-(1 << (XW - 1)));
    return v[XW-1:0];
  endfunction
  always_comb begin
    logic signed [W-1:0] cx, cy, tx;
    logic signed [31:0]  a;
    logic signed [W+15:0] px, py;
    cx = W'(x); cy = W'(y); a = signed'(phase);
    if (a > 32'sh4000_0000 || a < -32'sh4000_0000) begin
      cx = -cx; cy = -cy; a = a + 32'sh8000_0000;
    end
    for (int i = 0; i < NIT; i++) begin
      tx = cx;
      if (a >= 0) begin
        cx = cx - (cy >>> i);
        cy = cy + (tx >>> i);
        a  = a - signed'(ATAN[i]);
      end else begin
        cx = cx + (cy >>> i);
        cy = cy - (tx >>> i);
        a  = a + signed'(ATAN[i]);
      end
    end
    px = ((W+16)'(cx) * (W+16)'(INV_GAIN) + (W+16)'(16384)) >>> 15;
    py = ((W+16)'(cy) * (W+16)'(INV_GAIN) + (W+16)'(16384)) >>> 15;
    xo = sat(px);
    yo = sat(py);
  end
endmodule
