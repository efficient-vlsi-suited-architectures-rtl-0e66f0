// cordic_rotation: one CORDIC micro-rotation of the lattice filter by
// alpha_s = SIGMA * arctan(2^-S), without its 1/sqrt(1+2^-2S) gain (the gain of all
// rotations is folded into the scaling factor K, see cordic_scale):
//   u_out = u_in - SIGMA * (l_in >>> S)
//   l_out = l_in + SIGMA * (u_in >>> S)
// Each line is one skew_addsub, so a rotation is two word-level shift-and-add adders
// with carry paths cut every B bits; the lines cross only through the shift wiring.
// S = 0 gives the 45-degree rotation with coefficients +-1.
// Data ports use the bit-skewed format (see word_skew).
// Timing: latency LAT = ceil(S/B) + 1 cycles, one (u, l) pair per cycle.
module cordic_rotation
  import dwt_pkg::*;
#(
  parameter int unsigned W     = DWT_W,
  parameter int unsigned B     = DWT_B,
  parameter int unsigned S     = 0,
  parameter int          SIGMA = 1      // +1 or -1: direction of the rotation
) (
  input  logic         clk,
  input  logic [W-1:0] u_in,    // upper line, skewed
  input  logic [W-1:0] l_in,    // lower line, skewed
  output logic [W-1:0] u_out,
  output logic [W-1:0] l_out
);

  if (SIGMA != 1 && SIGMA != -1) begin : g_bad_sigma
    $error("cordic_rotation: SIGMA must be +1 or -1");
  end

  skew_addsub #(.W(W), .B(B), .SA(0), .SB(S), .SUB(SIGMA > 0)) u_upper (
    .clk, .a(u_in), .b(l_in), .y(u_out)
  );
  skew_addsub #(.W(W), .B(B), .SA(0), .SB(S), .SUB(SIGMA < 0)) u_lower (
    .clk, .a(l_in), .b(u_in), .y(l_out)
  );
endmodule
