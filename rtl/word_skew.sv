// word_skew: converts a parallel W-bit word into the bit-skewed format of the pipelined
// datapath.
//
// The datapath cuts every carry ripple path after B bit positions. A word is therefore
// cut into NS = ceil(W/B) slices of B bits, and slice k (bits k*B .. k*B+B-1) travels k
// clock cycles behind slice 0, so that the carry out of slice k-1, registered, meets
// slice k. This module delays slice k by k cycles. With B = 1 it gives the systolic bit
// skew of one cycle between neighbouring bits; with B >= W it is a wire.
// Timing: bit j of the word presented in cycle t leaves in cycle t + floor(j/B).
module word_skew
  import dwt_pkg::*;
#(
  parameter int unsigned W = DWT_W,
  parameter int unsigned B = DWT_B
) (
  input  logic         clk,
  input  logic [W-1:0] d,   // parallel word
  output logic [W-1:0] q    // skewed word
);
  localparam int unsigned NS = cdiv(W, B);
  for (genvar k = 0; k < NS; k++) begin : g_slice
    localparam int unsigned LO = k * B;
    localparam int unsigned HI = umin(W, (k + 1) * B) - 1;
    pipe_delay #(.WIDTH(HI - LO + 1), .DEPTH(k)) u_dly (.clk, .d(d[HI:LO]), .q(q[HI:LO]));
  end
endmodule
