// word_deskew: converts a bit-skewed word (slice k trailing slice 0 by k cycles, see
// word_skew) back into a parallel word by delaying slice k by NS-1-k cycles.
// Timing: a skewed word whose slice 0 arrives in cycle t leaves complete in cycle
// t + NS - 1, NS = ceil(W/B).
module word_deskew
  import dwt_pkg::*;
#(
  parameter int unsigned W = DWT_W,
  parameter int unsigned B = DWT_B
) (
  input  logic         clk,
  input  logic [W-1:0] d,   // skewed word
  output logic [W-1:0] q    // parallel word
);
  localparam int unsigned NS = cdiv(W, B);
  for (genvar k = 0; k < NS; k++) begin : g_slice
    localparam int unsigned LO = k * B;
    localparam int unsigned HI = umin(W, (k + 1) * B) - 1;
    pipe_delay #(.WIDTH(HI - LO + 1), .DEPTH(NS - 1 - k)) u_dly (.clk, .d(d[HI:LO]), .q(q[HI:LO]));
  end
endmodule
