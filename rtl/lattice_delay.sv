// lattice_delay: the z^-1 element of the lattice, between the two rotation sections on
// the lower line. In the polyphase domain z^-1 is one sample pair of the same signal,
// not one clock cycle, so the delay is a register per slice that loads only when a
// valid pair passes. When one filter pair serves several octaves of the transform (word
// level folding), each octave has its own z^-1 word, chosen by the pair's octave tag.
// The data are bit-skewed (see word_skew): slice k of a word arrives k cycles after
// slice 0, and en[k]/sel[k] are the pair's valid flag and octave tag skewed the same
// way. While en[k] is high, q[k] shows slice k of the previous pair of octave sel[k]
// and that octave's register takes slice k of the current pair. A synchronous
// active-low reset clears all stored words (zero signal history).
// Timing: no clock latency; one pair of delay per octave.
module lattice_delay
  import dwt_pkg::*;
#(
  parameter int unsigned W    = DWT_W,
  parameter int unsigned B    = DWT_B,
  parameter int unsigned NOCT = 1,
  localparam int unsigned NS  = cdiv(W, B),
  localparam int unsigned OW  = (NOCT > 1) ? $clog2(NOCT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NS-1:0] en,             // skewed valid: en[k] marks slice k of a valid pair
  input  logic [OW-1:0] sel [NS],       // skewed octave tag of that pair
  input  logic [W-1:0]  d,              // skewed word of pair m
  output logic [W-1:0]  q               // skewed word of pair m-1 of the same octave
);
  for (genvar k = 0; k < NS; k++) begin : g_slice
    localparam int unsigned LO = k * B;
    localparam int unsigned HI = umin(W, (k + 1) * B) - 1;
    logic [HI:LO] st [NOCT];
    logic [OW-1:0] oi;
    assign oi = (NOCT > 1) ? sel[k] : '0;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int o = 0; o < NOCT; o++) st[o] <= '0;
      end else if (en[k]) begin
        st[oi] <= d[HI:LO];
      end
    end
    assign q[HI:LO] = st[oi];
  end
endmodule
