// cordic_dwt_lattice: the filter pair H(z)/G(z) of a discrete wavelet transform with the
// Daubechies wavelet of length 4, built as an orthogonal lattice whose rotations are
// single CORDIC steps. All arithmetic is shift-and-add; there is no multiplier.
//
// It takes the two polyphase samples x(2m) (upper line u) and x(2m+1) (lower line l) of
// one pair per cycle and computes, along the data flow:
//   word_skew    both lines into the bit-skewed pipeline format
//   scale K      on each line (K is built twice, so neither line waits for the other);
//                2, 3 or 4 CSD digits for W <= 8, <= 16, > 16 (3 at the default W = 16)
//   rotation 1   s = 0, sigma = -1  (-45.00 deg)   } together beta1 = -59.04 deg
//   rotation 2   s = 2, sigma = -1  (-14.04 deg)   }   (exact Daubechies-4: -60 deg)
//   z^-1         on the lower line: one pair of the same octave
//   rotation 3   s = 2, sigma = +1  (+14.04 deg)      beta2 (exact: 15 deg)
//   word_deskew  u -> h_out (lowpass, H(z)), l -> g_out (highpass, G(z))
// The rotation angles add up to -45 degrees exactly, so G keeps its first vanishing
// moment (zero output for a constant input, up to truncation) despite the coarse angles,
// and the filter pair stays orthogonal up to the common gain error of K.
// Every adder has its carry path cut by a register every B bits. The pipeline
// registers advance every cycle; only the z^-1 words load, under the skewed valid flag.
//
// For word-level folding the pair carries an octave tag (in_oct); the z^-1 element
// keeps one word per octave (NOCT), and the tag leaves with the result (out_oct).
// With NOCT = 1 the tag is ignored.
// Data: W-bit two's complement; results wrap modulo 2^W (16 bits leave room for three
// octaves of growth of 8-bit pixels with 4 fractional bits).
// Timing: fully pipelined, one pair per cycle; out_valid/h_out/g_out/out_oct appear
// LATENCY cycles after in_valid (13 at W = 16, B = 4; 32 at B = 1; 9 at B = 16).
// Synchronous active-low reset clears the valid pipeline and the z^-1 words.
module cordic_dwt_lattice
  import dwt_pkg::*;
#(
  parameter int unsigned W    = DWT_W,
  parameter int unsigned B    = DWT_B,
  parameter int unsigned NOCT = 1,
  localparam int unsigned OW  = (NOCT > 1) ? $clog2(NOCT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [OW-1:0] in_oct,     // octave of the pair (folded use)
  input  logic [W-1:0]  u_in,       // x(2m)
  input  logic [W-1:0]  l_in,       // x(2m+1)
  output logic          out_valid,
  output logic [OW-1:0] out_oct,
  output logic [W-1:0]  h_out,      // lowpass output of the pair
  output logic [W-1:0]  g_out       // highpass output of the pair
);
  localparam int unsigned NS     = cdiv(W, B);
  localparam int unsigned NDIG   = k_digits(W);               // digits of K
  localparam int unsigned L_K    = k_latency(B, NDIG);
  localparam int unsigned L_R1   = cdiv(0, B) + 1;
  localparam int unsigned L_R2   = cdiv(2, B) + 1;
  localparam int unsigned L_R3   = cdiv(2, B) + 1;
  localparam int unsigned L_PRE  = L_K + L_R1 + L_R2;         // in_valid -> z^-1, slice 0
  localparam int unsigned LATENCY = L_PRE + L_R3 + NS - 1;    // in_valid -> out_valid

  logic [W-1:0]  u0, l0, u1, l1, u2, l2, u3, l3, u4, l4, l3d;
  logic [NS-1:0] dly_en;
  logic [OW-1:0] dly_sel [NS];

  word_skew #(.W(W), .B(B)) u_skew_u (.clk, .d(u_in), .q(u0));
  word_skew #(.W(W), .B(B)) u_skew_l (.clk, .d(l_in), .q(l0));

  cordic_scale #(.W(W), .B(B), .NDIG(NDIG)) u_scale_u (.clk, .x(u0), .y(u1));
  cordic_scale #(.W(W), .B(B), .NDIG(NDIG)) u_scale_l (.clk, .x(l0), .y(l1));

  cordic_rotation #(.W(W), .B(B), .S(0), .SIGMA(-1)) u_rot1 (
    .clk, .u_in(u1), .l_in(l1), .u_out(u2), .l_out(l2)
  );
  cordic_rotation #(.W(W), .B(B), .S(2), .SIGMA(-1)) u_rot2 (
    .clk, .u_in(u2), .l_in(l2), .u_out(u3), .l_out(l3)
  );

  lattice_delay #(.W(W), .B(B), .NOCT(NOCT)) u_zdelay (
    .clk, .rst_n, .en(dly_en), .sel(dly_sel), .d(l3), .q(l3d)
  );

  cordic_rotation #(.W(W), .B(B), .S(2), .SIGMA(1)) u_rot3 (
    .clk, .u_in(u3), .l_in(l3d), .u_out(u4), .l_out(l4)
  );

  word_deskew #(.W(W), .B(B)) u_deskew_h (.clk, .d(u4), .q(h_out));
  word_deskew #(.W(W), .B(B)) u_deskew_g (.clk, .d(l4), .q(g_out));

  // valid and octave-tag pipeline: index i is the pair's flag/tag delayed by i cycles
  logic [LATENCY:0] vsr;
  logic [OW-1:0]    osr [LATENCY+1];
  assign vsr[0] = in_valid;
  assign osr[0] = in_oct;
  always_ff @(posedge clk) begin
    if (!rst_n) vsr[LATENCY:1] <= '0;
    else        vsr[LATENCY:1] <= vsr[LATENCY-1:0];
    for (int i = 1; i <= LATENCY; i++) osr[i] <= osr[i-1];
  end
  for (genvar k = 0; k < NS; k++) begin : g_en
    assign dly_en[k]  = vsr[L_PRE + k];
    assign dly_sel[k] = osr[L_PRE + k];
  end
  assign out_valid = vsr[LATENCY];
  assign out_oct   = osr[LATENCY];

  // the z^-1 enables must follow the data skew: slice k+1 one cycle after slice k
  for (genvar k = 0; k + 1 < NS; k++) begin : g_skew_chk
    a_en_skew: assert property (@(posedge clk) disable iff (!rst_n)
                                dly_en[k] |=> dly_en[k+1]);
  end
  a_oct_range: assert property (@(posedge clk) disable iff (!rst_n)
                                in_valid |-> (NOCT == 1 || int'(in_oct) < NOCT));
endmodule
