// skew_addsub: y = (a >>> SA) + (b >>> SB), or y = (a >>> SA) - (b >>> SB) when SUB = 1,
// in W-bit two's complement with the carry ripple path cut by a register every B bits.
//
// Operands and result use the bit-skewed format (see word_skew): slice k = bits
// k*B .. k*B+B-1 runs k cycles behind slice 0. An arithmetic right shift by s makes bit
// j of the adder take operand bit j+s, which lives in a later slice and so arrives up
// to ceil(s/B) cycles later than the slice that needs it. Every adder slice therefore
// works D = max(ceil(SA/B), ceil(SB/B)) cycles after its own input slice, and each
// operand bit gets the number of latches that lines it up:
//   latches(j, src) = floor(j/B) + D - floor(src/B),  src = min(j + s, W-1)
// (the top s positions take the sign bit). This is the register distribution
// w(in_i, va_i) = floor(i/B) - floor((i-s)/B) of the parameterised rotation, written for
// a common adder time instead of a per-bit one; for B = 1 it is the systolic
// s + 1 latch rotation. Slice k adds its operand bits and the registered carry of
// slice k-1 (or SUB for slice 0), and registers its sum bits.
// Truncation: the shifted-out bits are dropped (floor), and the result wraps modulo 2^W.
// Timing: latency LAT = D + 1 cycles for every slice, one word per cycle.
module skew_addsub
  import dwt_pkg::*;
#(
  parameter int unsigned W   = DWT_W,
  parameter int unsigned B   = DWT_B,
  parameter int unsigned SA  = 0,
  parameter int unsigned SB  = 0,
  parameter bit          SUB = 1'b0
) (
  input  logic         clk,
  input  logic [W-1:0] a,   // skewed operand a
  input  logic [W-1:0] b,   // skewed operand b
  output logic [W-1:0] y    // skewed result, LAT cycles later
);
  localparam int unsigned NS  = cdiv(W, B);
  localparam int unsigned D   = umax(cdiv(SA, B), cdiv(SB, B));

  logic [W-1:0]  ad, bd, bx;
  logic [NS-1:0] cy;   // registered carry out of each slice (top one unused)

  // operand alignment: shifted, sign-extended and delayed bit by bit
  for (genvar j = 0; j < W; j++) begin : g_bit
    localparam int unsigned SRCA = umin(j + SA, W - 1);
    localparam int unsigned SRCB = umin(j + SB, W - 1);
    pipe_delay #(.WIDTH(1), .DEPTH(j / B + D - SRCA / B)) u_da (.clk, .d(a[SRCA]), .q(ad[j]));
    pipe_delay #(.WIDTH(1), .DEPTH(j / B + D - SRCB / B)) u_db (.clk, .d(b[SRCB]), .q(bd[j]));
  end
  assign bx = SUB ? ~bd : bd;

  // carry-cut adder slices
  for (genvar k = 0; k < NS; k++) begin : g_slice
    localparam int unsigned LO = k * B;
    localparam int unsigned HI = umin(W, (k + 1) * B) - 1;
    localparam int unsigned N  = HI - LO + 1;
    logic       cin;
    logic [N:0] sum;
    if (k == 0) begin : g_c0
      assign cin = SUB;
    end else begin : g_ck
      assign cin = cy[k-1];
    end
    assign sum = {1'b0, ad[HI:LO]} + {1'b0, bx[HI:LO]} + {{N{1'b0}}, cin};
    always_ff @(posedge clk) y[HI:LO] <= sum[N-1:0];
    if (k < NS - 1) begin : g_cy
      always_ff @(posedge clk) cy[k] <= sum[N];
    end else begin : g_ctop
      assign cy[k] = 1'b0;   // carry out of the word is discarded (modulo 2^W)
    end
  end
endmodule
