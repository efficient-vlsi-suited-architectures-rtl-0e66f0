// cordic_scale: multiplies a skewed data word by the lattice scaling factor K with
// shift-and-add adders only, K being a canonical signed digit constant of NDIG
// (2 to 4) non-zero digits:
//   K ~ 2^-S0 +- 2^-S1 [+- 2^-S2 [+- 2^-S3]]
//   t1 = (x >>> S0) +- (x >>> S1)                 first skew_addsub
//   t2 = t1 +- (x' >>> S2)                        second, x' = x delayed to meet t1
//   t3 = t2 +- (x'' >>> S3)                       third,  x'' = x delayed to meet t2
// K compensates the gain of the three micro-rotations of the Daubechies-4 lattice:
//   K = cos(45 deg) * cos(arctan 2^-2)^2 = 1/sqrt(2) * 16/17 = 0.66551
// More digits buy accuracy of K for longer words. The default digits 2^-1, 2^-3,
// 2^-5, 2^-7 truncate the binary expansion 0.101010...b of 2/3: K' = 0.625 (2 digits),
// 0.65625 (3, the default at 16 bits) and 0.6640625 (4); they are this
// implementation's choice. The adders are the same cells as a rotation's, wired
// differently. NDIG - 1 adders are used.
// Truncation: floor at each shift; wraps modulo 2^W.
// Timing: skewed ports; latency = max(ceil(S0/B), ceil(S1/B)) + 1, plus ceil(S2/B) + 1
//         for a third digit, plus ceil(S3/B) + 1 for a fourth (6 cycles for the
//         defaults at B = 4); one word per cycle.
module cordic_scale
  import dwt_pkg::*;
#(
  parameter int unsigned W     = DWT_W,
  parameter int unsigned B     = DWT_B,
  parameter int unsigned NDIG  = 3,
  parameter int unsigned S0    = 1,
  parameter int unsigned S1    = 3,
  parameter int unsigned S2    = 5,
  parameter int unsigned S3    = 7,
  parameter bit          NEG1  = 1'b0,   // digit 1 is -2^-S1
  parameter bit          NEG2  = 1'b0,   // digit 2 is -2^-S2
  parameter bit          NEG3  = 1'b0    // digit 3 is -2^-S3
) (
  input  logic         clk,
  input  logic [W-1:0] x,   // skewed input word
  output logic [W-1:0] y    // skewed K * x
);
  localparam int unsigned LAT1 = umax(cdiv(S0, B), cdiv(S1, B)) + 1;
  localparam int unsigned LAT2 = cdiv(S2, B) + 1;

  if (NDIG < 2 || NDIG > 4) begin : g_bad_ndig
    $error("cordic_scale: NDIG must be 2, 3 or 4");
  end

  logic [W-1:0] t1;

  skew_addsub #(.W(W), .B(B), .SA(S0), .SB(S1), .SUB(NEG1)) u_add1 (
    .clk, .a(x), .b(x), .y(t1)
  );

  if (NDIG == 2) begin : g_two
    assign y = t1;
  end else begin : g_more
    logic [W-1:0] x1, t2;
    // every slice of x waits the first adder's latency, so x' keeps the skew of t1
    pipe_delay #(.WIDTH(W), .DEPTH(LAT1)) u_xdly1 (.clk, .d(x), .q(x1));
    skew_addsub #(.W(W), .B(B), .SA(0), .SB(S2), .SUB(NEG2)) u_add2 (
      .clk, .a(t1), .b(x1), .y(t2)
    );
    if (NDIG == 3) begin : g_three
      assign y = t2;
    end else begin : g_four
      logic [W-1:0] x2;
      pipe_delay #(.WIDTH(W), .DEPTH(LAT2)) u_xdly2 (.clk, .d(x1), .q(x2));
      skew_addsub #(.W(W), .B(B), .SA(0), .SB(S3), .SUB(NEG3)) u_add3 (
        .clk, .a(t2), .b(x2), .y(y)
      );
    end
  end
endmodule
