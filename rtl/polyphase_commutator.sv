// polyphase_commutator: the input switch of the polyphase filter bank. It splits the
// input sequence x(n) into its even and odd phases, x(2m) for the upper lattice line and
// x(2m+1) for the lower one, and hands them on as one pair, so that the lattice runs at
// half the input sample rate and computes one H and one G output per pair.
// Interface: in_valid/x_in accept one sample per cycle when in_valid is high (gaps are
// allowed). pair_valid pulses for one cycle, the cycle after the odd sample of a pair
// was accepted, with even_out = x(2m) and odd_out = x(2m+1). A synchronous active-low
// reset makes the next accepted sample an even one.
module polyphase_commutator
  import dwt_pkg::*;
#(
  parameter int unsigned W = DWT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x_in,
  output logic         pair_valid,
  output logic [W-1:0] even_out,
  output logic [W-1:0] odd_out
);
  logic         odd_phase;   // next accepted sample is x(2m+1)
  logic [W-1:0] even_hold;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      odd_phase  <= 1'b0;
      pair_valid <= 1'b0;
    end else begin
      pair_valid <= in_valid && odd_phase;
      if (in_valid) odd_phase <= !odd_phase;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !odd_phase) even_hold <= x_in;
    if (in_valid && odd_phase) begin
      even_out <= even_hold;
      odd_out  <= x_in;
    end
  end
endmodule
