// dwt_folded: a NOCT-octave (default 3) one-dimensional discrete wavelet transform with
// the Daubechies-4 wavelet, folded at word level onto a single CORDIC lattice filter
// pair (cordic_dwt_lattice). Downsampling halves the work of each octave, so octave o
// needs one filter-pair slot every 2^(o+1) input samples; all octaves together need
// fewer than one slot per input sample, and one pipelined filter pair serves them all
// at an input rate of one sample per cycle.
//
// How it works: a polyphase commutator per octave gathers that octave's input into
// (even, odd) pairs. Octave 0 takes the input stream; octave o > 0 takes the lowpass
// outputs (h) of octave o-1 as they leave the filter pair. Each octave has a one-pair
// holding register; every cycle the lowest octave with a pair waiting is issued to the
// filter pair together with its octave tag, which selects that octave's z^-1 word
// inside the lattice. Each result leaves tagged with its octave: g_out of every octave
// is a band of the transform, h_out of the last octave is the remaining lowpass band
// (h_out of the other octaves is also shown; it is fed back internally).
// The order of issue (lowest octave first) and the holding registers are this
// implementation's own scheduling; only the use of one filter pair for all octaves is
// the architecture's.
// Interface: in_valid/x_in, one sample per cycle at most (gaps allowed). out_valid
// pulses with out_oct (0 = first octave), h_out and g_out for each pair computed. An
// octave-0 pair leaves LATENCY + 2 cycles after its odd sample (15 at the defaults).
// Synchronous active-low reset clears all phases, holding registers and lattice state;
// apply it between independent signals (for example between image rows).
module dwt_folded
  import dwt_pkg::*;
#(
  parameter int unsigned W    = DWT_W,
  parameter int unsigned B    = DWT_B,
  parameter int unsigned NOCT = 3,
  localparam int unsigned OW  = (NOCT > 1) ? $clog2(NOCT) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  x_in,
  output logic          out_valid,
  output logic [OW-1:0] out_oct,
  output logic [W-1:0]  h_out,
  output logic [W-1:0]  g_out
);
  logic [NOCT-1:0] c_valid, pair_valid, pend, grant;
  logic [W-1:0]    c_x [NOCT];
  logic [W-1:0]    pair_e [NOCT];
  logic [W-1:0]    pair_o [NOCT];
  logic [W-1:0]    pend_e [NOCT];
  logic [W-1:0]    pend_o [NOCT];
  logic            pe_valid;
  logic [OW-1:0]   pe_oct;
  logic [W-1:0]    pe_u, pe_l;

  for (genvar o = 0; o < NOCT; o++) begin : g_oct
    if (o == 0) begin : g_in
      assign c_valid[o] = in_valid;
      assign c_x[o]     = x_in;
    end else begin : g_fb
      assign c_valid[o] = out_valid && (int'(out_oct) == o - 1);
      assign c_x[o]     = h_out;
    end

    polyphase_commutator #(.W(W)) u_comm (
      .clk, .rst_n, .in_valid(c_valid[o]), .x_in(c_x[o]),
      .pair_valid(pair_valid[o]), .even_out(pair_e[o]), .odd_out(pair_o[o])
    );

    // one-pair holding register
    always_ff @(posedge clk) begin
      if (!rst_n)             pend[o] <= 1'b0;
      else if (pair_valid[o]) pend[o] <= 1'b1;
      else if (grant[o])      pend[o] <= 1'b0;
    end
    always_ff @(posedge clk) begin
      if (pair_valid[o]) begin
        pend_e[o] <= pair_e[o];
        pend_o[o] <= pair_o[o];
      end
    end

    a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                   pair_valid[o] |-> (!pend[o] || grant[o]));
  end

  // issue the lowest waiting octave
  always_comb begin
    grant  = '0;
    pe_oct = '0;
    pe_u   = pend_e[0];
    pe_l   = pend_o[0];
    for (int o = NOCT - 1; o >= 0; o--) begin
      if (pend[o]) begin
        grant  = '0;
        grant[o] = 1'b1;
        pe_oct = OW'(o);
        pe_u   = pend_e[o];
        pe_l   = pend_o[o];
      end
    end
  end
  assign pe_valid = |pend;

  cordic_dwt_lattice #(.W(W), .B(B), .NOCT(NOCT)) u_pe (
    .clk, .rst_n, .in_valid(pe_valid), .in_oct(pe_oct), .u_in(pe_u), .l_in(pe_l),
    .out_valid, .out_oct, .h_out, .g_out
  );
endmodule
