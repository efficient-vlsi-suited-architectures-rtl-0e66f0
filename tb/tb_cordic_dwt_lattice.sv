// tb_cordic_dwt_lattice: test of the CORDIC lattice filter pair on its own.
// Six copies get the same stream of (x(2m), x(2m+1)) pairs with random octave tags:
// 16-bit words with carry paths cut every 4 bits (the default), every bit (systolic)
// and never (B = 16), each with one z^-1 word; a 16-bit, B = 4 copy with three octaves
// of z^-1 state, for which the tags interleave three independent signals; and 8-bit
// (K with 2 digits) and 18-bit (K with 4 digits, B = 3) copies, fed the same samples
// scaled to their word length. Every output pair is checked
//   - bit for bit against the word-level model in tb_dwt_ref_pkg,
//   - in its timing: out_valid (and out_oct) exactly LATENCY cycles after in_valid,
//     with LATENCY worked out here from the stage latencies,
//   - against the Daubechies-4 filter pair in floating point, within 2.5 % of the
//     input magnitude (the CORDIC angles and K are approximations).
// The stimulus passes through: back-to-back pairs (one per cycle), random gaps, negative
// samples, constant input (where G must vanish), single impulses, and a reset with
// pairs in flight. Each of these is counted, and one that never happened is a failure.
module tb_cordic_dwt_lattice;
  import tb_dwt_ref_pkg::*;
  localparam int W  = 16;
  localparam int NC = 6;
  localparam int CB [NC] = '{4, 1, 16, 4, 4, 3};
  localparam int CN [NC] = '{1, 1, 1, 3, 1, 1};
  localparam int CW [NC] = '{16, 16, 16, 16, 8, 18};
  localparam real KEXACT = (1.0 / 1.41421356) * (16.0 / 17.0);

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_b2b = 0, n_gap = 0, n_neg = 0, n_dc = 0, n_imp = 0, n_rst = 0, n_d4 = 0, n_oct_switch = 0;

  logic         rst_n, in_valid;
  logic [1:0]   oct;
  logic [W-1:0] xe, xo;

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    localparam int B    = CB[i];
    localparam int NOCT = CN[i];
    localparam int WW   = CW[i];
    localparam int ND   = (WW <= 8) ? 2 : (WW <= 16) ? 3 : 4;
    localparam real KGAIN = ((ND == 2) ? 0.625 : (ND == 3) ? 0.65625 : 0.6640625) / KEXACT;
    localparam int OW   = (NOCT > 1) ? 2 : 1;
    localparam int NS   = (WW + B - 1) / B;
    localparam int D13  = (3 + B - 1) / B;
    localparam int LK   = ((D13 > 1) ? D13 : 1) + 1 + ((ND >= 3) ? (5 + B - 1) / B + 1 : 0)
                          + ((ND >= 4) ? (7 + B - 1) / B + 1 : 0);
    localparam int LAT  = LK + 1 + 2 * ((2 + B - 1) / B + 1) + NS - 1;

    typedef logic signed [WW-1:0] w_t;
    typedef struct {
      int    due;
      int    oct;
      w_t    h, g;
      w_t    x [4];   // x(2m), x(2m+1), x(2m-2), x(2m-1)
    } exp_t;

    logic          out_valid;
    logic [OW-1:0] out_oct, in_oct;
    logic [WW-1:0] h_out, g_out;
    exp_t          q [$];
    w_t            lstate [3];
    w_t            pe [3];
    w_t            po [3];
    w_t            ie, io;
    int            last_out;

    assign in_oct = OW'(oct);
    // the samples, scaled to this copy's word length
    assign ie = (WW >= W) ? w_t'($signed(xe)) <<< (WW - W) : w_t'($signed(xe) >>> (W - WW));
    assign io = (WW >= W) ? w_t'($signed(xo)) <<< (WW - W) : w_t'($signed(xo) >>> (W - WW));

    cordic_dwt_lattice #(.W(WW), .B(B), .NOCT(NOCT)) dut (
      .clk, .rst_n, .in_valid, .in_oct, .u_in(ie), .l_in(io), .out_valid, .out_oct, .h_out, .g_out
    );

    // model: runs on the accepted pairs
    always @(posedge clk) begin
      if (!rst_n) begin
        q.delete();
        for (int o = 0; o < 3; o++) begin lstate[o] = '0; pe[o] = '0; po[o] = '0; end
      end else if (in_valid) begin
        exp_t  e;
        w_t    ln;
        int    s;
        s      = (NOCT > 1) ? int'(oct) : 0;
        e.due  = cyc + LAT;
        e.oct  = s;
        e.x[0] = ie; e.x[1] = io; e.x[2] = pe[s]; e.x[3] = po[s];
        lattice_ref#(WW, ND)::step(ie, io, lstate[s], ln, e.h, e.g);
        lstate[s] = ln;
        pe[s] = ie; po[s] = io;
        q.push_back(e);
      end
    end

    // checker
    always @(negedge clk) begin
      if (rst_n) begin
        logic due_now;
        due_now = (q.size() > 0) && (q[0].due == cyc);
        checks++;
        if (out_valid !== due_now) begin
          failures++;
          if (failures < 10) $display("B=%0d cycle %0d: out_valid=%b expected %b", B, cyc, out_valid, due_now);
        end
        if (due_now) begin
          exp_t e;
          real fh, fg, mag, tol;
          e = q.pop_front();
          checks++;
          if (h_out !== e.h || g_out !== e.g || (NOCT > 1 && int'(out_oct) != e.oct)) begin
            failures++;
            if (failures < 10) $display("B=%0d NOCT=%0d cycle %0d: h,g = %h %h expected %h %h", B, NOCT, cyc, h_out, g_out, e.h, e.g);
          end
          fh = 0.0; fg = 0.0; mag = 0.0;
          for (int t = 0; t < 4; t++) begin
            fh  += D4_H[t] * real'(e.x[t]);
            fg  += D4_G[t] * real'(e.x[t]);
            mag += (e.x[t] < 0) ? -real'(e.x[t]) : real'(e.x[t]);
          end
          tol = 0.025 * mag + 5.0;
          checks++;
          if ((real'($signed(h_out)) - KGAIN * fh) > tol || (KGAIN * fh - real'($signed(h_out))) > tol ||
              (real'($signed(g_out)) - KGAIN * fg) > tol || (KGAIN * fg - real'($signed(g_out))) > tol) begin
            failures++;
            if (failures < 10) $display("B=%0d: D4 check h=%0d (%f) g=%0d (%f)", B, $signed(h_out), KGAIN*fh, $signed(g_out), KGAIN*fg);
          end
          if (i == 3) begin
            n_d4++;
            if (cyc - last_out == 1) n_b2b++;
            if (e.x[0] == e.x[1] && e.x[1] == e.x[2] && e.x[2] == e.x[3] && e.x[0] != 0) begin
              n_dc++;
              checks++;
              if ($signed(g_out) > 2 || $signed(g_out) < -2) begin
                failures++;
                $display("constant input %0d: g = %0d, not zero", e.x[0], $signed(g_out));
              end
            end
            if ((e.x[0] != 0) + (e.x[1] != 0) + (e.x[2] != 0) + (e.x[3] != 0) == 1) n_imp++;
          end
          last_out = cyc;
        end
      end
    end
  end

  logic [1:0] last_oct = 2'd0;
  task automatic send(input logic [W-1:0] e, input logic [W-1:0] o, input logic [1:0] t);
    in_valid = 1'b1;
    xe = e; xo = o; oct = t;
    if ($signed(e) < 0 || $signed(o) < 0) n_neg++;
    if (t != last_oct) n_oct_switch++;
    last_oct = t;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    in_valid = 1'b0;
    repeat (n) @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; xe = '0; xo = '0; oct = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // back-to-back pairs of 8-bit pixels, one octave
    for (int n = 0; n < 64; n++) send(W'($urandom_range(255)) << 4, W'($urandom_range(255)) << 4, 2'd0);
    idle(40);
    // random signed data, random octave tags, random gaps
    for (int n = 0; n < 300; n++) begin
      if ($urandom_range(2) == 0) begin
        n_gap++;
        idle($urandom_range(3) + 1);
      end
      send(W'($signed(12'($urandom))), W'($signed(12'($urandom))), 2'($urandom_range(2)));
    end
    idle(40);
    // constant input on each octave
    for (int n = 0; n < 12; n++)
      for (int t = 0; t < 3; t++) send(16'd1600 - 16'(t * 1800), 16'd1600 - 16'(t * 1800), 2'(t));
    // impulses
    for (int n = 0; n < 4; n++) send('0, '0, 2'd1);
    send(16'd2048, '0, 2'd1);
    for (int n = 0; n < 4; n++) send('0, '0, 2'd1);
    send('0, -16'sd2048, 2'd1);
    for (int n = 0; n < 4; n++) send('0, '0, 2'd1);
    idle(40);
    // reset with pairs in flight
    for (int n = 0; n < 7; n++) send(W'($urandom_range(4095)), W'($urandom_range(4095)), 2'd2);
    rst_n = 1'b0;
    n_rst++;
    @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 40; n++) send(W'($urandom_range(4095)), W'($urandom_range(4095)), 2'($urandom_range(2)));
    idle(50);
    if (g_cfg[0].q.size() != 0 || g_cfg[1].q.size() != 0 || g_cfg[2].q.size() != 0 || g_cfg[3].q.size() != 0 ||
        g_cfg[4].q.size() != 0 || g_cfg[5].q.size() != 0) begin
      failures++;
      $display("outputs missing at the end");
    end
    $display("mechanisms: back-to-back outputs %0d, input gaps %0d, negative pairs %0d, constant-input pairs %0d, impulse pairs %0d, octave switches %0d, resets in flight %0d, D4 checks %0d",
             n_b2b, n_gap, n_neg, n_dc, n_imp, n_oct_switch, n_rst, n_d4);
    if (n_b2b == 0)        begin failures++; $display("no back-to-back outputs"); end
    if (n_gap == 0)        begin failures++; $display("no input gaps"); end
    if (n_neg == 0)        begin failures++; $display("no negative samples"); end
    if (n_dc == 0)         begin failures++; $display("no constant-input pairs"); end
    if (n_imp == 0)        begin failures++; $display("no impulse pairs"); end
    if (n_oct_switch == 0) begin failures++; $display("no octave switches"); end
    if (n_rst == 0)        begin failures++; $display("no reset in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
