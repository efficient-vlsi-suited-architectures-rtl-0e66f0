// tb_dwt_full: the folded transform at its default parameters (16-bit words, carry path
// cut every 4 bits, three octaves on one filter pair) decomposes one image row of 512
// 8-bit pixels streamed at one pixel per cycle. The row holds a bright constant stretch
// (all pixels 255, the worst case for word growth), a ramp and random pixels. Checks:
//   - every output of every octave bit for bit against the word-level model,
//   - every output against the floating-point Daubechies-4 filter pair applied to that
//     octave's input (within 2.5 % of the input magnitude), which a wrap-around of the
//     16-bit words would break,
//   - on the constant stretch G vanishes and H has gain (sqrt(2) * K'/K)^octave,
//   - the whole three-octave decomposition (256 + 128 + 64 pairs) is finished no more
//     than 100 cycles after the last pixel, i.e. one filter pair keeps up with the
//     input rate.
module tb_dwt_full;
  import tb_dwt_ref_pkg::*;
  localparam int W     = 16;
  localparam int N     = 512;
  localparam int NOCT  = 3;
  localparam real KGAIN = 0.65625 / ((1.0 / 1.41421356) * (16.0 / 17.0));

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic         rst_n, in_valid, out_valid;
  logic [W-1:0] x_in, h_out, g_out;
  logic [1:0]   out_oct;
  int checks = 0, failures = 0;

  dwt_folded dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .out_oct, .h_out, .g_out);

  word_t hs [NOCT][N/2];
  word_t gs [NOCT][N/2];
  int    cnt [NOCT];
  int    last_out_cyc;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int o;
      o = int'(out_oct);
      if (o < NOCT && cnt[o] < N/2) begin
        hs[o][cnt[o]] = word_t'(h_out);
        gs[o][cnt[o]] = word_t'(g_out);
      end
      if (o < NOCT) cnt[o]++;
      last_out_cyc = cyc;
    end
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    word_t sig [N];
    int    len, end_in;
    real   dc_h;
    for (int n = 0; n < N; n++) begin
      if (n < 128)      sig[n] = word_t'(255 << 4);
      else if (n < 256) sig[n] = word_t'(((n - 128) * 2) << 4);
      else              sig[n] = word_t'($urandom_range(255) << 4);
    end
    for (int o = 0; o < NOCT; o++) cnt[o] = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      in_valid = 1'b1;
      x_in = sig[n];
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    end_in = cyc;
    repeat (200) @(posedge clk);
    #1;
    checks++;
    if (last_out_cyc - end_in > 100) begin
      failures++;
      $display("decomposition ended %0d cycles after the last pixel", last_out_cyc - end_in);
    end
    len  = N;
    dc_h = 255.0 * 16.0;
    for (int o = 0; o < NOCT; o++) begin
      word_t ls, ln, eh, eg;
      checks++;
      if (cnt[o] != len / 2) begin
        failures++;
        $display("octave %0d: %0d outputs, expected %0d", o, cnt[o], len / 2);
      end
      ls = '0;
      dc_h = dc_h * 1.41421356 * KGAIN;
      for (int m = 0; m < len / 2; m++) begin
        real fh, fg, mag, tol;
        word_t xs [4];
        lattice_step(sig[2*m], sig[2*m+1], ls, ln, eh, eg);
        ls = ln;
        checks++;
        if (hs[o][m] !== eh || gs[o][m] !== eg) begin
          failures++;
          if (failures < 10) $display("octave %0d pair %0d: %0d %0d expected %0d %0d", o, m, hs[o][m], gs[o][m], eh, eg);
        end
        xs[0] = sig[2*m]; xs[1] = sig[2*m+1];
        xs[2] = (m > 0) ? sig[2*m-2] : word_t'(0);
        xs[3] = (m > 0) ? sig[2*m-1] : word_t'(0);
        fh = 0.0; fg = 0.0; mag = 0.0;
        for (int t = 0; t < 4; t++) begin
          fh  += D4_H[t] * real'(xs[t]);
          fg  += D4_G[t] * real'(xs[t]);
          mag += absr(real'(xs[t]));
        end
        tol = 0.025 * mag + 4.0;
        checks++;
        if (absr(real'(hs[o][m]) - KGAIN * fh) > tol || absr(real'(gs[o][m]) - KGAIN * fg) > tol) begin
          failures++;
          if (failures < 10) $display("octave %0d pair %0d: %0d %0d, Daubechies-4 gives %f %f", o, m, hs[o][m], gs[o][m], KGAIN*fh, KGAIN*fg);
        end
      end
      for (int m = 2; m < len / 8 - 1; m++) begin
        checks++;
        if (gs[o][m] > 3 || gs[o][m] < -3 || absr(real'(hs[o][m]) - dc_h) > 0.01 * dc_h) begin
          failures++;
          $display("octave %0d constant pair %0d: h=%0d (expected %f) g=%0d", o, m, hs[o][m], dc_h, gs[o][m]);
        end
      end
      $display("octave %0d: %0d samples in, %0d pairs out, constant-stretch H = %0d (expected %.1f)",
               o, len, cnt[o], hs[o][4], dc_h);
      for (int m = 0; m < len / 2; m++) sig[m] = hs[o][m];
      len = len / 2;
    end
    $display("last output %0d cycles after the last pixel", last_out_cyc - end_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
