// tb_dwt_folded: end-to-end test of the three-octave folded wavelet transform at its
// default parameters. Several signals (separated by resets) are streamed in: pixel rows
// at one sample per cycle, signed data with random gaps, a constant row, and a row cut
// by a reset half-way with pairs in flight. A model of the whole decomposition (the
// word-level lattice model of tb_dwt_ref_pkg applied octave after octave, each octave's
// lowpass output feeding the next) predicts, per octave and in order, every (h, g) the
// design must produce. Checks:
//   - every output against the model, bit for bit, with its octave tag,
//   - first-octave outputs exactly LATENCY + 2 = 15 cycles after their odd sample,
//   - G vanishes for the constant row, in every octave,
//   - nothing is missing or extra at the end.
// Counted mechanisms (a failure if one never happens): outputs of every octave, cycles
// where two octaves wait for the filter pair at once (arbitration), input at full rate,
// input gaps, the constant row and the reset in flight.
module tb_dwt_folded;
  import tb_dwt_ref_pkg::*;
  localparam int W    = 16;
  localparam int NOCT = 3;
  localparam int LAT0 = 15;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic         rst_n, in_valid, out_valid;
  logic [W-1:0] x_in, h_out, g_out;
  logic [1:0]   out_oct;
  int checks = 0, failures = 0;
  int n_oct [NOCT];
  int n_conflict = 0, n_full_rate = 0, n_gap = 0, n_dc = 0, n_rst = 0;
  bit dc_mode = 1'b0;
  int dc_base [NOCT];

  dwt_folded dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .out_oct, .h_out, .g_out);

  typedef struct { word_t h, g; int due; } exp_t;
  exp_t  expq [NOCT][$];
  word_t ev [NOCT];
  bit    odd [NOCT];
  word_t ls [NOCT];

  function automatic void model_reset();
    for (int o = 0; o < NOCT; o++) begin
      expq[o].delete();
      odd[o] = 1'b0;
      ls[o]  = '0;
    end
  endfunction

  function automatic void model_push(int o, word_t v, int due);
    if (!odd[o]) begin
      ev[o]  = v;
      odd[o] = 1'b1;
    end else begin
      exp_t  e;
      word_t ln;
      odd[o] = 1'b0;
      lattice_step(ev[o], v, ls[o], ln, e.h, e.g);
      ls[o] = ln;
      e.due = due;
      expq[o].push_back(e);
      if (o + 1 < NOCT) model_push(o + 1, e.h, -1);
    end
  endfunction

  always @(posedge clk) begin
    if (!rst_n) model_reset();
    else if (in_valid) model_push(0, word_t'(x_in), cyc + LAT0);
    if (rst_n && $countones(dut.pend) > 1) n_conflict++;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      // first octave: exact timing
      if (expq[0].size() > 0 && expq[0][0].due == cyc) begin
        checks++;
        if (!(out_valid && out_oct == 2'd0)) begin
          failures++;
          $display("cycle %0d: first-octave output missing", cyc);
        end
      end
      if (out_valid) begin
        int o;
        o = int'(out_oct);
        checks++;
        if (o >= NOCT || expq[o].size() == 0) begin
          failures++;
          $display("cycle %0d: unexpected output of octave %0d", cyc, o);
        end else begin
          exp_t e;
          e = expq[o].pop_front();
          n_oct[o]++;
          if (word_t'(h_out) !== e.h || word_t'(g_out) !== e.g || (o == 0 && e.due != cyc)) begin
            failures++;
            if (failures < 10) $display("cycle %0d octave %0d: h,g = %0d %0d expected %0d %0d (due %0d)",
                                        cyc, o, word_t'(h_out), word_t'(g_out), e.h, e.g, e.due);
          end
          if (dc_mode && n_oct[o] - dc_base[o] > 3) begin
            // constant row: G vanishes once the octave's history is filled
            n_dc++;
            checks++;
            if ($signed(g_out) > 3 || $signed(g_out) < -3) begin
              failures++;
              $display("constant row, octave %0d: g = %0d", o, $signed(g_out));
            end
          end
        end
      end
    end
  end

  task automatic send(input logic [W-1:0] v);
    in_valid = 1'b1;
    x_in = v;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  task automatic drain();
    repeat (120) @(posedge clk);
    #1;
    for (int o = 0; o < NOCT; o++) begin
      checks++;
      if (expq[o].size() != 0) begin
        failures++;
        $display("octave %0d: %0d outputs missing", o, expq[o].size());
      end
    end
  endtask

  initial begin
    for (int o = 0; o < NOCT; o++) n_oct[o] = 0;
    x_in = '0;
    do_reset();
    // two pixel rows at full rate
    for (int r = 0; r < 2; r++) begin
      for (int n = 0; n < 128; n++) send(W'($urandom_range(255)) << 4);
      n_full_rate++;
      drain();
      do_reset();
    end
    // signed data with gaps
    for (int n = 0; n < 200; n++) begin
      if ($urandom_range(3) == 0) begin
        n_gap++;
        in_valid = 1'b0;
        repeat ($urandom_range(4) + 1) @(posedge clk);
        #1;
      end
      send(W'($signed(12'($urandom))));
    end
    drain();
    do_reset();
    // constant row: check G of every octave away from the row start
    for (int o = 0; o < NOCT; o++) dc_base[o] = n_oct[o];
    dc_mode = 1'b1;
    for (int n = 0; n < 128; n++) send(16'd3000);
    drain();
    dc_mode = 1'b0;
    do_reset();
    // a row cut by a reset with pairs in flight
    for (int n = 0; n < 77; n++) send(W'($urandom_range(255)) << 4);
    do_reset();
    n_rst++;
    for (int n = 0; n < 64; n++) send(W'($urandom_range(255)) << 4);
    drain();
    $display("mechanisms: outputs per octave %0d/%0d/%0d, arbitration conflicts %0d, full-rate rows %0d, input gaps %0d, constant-row checks %0d, resets in flight %0d",
             n_oct[0], n_oct[1], n_oct[2], n_conflict, n_full_rate, n_gap, n_dc, n_rst);
    for (int o = 0; o < NOCT; o++)
      if (n_oct[o] == 0) begin failures++; $display("no outputs of octave %0d", o); end
    if (n_conflict == 0)  begin failures++; $display("no arbitration conflict"); end
    if (n_full_rate == 0) begin failures++; $display("no full-rate input"); end
    if (n_gap == 0)       begin failures++; $display("no input gaps"); end
    if (n_dc == 0)        begin failures++; $display("no constant-row checks"); end
    if (n_rst == 0)       begin failures++; $display("no reset in flight"); end
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
