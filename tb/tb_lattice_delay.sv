// tb_lattice_delay: drives skewed words with a skewed valid flag (valid pairs with
// random gaps) and a skewed random octave tag into a three-octave lattice_delay, and
// checks that, for each valid word, the output read with it is the previous valid word
// of the same octave (zero after reset), slice by slice, and that a reset clears it.
module tb_lattice_delay;
  localparam int W  = 16;
  localparam int B  = 4;
  localparam int NS = (W + B - 1) / B;
  localparam int NW = 400;
  localparam int NOCT = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  logic [W-1:0]  xw [NW];
  logic          vw [NW];
  logic [1:0]    ow [NW];
  logic [1:0]    sel [NS];
  logic [W-1:0]  prev [NW];   // expected output for word n
  logic          rst_n;
  logic [NS-1:0] en;
  logic [W-1:0]  d, q;

  lattice_delay #(.W(W), .B(B), .NOCT(NOCT)) dut (.clk, .rst_n, .en, .sel, .d, .q);

  always_comb begin
    for (int j = 0; j < W; j++) begin
      int idx;
      idx  = cyc - j / B;
      d[j] = (idx >= 0 && idx < NW) ? xw[idx][j] : 1'b0;
    end
    for (int k = 0; k < NS; k++) begin
      int idx;
      idx   = cyc - k;
      en[k]  = (idx >= 0 && idx < NW) ? vw[idx] : 1'b0;
      sel[k] = (idx >= 0 && idx < NW) ? ow[idx] : 2'd0;
    end
  end

  always @(negedge clk) begin
    for (int k = 0; k < NS; k++) begin
      int idx;
      idx = cyc - k;
      if (idx >= 0 && idx < NW && vw[idx]) begin
        checks++;
        if (q[k*B +: B] !== prev[idx][k*B +: B]) begin
          failures++;
          if (failures < 10) $display("word %0d slice %0d: got %h expected %h", idx, k, q[k*B +: B], prev[idx][k*B +: B]);
        end
      end
    end
  end

  initial begin
    logic [W-1:0] last [NOCT];
    for (int o = 0; o < NOCT; o++) last[o] = '0;
    for (int n = 0; n < NW; n++) begin
      xw[n] = W'($urandom);
      vw[n] = ($urandom_range(2) != 0);
      if (n == 0) vw[n] = 1'b0;   // cycle 0 is spent in reset
      ow[n] = 2'($urandom_range(NOCT - 1));
      prev[n] = last[ow[n]];
      if (vw[n]) last[ow[n]] = xw[n];
    end
    rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (NW + 10) @(posedge clk);
    // reset clears the stored word
    #1 rst_n = 1'b0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (q !== '0) begin
      failures++;
      $display("reset did not clear the delay: %h", q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
