// tb_cordic_scale: self-checking test of the shift-and-add scaling multiplier.
// Four instances (default three digits 2^-1 + 2^-3 + 2^-5 with B = 4; digits
// 2^-1 - 2^-3 - 2^-6 with B = 2; two digits 2^-1 + 2^-3 with B = 4; four digits
// 2^-1 + 2^-3 + 2^-5 + 2^-7 with B = 3) get random skewed words; each result is taken
// at the latency max(ceil(S0/B), ceil(S1/B)) + 1 [+ ceil(S2/B) + 1 [+ ceil(S3/B) + 1]]
// and compared with ((x >>> S0) +- (x >>> S1)) +- (x >>> S2) +- (x >>> S3) on whole
// words, digit by digit. The gain of the default constant is then compared with
// K = 1/sqrt(2) * 16/17 (within 1.5 %) on a large input.
module tb_cordic_scale;
  localparam int W  = 16;
  localparam int NC = 4;
  localparam int NW = 300;
  localparam int CB  [NC] = '{4, 2, 4, 3};
  localparam int CND [NC] = '{3, 3, 2, 4};
  localparam int CS0 [NC] = '{1, 1, 1, 1};
  localparam int CS1 [NC] = '{3, 3, 3, 3};
  localparam int CS2 [NC] = '{5, 6, 5, 5};
  localparam int CS3 [NC] = '{7, 7, 7, 7};
  localparam bit CN1 [NC] = '{1'b0, 1'b1, 1'b0, 1'b0};
  localparam bit CN2 [NC] = '{1'b0, 1'b1, 1'b0, 1'b0};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  logic [W-1:0] xw [NW];
  logic [W-1:0] y0w [NW];   // results of instance 0, for the gain check

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    localparam int B   = CB[i];
    localparam int NS  = (W + B - 1) / B;
    localparam int D0  = (CS0[i] + B - 1) / B;
    localparam int D1  = (CS1[i] + B - 1) / B;
    localparam int LAT = ((D0 > D1) ? D0 : D1) + 1
                         + ((CND[i] >= 3) ? (CS2[i] + B - 1) / B + 1 : 0)
                         + ((CND[i] >= 4) ? (CS3[i] + B - 1) / B + 1 : 0);
    logic [W-1:0] x, y;
    logic [W-1:0] yw [NW];

    always_comb begin
      for (int j = 0; j < W; j++) begin
        int idx;
        idx  = cyc - j / B;
        x[j] = (idx >= 0 && idx < NW) ? xw[idx][j] : 1'b0;
      end
    end

    cordic_scale #(.W(W), .B(B), .NDIG(CND[i]), .S0(CS0[i]), .S1(CS1[i]), .S2(CS2[i]), .S3(CS3[i]),
                   .NEG1(CN1[i]), .NEG2(CN2[i])) dut (.clk, .x, .y);

    always @(negedge clk) begin
      int n;
      logic signed [W-1:0] t, r;
      for (int j = 0; j < W; j++) begin
        int idx;
        idx = cyc - LAT - j / B;
        if (idx >= 0 && idx < NW) yw[idx][j] = y[j];
      end
      n = cyc - LAT - (NS - 1);
      if (n >= 0 && n < NW) begin
        t = CN1[i] ? ($signed(xw[n]) >>> CS0[i]) - ($signed(xw[n]) >>> CS1[i])
                   : ($signed(xw[n]) >>> CS0[i]) + ($signed(xw[n]) >>> CS1[i]);
        r = t;
        if (CND[i] >= 3) r = CN2[i] ? r - ($signed(xw[n]) >>> CS2[i]) : r + ($signed(xw[n]) >>> CS2[i]);
        if (CND[i] >= 4) r = r + ($signed(xw[n]) >>> CS3[i]);
        checks++;
        if (yw[n] !== r) begin
          failures++;
          if (failures < 10) $display("cfg %0d word %0d: x=%h got %h expected %h", i, n, xw[n], yw[n], r);
        end
        if (i == 0) y0w[n] = yw[n];
      end
    end
  end

  initial begin
    real k_exact, k_got;
    xw[0] = 16'h8000; xw[1] = 16'h7fff; xw[2] = 16'hffff; xw[3] = 16'h4000;
    for (int n = 4; n < NW; n++) xw[n] = W'($urandom);
    repeat (NW + 40) @(posedge clk);
    // gain of the default constant against the exact lattice scaling factor
    k_exact = (1.0 / $sqrt(2.0)) * (16.0 / 17.0);
    k_got   = real'($signed(y0w[3])) / 16384.0;
    checks++;
    if (k_got < 0.985 * k_exact || k_got > 1.015 * k_exact) begin
      failures++;
      $display("K = %f, exact %f", k_got, k_exact);
    end
    if (checks != NC * NW + 1) begin
      failures++;
      $display("expected %0d checks, made %0d", NC * NW + 1, checks);
    end
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
