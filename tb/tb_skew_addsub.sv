// tb_skew_addsub: self-checking test of the carry-cut shift-and-add adder.
// Four instances with different carry-path lengths (B = 4, systolic B = 1, B = 3 that
// does not divide the word, unpipelined B = 16), shifts and add/subtract are fed random
// and corner-case words in the bit-skewed format (bit j of word t in cycle t + j/B).
// Each output bit is collected in the cycle the latency formula ceil(s/B) + 1 predicts,
// and each finished word is compared with (a >>> SA) +- (b >>> SB) computed here on
// whole words.
module tb_skew_addsub;
  localparam int W  = 16;
  localparam int NC = 4;
  localparam int NW = 300;
  localparam int CB  [NC] = '{4, 1, 3, 16};
  localparam int CSA [NC] = '{0, 1, 0, 2};
  localparam int CSB [NC] = '{2, 5, 7, 0};
  localparam bit CSUB[NC] = '{1'b0, 1'b1, 1'b1, 1'b1};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  logic [W-1:0] aw [NW];
  logic [W-1:0] bw [NW];

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    localparam int B   = CB[i];
    localparam int NS  = (W + B - 1) / B;
    localparam int DA  = (CSA[i] + B - 1) / B;
    localparam int DB  = (CSB[i] + B - 1) / B;
    localparam int LAT = ((DA > DB) ? DA : DB) + 1;
    logic [W-1:0] a, b, y;
    logic [W-1:0] yw [NW];

    always_comb begin
      for (int j = 0; j < W; j++) begin
        int idx;
        idx  = cyc - j / B;
        a[j] = (idx >= 0 && idx < NW) ? aw[idx][j] : 1'b0;
        b[j] = (idx >= 0 && idx < NW) ? bw[idx][j] : 1'b0;
      end
    end

    skew_addsub #(.W(W), .B(B), .SA(CSA[i]), .SB(CSB[i]), .SUB(CSUB[i])) dut (
      .clk, .a, .b, .y
    );

    always @(negedge clk) begin
      int n;
      logic signed [W-1:0] ref_v;
      for (int j = 0; j < W; j++) begin
        int idx;
        idx = cyc - LAT - j / B;
        if (idx >= 0 && idx < NW) yw[idx][j] = y[j];
      end
      n = cyc - LAT - (NS - 1);
      if (n >= 0 && n < NW) begin
        if (CSUB[i]) ref_v = ($signed(aw[n]) >>> CSA[i]) - ($signed(bw[n]) >>> CSB[i]);
        else         ref_v = ($signed(aw[n]) >>> CSA[i]) + ($signed(bw[n]) >>> CSB[i]);
        checks++;
        if (yw[n] !== ref_v) begin
          failures++;
          if (failures < 10)
            $display("cfg %0d word %0d: a=%h b=%h got %h expected %h", i, n, aw[n], bw[n], yw[n], ref_v);
        end
      end
    end
  end

  initial begin
    aw[0] = 16'h8000; bw[0] = 16'h8000;
    aw[1] = 16'h7fff; bw[1] = 16'h7fff;
    aw[2] = 16'hffff; bw[2] = 16'h0001;
    aw[3] = 16'h0000; bw[3] = 16'hffff;
    for (int n = 4; n < NW; n++) begin
      aw[n] = W'($urandom);
      bw[n] = W'($urandom);
    end
    repeat (NW + 40) @(posedge clk);
    if (checks != NC * NW) begin
      failures++;
      $display("expected %0d checks, made %0d", NC * NW, checks);
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
