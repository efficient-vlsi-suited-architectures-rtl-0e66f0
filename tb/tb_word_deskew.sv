// tb_word_deskew: feeds bit-skewed words (bit j of word t in cycle t + j/B) into
// word_deskew and checks that every word leaves whole in cycle t + NS - 1, for B = 4,
// B = 1 and B = 5 (a last slice narrower than B).
module tb_word_deskew;
  localparam int W  = 16;
  localparam int NW = 200;
  localparam int CB [3] = '{4, 1, 5};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  logic [W-1:0] xw [NW];

  for (genvar i = 0; i < 3; i++) begin : g_cfg
    localparam int B  = CB[i];
    localparam int NS = (W + B - 1) / B;
    logic [W-1:0] d, q;
    always_comb begin
      for (int j = 0; j < W; j++) begin
        int idx;
        idx  = cyc - j / B;
        d[j] = (idx >= 0 && idx < NW) ? xw[idx][j] : 1'b0;
      end
    end
    word_deskew #(.W(W), .B(B)) dut (.clk, .d, .q);
    always @(negedge clk) begin
      int n;
      n = cyc - (NS - 1);
      if (n >= 0 && n < NW) begin
        checks++;
        if (q !== xw[n]) begin
          failures++;
          if (failures < 10) $display("B=%0d word %0d: got %h expected %h", B, n, q, xw[n]);
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < NW; n++) xw[n] = W'($urandom);
    repeat (NW + 30) @(posedge clk);
    if (checks != 3 * NW) failures++;
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
