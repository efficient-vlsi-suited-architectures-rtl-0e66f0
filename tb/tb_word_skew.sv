// tb_word_skew: checks that word_skew delays slice k (bits k*B .. k*B+B-1) of every word
// by exactly k cycles, for B = 4 and for the systolic B = 1, with random words presented
// one per cycle.
module tb_word_skew;
  localparam int W  = 16;
  localparam int NW = 200;
  localparam int CB [2] = '{4, 1};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  logic [W-1:0] xw [NW];
  logic [W-1:0] d;
  always_comb d = (cyc < NW) ? xw[cyc] : '0;

  for (genvar i = 0; i < 2; i++) begin : g_cfg
    localparam int B = CB[i];
    logic [W-1:0] q;
    word_skew #(.W(W), .B(B)) dut (.clk, .d, .q);
    always @(negedge clk) begin
      for (int j = 0; j < W; j++) begin
        int idx;
        idx = cyc - j / B;
        if (idx >= 0 && idx < NW) begin
          checks++;
          if (q[j] !== xw[idx][j]) begin
            failures++;
            if (failures < 10) $display("B=%0d cycle %0d bit %0d wrong", B, cyc, j);
          end
        end
      end
    end
  end

  initial begin
    for (int n = 0; n < NW; n++) xw[n] = W'($urandom);
    repeat (NW + 20) @(posedge clk);
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
