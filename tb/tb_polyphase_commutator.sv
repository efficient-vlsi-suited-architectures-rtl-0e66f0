// tb_polyphase_commutator: sends a random sample stream with random gaps in in_valid,
// and a reset in the middle of a pair, and checks that every pair_valid pulse comes the
// cycle after an odd sample, carrying (x(2m), x(2m+1)) in order, and that the reset
// restarts the phase.
module tb_polyphase_commutator;
  localparam int W = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, in_valid, pair_valid;
  logic [W-1:0] x_in, even_out, odd_out;
  int checks = 0, failures = 0;

  polyphase_commutator #(.W(W)) dut (.clk, .rst_n, .in_valid, .x_in, .pair_valid, .even_out, .odd_out);

  // reference: queue of accepted samples since the last reset
  logic [W-1:0] q_samp [$];
  logic         expect_pair;
  int           pairs = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      q_samp.delete();
      expect_pair <= 1'b0;
    end else begin
      expect_pair <= 1'b0;
      if (in_valid) begin
        q_samp.push_back(x_in);
        if (q_samp.size() == 2) expect_pair <= 1'b1;
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (pair_valid !== expect_pair) begin
        failures++;
        $display("t=%0t pair_valid=%b expected %b", $time, pair_valid, expect_pair);
      end
      if (expect_pair) begin
        checks++;
        pairs++;
        if (even_out !== q_samp[0] || odd_out !== q_samp[1]) begin
          failures++;
          $display("pair got %h %h expected %h %h", even_out, odd_out, q_samp[0], q_samp[1]);
        end
        q_samp.delete(0);
        q_samp.delete(0);
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom_range(3) != 0);
      x_in     = W'($urandom);
      if (n == 201) begin        // reset in the middle of a pair
        in_valid = 1'b1;
        @(posedge clk);
        #1 rst_n = 1'b0; in_valid = 1'b0;
        @(posedge clk);
        #1 rst_n = 1'b1;
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (3) @(posedge clk);
    if (pairs < 100) begin
      failures++;
      $display("only %0d pairs seen", pairs);
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
