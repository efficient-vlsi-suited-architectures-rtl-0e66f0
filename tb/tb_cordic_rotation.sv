// tb_cordic_rotation: self-checking test of the CORDIC micro-rotation.
// Three instances (the 45-degree step s = 0, sigma = -1; s = 2, sigma = +1 with B = 4;
// s = 2, sigma = -1 in the systolic case B = 1) receive random (u, l) pairs in the
// bit-skewed format. Outputs are collected at the latency ceil(s/B) + 1 and compared with
//   u' = u - sigma * (l >>> s),  l' = l + sigma * (u >>> s)
// computed on whole words here.
module tb_cordic_rotation;
  localparam int W  = 16;
  localparam int NC = 3;
  localparam int NW = 300;
  localparam int CB [NC] = '{4, 4, 1};
  localparam int CS [NC] = '{0, 2, 2};
  localparam int CSG[NC] = '{-1, 1, -1};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  logic [W-1:0] uw [NW];
  logic [W-1:0] lw [NW];

  for (genvar i = 0; i < NC; i++) begin : g_cfg
    localparam int B   = CB[i];
    localparam int NS  = (W + B - 1) / B;
    localparam int LAT = (CS[i] + B - 1) / B + 1;
    logic [W-1:0] u, l, uo, lo;
    logic [W-1:0] uow [NW];
    logic [W-1:0] low [NW];

    always_comb begin
      for (int j = 0; j < W; j++) begin
        int idx;
        idx  = cyc - j / B;
        u[j] = (idx >= 0 && idx < NW) ? uw[idx][j] : 1'b0;
        l[j] = (idx >= 0 && idx < NW) ? lw[idx][j] : 1'b0;
      end
    end

    cordic_rotation #(.W(W), .B(B), .S(CS[i]), .SIGMA(CSG[i])) dut (
      .clk, .u_in(u), .l_in(l), .u_out(uo), .l_out(lo)
    );

    always @(negedge clk) begin
      int n;
      logic signed [W-1:0] ru, rl;
      for (int j = 0; j < W; j++) begin
        int idx;
        idx = cyc - LAT - j / B;
        if (idx >= 0 && idx < NW) begin
          uow[idx][j] = uo[j];
          low[idx][j] = lo[j];
        end
      end
      n = cyc - LAT - (NS - 1);
      if (n >= 0 && n < NW) begin
        if (CSG[i] > 0) begin
          ru = $signed(uw[n]) - ($signed(lw[n]) >>> CS[i]);
          rl = $signed(lw[n]) + ($signed(uw[n]) >>> CS[i]);
        end else begin
          ru = $signed(uw[n]) + ($signed(lw[n]) >>> CS[i]);
          rl = $signed(lw[n]) - ($signed(uw[n]) >>> CS[i]);
        end
        checks += 2;
        if (uow[n] !== ru || low[n] !== rl) begin
          failures++;
          if (failures < 10)
            $display("cfg %0d pair %0d: in %h %h got %h %h expected %h %h",
                     i, n, uw[n], lw[n], uow[n], low[n], ru, rl);
        end
      end
    end
  end

  initial begin
    uw[0] = 16'h8000; lw[0] = 16'h7fff;
    uw[1] = 16'h0100; lw[1] = 16'h0000;
    uw[2] = 16'hfff0; lw[2] = 16'h0010;
    for (int n = 3; n < NW; n++) begin
      uw[n] = W'($urandom) >>> 2;   // keep most pairs away from wrap-around
      lw[n] = W'($urandom);
    end
    repeat (NW + 40) @(posedge clk);
    if (checks != 2 * NC * NW) begin
      failures++;
      $display("expected %0d checks, made %0d", 2 * NC * NW, checks);
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
