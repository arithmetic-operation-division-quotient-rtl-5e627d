// tb_nk_adder: exhaustive check of N = sy - sx + 1 and K = (W-1) - N,
// K clamped to 0 .. W-1, at W = 8, and of N = W-1, K = 0 in fractional
// mode. Includes Example 2 (sx=0, sy=4: N=5, K=2).
module tb_nk_adder;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;

  logic [2:0] sx, sy, k;
  logic signed [4:0] n_dig;
  logic n_pos;
  logic frac = 1'b0;

  nk_adder #(.W(W)) dut (.frac(frac), .sx(sx), .sy(sy), .n_dig(n_dig), .k(k), .n_pos(n_pos));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < W; a++) begin
      for (int b = 0; b < W; b++) begin
        int ne, ke;
        sx = 3'(a);
        sy = 3'(b);
        #1;
        ne = b - a + 1;
        ke = (W - 1) - ne;
        if (ke < 0) ke = 0;
        if (ke > W - 1) ke = W - 1;
        checks++;
        if (int'(n_dig) != ne || int'(k) != ke || n_pos != (ne >= 1)) begin
          failures++;
          $display("FAIL sx=%0d sy=%0d: N=%0d K=%0d pos=%b", a, b, n_dig, k, n_pos);
        end
      end
    end
    frac = 1'b1;
    for (int a = 0; a < W; a++) begin
      sx = 3'(a);
      sy = 3'((a * 5) % W);
      #1;
      checks++;
      if (int'(n_dig) != W - 1 || k != 0 || !n_pos) begin
        failures++;
        $display("FAIL fractional mode: N=%0d K=%0d", n_dig, k);
      end
    end
    frac = 1'b0;
    sx = 0; sy = 4;
    #1;
    checks++;
    if (n_dig != 5 || k != 2) begin
      failures++;
      $display("FAIL example 2: N=%0d K=%0d", n_dig, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
