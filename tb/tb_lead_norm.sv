// tb_lead_norm: exhaustive check of the left normalization at W = 8.
//
// The expected shift is the smallest s for which |v| * 2^s reaches 2^(W-2)
// (W-1 for zero), computed with integer arithmetic; the normalized word
// must equal v * 2^s. Also checks Example 2's divisor: -7 -> 1 0010000.
module tb_lead_norm;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] v, wn;
  logic [$clog2(W)-1:0] s;

  lead_norm #(.W(W)) dut (.v(v), .wn(wn), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int vi = -(1 << (W - 1)); vi < (1 << (W - 1)); vi++) begin
      int mag, se;
      logic [W-1:0] we;
      v = W'(vi);
      #1;
      mag = (vi < 0) ? -vi : vi;
      se = W - 1;
      if (mag != 0) begin
        se = 0;
        while ((mag << se) < (1 << (W - 2))) se++;
      end
      we = W'(vi * (1 << se));
      checks++;
      if (int'(s) != se || wn !== we) begin
        failures++;
        $display("FAIL v=%0d: s=%0d wn=%b, want s=%0d wn=%b", vi, s, wn, se, we);
      end
    end
    v = 8'b1111_1001;
    #1;
    checks++;
    if (wn !== 8'b1001_0000 || s != 4) begin
      failures++;
      $display("FAIL -7: wn=%b s=%0d", wn, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
