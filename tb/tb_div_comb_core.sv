// tb_div_comb_core: exhaustive check of the combinational divider.
//
// For W = 8 every operand pair is applied (except Y = 0, the overflow
// -128/-1 and the excluded -128 / +-2^j), and the quotient and remainder are
// compared with truncating integer division (x / y, x % y). A second
// instance at W = 6 reruns the two worked examples 31/5 = 6 rem 1 and
// -97/-7 = 13 rem -6, and is also checked exhaustively. Finally fractional
// mode at W = 8: every pair of normalized mantissas against
// trunc(x * 64 / y) and the remainder x * 64 - q * y.
module tb_div_comb_core;

  import div_tb_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x8, y8, z8, r8;
  logic [5:0] x6, y6, z6, r6;
  logic frac8 = 1'b0;

  div_comb_core #(.W(8)) dut8 (.frac(frac8), .x(x8), .y(y8), .z(z8), .r(r8));
  div_comb_core #(.W(6)) dut6 (.frac(1'b0), .x(x6), .y(y6), .z(z6), .r(r6));

  task automatic check8(int xi, int yi);
    int qe, re;
    x8 = 8'(xi);
    y8 = 8'(yi);
    #1;
    qe = xi / yi;
    re = xi % yi;
    checks++;
    if (int'($signed(z8)) != qe || int'($signed(r8)) != re) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=8 %0d / %0d: got q=%0d r=%0d, want q=%0d r=%0d",
                 xi, yi, $signed(z8), $signed(r8), qe, re);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked examples
    x6 = 6'd31; y6 = 6'd5; x8 = 8'(-97); y8 = 8'(-7);
    #1;
    checks += 2;
    if (int'($signed(z6)) != 6 || int'($signed(r6)) != 1) begin
      failures++; $display("FAIL example 1: q=%0d r=%0d", $signed(z6), $signed(r6));
    end
    if (int'($signed(z8)) != 13 || int'($signed(r8)) != -6) begin
      failures++; $display("FAIL example 2: q=%0d r=%0d", $signed(z8), $signed(r8));
    end

    for (int xi = -128; xi < 128; xi++) begin
      for (int yi = -128; yi < 128; yi++) begin
        if (yi == 0) continue;
        if (!in_scope(xi, yi, 8)) continue;
        check8(xi, yi);
      end
    end

    for (int xi = -32; xi < 32; xi++) begin
      for (int yi = -32; yi < 32; yi++) begin
        if (yi == 0) continue;
        if (!in_scope(xi, yi, 6)) continue;
        x6 = 6'(xi); y6 = 6'(yi);
        #1;
        checks++;
        if (int'($signed(z6)) != xi / yi || int'($signed(r6)) != xi % yi) begin
          failures++;
          if (failures < 10) $display("FAIL W=6 %0d / %0d: q=%0d r=%0d", xi, yi, $signed(z6), $signed(r6));
        end
      end
    end

    frac8 = 1'b1;
    for (int xi = -128; xi < 128; xi++) begin
      for (int yi = -128; yi < 128; yi++) begin
        if (!is_norm(xi, 8) || !is_norm(yi, 8)) continue;
        x8 = 8'(xi);
        y8 = 8'(yi);
        #1;
        checks++;
        if (int'($signed(z8)) != frac_q(xi, yi, 8) || int'($signed(r8)) != frac_r(xi, yi, 8)) begin
          failures++;
          if (failures < 10)
            $display("FAIL fractional %0d / %0d: q=%0d r=%0d, want %0d %0d", xi, yi,
                     $signed(z8), $signed(r8), frac_q(xi, yi, 8), frac_r(xi, yi, 8));
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
