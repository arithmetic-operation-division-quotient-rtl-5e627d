// tb_quot_correction: exhaustive check of the quotient correction at W = 6.
//
// Every combination of operand signs, zero flags (5 levels) and N from -4 to
// 5. Expected: EQ = some zero flag at a level m <= N; COR follows the
// correction table: no correction for X>=0,Y>=0; +1 for X>=0,Y<0; +1 for
// X<0,Y>=0 when inexact; +1 for X<0,Y<0 when exact.
module tb_quot_correction;

  localparam int W = 6;
  localparam int L = W - 1;

  int checks = 0;
  int failures = 0;

  logic xs, ys;
  logic [L-1:0] zero_lv;
  logic signed [4:0] n_dig;
  logic eq, cor1, cor2, cor3, cor;

  quot_correction #(.W(W)) dut (
    .xs(xs), .ys(ys), .zero_lv(zero_lv), .n_dig(n_dig),
    .eq(eq), .cor1(cor1), .cor2(cor2), .cor3(cor3), .cor(cor)
  );

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sg = 0; sg < 4; sg++) begin
      for (int zl = 0; zl < (1 << L); zl++) begin
        for (int nn = -4; nn <= L; nn++) begin
          bit exact, ce;
          xs = sg[1];
          ys = sg[0];
          zero_lv = L'(zl);
          n_dig = 5'(nn);
          #1;
          exact = 0;
          for (int m = 1; m <= nn; m++) if (zl[m-1]) exact = 1;
          case ({xs, ys})
            2'b00: ce = 0;
            2'b01: ce = 1;
            2'b10: ce = !exact;
            default: ce = exact;
          endcase
          checks++;
          if (eq !== exact || cor !== ce || (cor1 | cor2 | cor3) !== ce ||
              cor1 !== ({xs, ys} == 2'b01)) begin
            failures++;
            if (failures < 10)
              $display("FAIL signs=%b%b zero=%b N=%0d: eq=%b cor=%b", xs, ys, zero_lv, nn, eq, cor);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
