// tb_rem_restore: check of the remainder restoration at W = 8.
//
// Exhaustive over R_N and z0 for a set of divisors: when z0 = 1 the output is
// R_N; otherwise R_N - Wy if R_N and Wy have the same sign, R_N + Wy if not
// (mod 2^W). Also Example 1 at W = 6: R_3 = 1 10000, Wy = 0 10100, even
// quotient: restored 0 00100.
module tb_rem_restore;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] r_last, wy, r_fix;
  logic z0;
  logic [5:0] r6, wy6, f6;

  rem_restore #(.W(W)) dut (.r_last(r_last), .wy(wy), .z0(z0), .r_fix(r_fix));
  rem_restore #(.W(6)) dut6 (.r_last(r6), .wy(wy6), .z0(1'b0), .r_fix(f6));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 24; d++) begin
      wy = W'($urandom);
      wy[W-2] = ~wy[W-1];
      for (int ri = 0; ri < (1 << W); ri++) begin
        for (int c = 0; c < 2; c++) begin
          logic [W-1:0] e;
          r_last = W'(ri);
          z0 = 1'(c);
          #1;
          if (c == 1) e = r_last;
          else if (r_last[W-1] == wy[W-1]) e = W'(ri - int'(wy));
          else e = W'(ri + int'(wy));
          checks++;
          if (r_fix !== e) begin
            failures++;
            if (failures < 10) $display("FAIL r=%b wy=%b z0=%b: %b want %b", r_last, wy, z0, r_fix, e);
          end
        end
      end
    end
    r6 = 6'b110000;
    wy6 = 6'b010100;
    #1;
    checks++;
    if (f6 !== 6'b000100) begin
      failures++;
      $display("FAIL example 1: %b", f6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
