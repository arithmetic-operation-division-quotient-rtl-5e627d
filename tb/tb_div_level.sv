// tb_div_level: random and exhaustive-corner check of one array level.
//
// Two instances (first level and inner level) at W = 8. Expected values come
// from integer arithmetic: lhs = r_prev (first) or 2*r_prev mod 2^W, r = lhs
// - wy or lhs + wy mod 2^W, z = 1 when r and wy have the same sign, zero when
// r = 0. Also replays the first steps of Example 2.
module tb_div_level;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, wy, r0, r1;
  logic sub, z0, z1, zero0, zero1;

  div_level #(.W(W), .FIRST(1'b1)) dut_first (.r_prev(a), .wy(wy), .sub(sub), .r(r0), .z(z0), .zero(zero0));
  div_level #(.W(W), .FIRST(1'b0)) dut_inner (.r_prev(a), .wy(wy), .sub(sub), .r(r1), .z(z1), .zero(zero1));

  task automatic check();
    int lhs0, lhs1;
    logic [W-1:0] e0, e1;
    #1;
    lhs0 = int'(a);
    lhs1 = (int'(a) * 2) % (1 << W);
    e0 = sub ? W'(lhs0 - int'(wy)) : W'(lhs0 + int'(wy));
    e1 = sub ? W'(lhs1 - int'(wy)) : W'(lhs1 + int'(wy));
    checks++;
    if (r0 !== e0 || z0 !== (e0[W-1] == wy[W-1]) || zero0 !== (e0 == 0) ||
        r1 !== e1 || z1 !== (e1[W-1] == wy[W-1]) || zero1 !== (e1 == 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%b wy=%b sub=%b: r0=%b r1=%b z=%b%b", a, wy, sub, r0, r1, z0, z1);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a = W'($urandom);
      wy = W'($urandom);
      sub = 1'($urandom);
      check();
    end
    // Example 2, level 1: 1 0011111 - 1 0010000 = 0 0001111, digit 0
    a = 8'b1001_1111; wy = 8'b1001_0000; sub = 1'b1;
    #1;
    checks++;
    if (r0 !== 8'b0000_1111 || z0 !== 1'b0) begin
      failures++; $display("FAIL example 2 level 1: r=%b z=%b", r0, z0);
    end
    // level 2: 2*0 0001111 + 1 0010000 = 1 0101110, digit 1
    a = 8'b0000_1111; sub = 1'b0;
    #1;
    checks++;
    if (r1 !== 8'b1010_1110 || z1 !== 1'b1) begin
      failures++; $display("FAIL example 2 level 2: r=%b z=%b", r1, z1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
