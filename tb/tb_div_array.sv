// tb_div_array: check of the W-1 level divider array at W = 8.
//
// Reference: the closed form of non-restoring division, evaluated with
// integers: R_1 = Wx - s_1*Wy, R_m = 2*R_(m-1) - s_m*Wy (mod 2^W), with
// s = +1 for a subtraction and -1 for an addition, s_1 = +1 when Wx and Wy
// have the same sign, s_(m+1) = +1 when digit z_m = 1, and z_m = 1 when R_m
// and Wy have the same sign. Random normalized operands, plus the partial
// remainders and digits of Example 2 (-97 / -7).
module tb_div_array;

  localparam int W = 8;
  localparam int L = W - 1;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] wx, wy;
  logic [L-1:0] z, zero_lv;
  logic [W-1:0] r_lv [1:L];

  div_array #(.W(W)) dut (.wx(wx), .wy(wy), .z(z), .r_lv(r_lv), .zero_lv(zero_lv));

  task automatic check();
    int rp, s;
    logic [W-1:0] re;
    logic ze;
    #1;
    rp = int'(wx);
    s  = (wx[W-1] == wy[W-1]) ? 1 : -1;
    for (int m = 1; m <= L; m++) begin
      int lhs = (m == 1) ? rp : rp * 2;
      re = W'(lhs - s * int'(wy));
      ze = (re[W-1] == wy[W-1]);
      checks++;
      if (r_lv[m] !== re || z[L-m] !== ze || zero_lv[m-1] !== (re == 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL wx=%b wy=%b level %0d: r=%b z=%b want %b %b", wx, wy, m, r_lv[m], z[L-m], re, ze);
      end
      rp = int'(re);
      s  = ze ? 1 : -1;
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      // normalized operands: sign bit, then the complement of it
      wx = W'($urandom);
      wy = W'($urandom);
      wx[W-2] = ~wx[W-1];
      wy[W-2] = ~wy[W-1];
      check();
    end
    wx = 8'b1001_1111;
    wy = 8'b1001_0000;
    #1;
    checks++;
    if (r_lv[1] !== 8'b0000_1111 || r_lv[2] !== 8'b1010_1110 || r_lv[3] !== 8'b1100_1100 ||
        r_lv[4] !== 8'b0000_1000 || r_lv[5] !== 8'b1010_0000 || z[6:2] !== 5'b01101) begin
      failures++;
      $display("FAIL example 2: z=%b R5=%b", z, r_lv[5]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
