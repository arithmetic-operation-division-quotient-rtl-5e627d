// tb_half_adder_inc: exhaustive check of the half-adder chain at W = 8:
// s = (a + cin) mod 2^W for every a and cin.
module tb_half_adder_inc;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, s;
  logic cin;

  half_adder_inc #(.W(W)) dut (.a(a), .cin(cin), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ai = 0; ai < (1 << W); ai++) begin
      for (int c = 0; c < 2; c++) begin
        a = W'(ai);
        cin = 1'(c);
        #1;
        checks++;
        if (s !== W'(ai + c)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d = %0d", ai, c, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
