// tb_shift_array: exhaustive check of the arithmetic right shift array at
// W = 8: every word and every shift amount against floor(a / 2^sh) of the
// signed value.
module tb_shift_array;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] a, y;
  logic [2:0] sh;

  shift_array #(.W(W)) dut (.a(a), .sh(sh), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ai = -128; ai < 128; ai++) begin
      for (int s = 0; s < W; s++) begin
        int p, e;
        a = W'(ai);
        sh = 3'(s);
        #1;
        p = 1 << s;
        e = (ai >= 0) ? ai / p : -((-ai + p - 1) / p);
        checks++;
        if (int'($signed(y)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL %0d >>> %0d = %0d, want %0d", ai, s, $signed(y), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
