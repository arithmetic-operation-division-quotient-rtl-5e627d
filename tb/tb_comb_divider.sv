// tb_comb_divider: the single-cycle divider with its four registers, W = 8.
//
// Random operand pairs are offered with in_valid high on random cycles.
// Every result must come out with out_valid after exactly two rising edges
// from when its operands were presented (one loads RGX/RGY, one RGZ/RGR),
// in order, and
// equal truncating integer division, or, for the quarter of the operations
// issued in fractional mode, the mantissa quotient trunc(x*64/y) and its
// remainder. A result with nothing outstanding is a failure.
module tb_comb_divider;

  import div_tb_pkg::*;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic frac = 1'b0;
  logic [W-1:0] x = '0, y = '0;
  logic out_valid;
  logic [W-1:0] z, r;

  typedef struct { int x; int y; int t; bit f; } op_t;
  op_t pending[$];

  comb_divider #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .frac(frac), .x(x), .y(y),
    .out_valid(out_valid), .z(z), .r(r)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker, sampled away from the active edge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL result with nothing outstanding");
      end else begin
        op_t o;
        o = pending.pop_front();
        if (cyc - o.t != 2 ||
            int'($signed(z)) != (o.f ? frac_q(o.x, o.y, W) : o.x / o.y) ||
            int'($signed(r)) != (o.f ? frac_r(o.x, o.y, W) : o.x % o.y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d / %0d: q=%0d r=%0d after %0d edges", o.x, o.y, $signed(z), $signed(r), cyc - o.t);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        int xi, yi;
        frac = ($urandom_range(0, 3) == 0);
        if (frac) begin
          xi = rand_norm(W);
          yi = rand_norm(W);
        end else begin
          do begin
            xi = rand_operand(W);
            yi = rand_operand(W);
          end while (!in_scope(xi, yi, W));
        end
        x = W'(xi);
        y = W'(yi);
        pending.push_back('{xi, yi, cyc, frac});
      end else begin
        x = W'($urandom);
        y = W'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d results never came out", pending.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
