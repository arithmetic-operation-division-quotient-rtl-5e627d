// tb_pipe_divider: the micro-pipelined divider at W = 8 (12 stages).
//
// Phase 1, no stalls: a burst of operations with out_ready high must come
// out one per cycle, each NS = W+4 rising edges after it was presented.
// Phase 2: random in_valid and random out_ready (stalls); results must
// still come out in order, none lost, all equal to truncating integer
// division (or, for operations issued in fractional mode, to the mantissa
// quotient trunc(x*64/y) and its remainder), and in_ready must fall when
// the full pipeline is stalled.
module tb_pipe_divider;

  import div_tb_pkg::*;

  localparam int W  = 8;
  localparam int NS = W + 4;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int stalls = 0;
  int full_stalls = 0;
  int lat_checks = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic frac = 1'b0;
  logic [W-1:0] x = '0, y = '0;
  logic out_valid;
  logic out_ready = 1'b1;
  logic [W-1:0] z, r;
  bit   check_latency = 1'b1;

  typedef struct { int x; int y; int t; bit f; } op_t;
  op_t pending[$];

  pipe_divider #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .frac(frac),
    .x(x), .y(y), .out_valid(out_valid), .out_ready(out_ready), .z(z), .r(r)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transfers happen at the rising edge; sample just before it
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) pending.push_back('{int'($signed(x)), int'($signed(y)), cyc, frac});
      if (out_valid && !out_ready) stalls++;
      if (in_valid && !in_ready) full_stalls++;
      if (out_valid && out_ready) begin
        op_t o;
        checks++;
        if (pending.size() == 0) begin
          failures++;
          $display("FAIL result with nothing outstanding");
        end else begin
          o = pending.pop_front();
          if (int'($signed(z)) != (o.f ? frac_q(o.x, o.y, W) : o.x / o.y) ||
              int'($signed(r)) != (o.f ? frac_r(o.x, o.y, W) : o.x % o.y)) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d / %0d: q=%0d r=%0d", o.x, o.y, $signed(z), $signed(r));
          end
          if (check_latency) begin
            lat_checks++;
            if (cyc - o.t != NS) begin
              failures++;
              $display("FAIL latency %0d, want %0d", cyc - o.t, NS);
            end
          end
        end
      end
    end
  end

  task automatic drive_random();
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
  endtask

  initial begin
    int outs;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: back-to-back, no stalls
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      drive_random();
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (NS + 2) @(negedge clk);
    checks++;
    if (lat_checks != 200 || pending.size() != 0) begin
      failures++;
      $display("FAIL phase 1: %0d results checked, %0d outstanding", lat_checks, pending.size());
    end
    // phase 2: random traffic with stalls
    check_latency = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 3) != 0);
        drive_random();
      end
      out_ready = (i % 500 < 60) ? 1'b0 : ($urandom_range(0, 3) != 0);
    end
    @(negedge clk);
    out_ready = 1'b1;
    while (in_valid && !in_ready) @(negedge clk);
    in_valid = 1'b0;
    repeat (NS + 2) @(negedge clk);
    checks++;
    if (pending.size() != 0 || stalls == 0 || full_stalls == 0) begin
      failures++;
      $display("FAIL phase 2: outstanding %0d stalls %0d full %0d", pending.size(), stalls, full_stalls);
    end
    $display("stalls=%0d input_blocked=%0d", stalls, full_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
