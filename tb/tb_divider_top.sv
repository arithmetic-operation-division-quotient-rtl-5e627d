// tb_divider_top: end-to-end test of the whole design at its default size
// (W = 8), both organizations at once.
//
// Every in-scope operand pair (65,265 of them) is fed in integer mode to
// the single-cycle divider, one per cycle, and to the micro-pipelined
// divider, whose output is stalled on a pseudo-random pattern; then both
// switch to fractional mode and divide every pair of normalized mantissas
// (16,384). Both result streams are compared with truncating integer
// division, or with trunc(x*64/y) and its remainder in fractional mode, and
// the single-cycle path's latency of two rising edges is checked. The testbench also counts how often each
// mechanism of the divider was exercised and fails if one never was:
//   correction by cor1, cor2, cor3; no correction; restoration of the
//   partial remainder (even quotient) and its absence (odd quotient); a zero
//   partial remainder before the last level (premature exact division);
//   N <= 0 (remainder = dividend); K = 0 (transparent shift array);
//   pipeline stall at the output and blocked pipeline input; a switch from
//   integer to fractional mode.
module tb_divider_top;

  import div_tb_pkg::*;

  localparam int W = 8;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic c_in_valid = 1'b0;
  logic c_frac = 1'b0;
  logic p_frac = 1'b0;
  logic [W-1:0] c_x = '0, c_y = '0;
  logic c_out_valid;
  logic [W-1:0] c_z, c_r;
  logic p_in_valid = 1'b0;
  logic p_in_ready;
  logic [W-1:0] p_x = '0, p_y = '0;
  logic p_out_valid;
  logic p_out_ready = 1'b1;
  logic [W-1:0] p_z, p_r;

  typedef struct { int x; int y; int t; bit f; } op_t;
  op_t c_pend[$];
  op_t p_pend[$];

  // mechanism counters
  int n_cor1 = 0, n_cor2 = 0, n_cor3 = 0, n_nocor = 0;
  int n_restore = 0, n_norestore = 0, n_premature = 0;
  int n_small = 0, n_k0 = 0, n_stall = 0, n_blocked = 0, n_frac = 0;
  int c_done = 0, p_done = 0, p_accepted = 0, c_total = 0;

  divider_top dut (
    .clk(clk), .rst_n(rst_n),
    .c_in_valid(c_in_valid), .c_frac(c_frac), .c_x(c_x), .c_y(c_y),
    .c_out_valid(c_out_valid), .c_z(c_z), .c_r(c_r),
    .p_in_valid(p_in_valid), .p_in_ready(p_in_ready), .p_frac(p_frac), .p_x(p_x), .p_y(p_y),
    .p_out_valid(p_out_valid), .p_out_ready(p_out_ready), .p_z(p_z), .p_r(p_r)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #3000000;
    failures++;
    $display("watchdog: comb %0d pipe %0d accepted %0d outstanding %0d", c_done, p_done, p_accepted, p_pend.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // classify an operation by what the divider must do for it
  task automatic classify(int xi, int yi);
    int q = xi / yi;
    int rm = xi % yi;
    int ax = (xi < 0) ? -xi : xi;
    int ay = (yi < 0) ? -yi : yi;
    if (xi >= 0 && yi < 0) n_cor1++;
    else if (xi < 0 && yi >= 0 && rm != 0) n_cor2++;
    else if (xi < 0 && yi < 0 && rm == 0) n_cor3++;
    else n_nocor++;
    if (ax < ay || ay == 0) n_small++;
    else if ((q & 1) == 0) n_restore++;
    else n_norestore++;
  endtask

  // internal view of the single-cycle core: zero partial remainder before
  // level N, and K = 0
  always @(negedge clk) begin
    if (rst_n) begin
      for (int m = 1; m < W - 1; m++) begin
        if (dut.u_comb.u_core.zero_lv[m-1] && (m < int'(dut.u_comb.u_core.n_dig)) && !dut.u_comb.u_core.frac) begin
          n_premature++;
          break;
        end
      end
      if (dut.u_comb.u_core.k == 0 && dut.u_comb.u_core.n_pos && !dut.u_comb.u_core.frac) n_k0++;
    end
  end

  // single-cycle path: check at the falling edge
  always @(negedge clk) begin
    if (rst_n && c_out_valid) begin
      op_t o;
      checks++;
      if (c_pend.size() == 0) begin
        failures++;
        $display("FAIL comb: result with nothing outstanding");
      end else begin
        o = c_pend.pop_front();
        c_done++;
        if (cyc - o.t != 2 ||
            int'($signed(c_z)) != (o.f ? frac_q(o.x, o.y, W) : o.x / o.y) ||
            int'($signed(c_r)) != (o.f ? frac_r(o.x, o.y, W) : o.x % o.y)) begin
          failures++;
          if (failures < 10)
            $display("FAIL comb %0d / %0d: q=%0d r=%0d latency %0d", o.x, o.y,
                     $signed(c_z), $signed(c_r), cyc - o.t);
        end
      end
    end
  end

  // pipelined path: transfers at the rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (p_in_valid && p_in_ready) begin
        p_pend.push_back('{int'($signed(p_x)), int'($signed(p_y)), cyc, p_frac});
        p_accepted++;
      end
      if (p_in_valid && !p_in_ready) n_blocked++;
      if (p_out_valid && !p_out_ready) n_stall++;
      if (p_out_valid && p_out_ready) begin
        op_t o;
        checks++;
        if (p_pend.size() == 0) begin
          failures++;
          $display("FAIL pipe: result with nothing outstanding");
        end else begin
          o = p_pend.pop_front();
          p_done++;
          if (int'($signed(p_z)) != (o.f ? frac_q(o.x, o.y, W) : o.x / o.y) ||
              int'($signed(p_r)) != (o.f ? frac_r(o.x, o.y, W) : o.x % o.y)) begin
            failures++;
            if (failures < 10)
              $display("FAIL pipe %0d / %0d: q=%0d r=%0d", o.x, o.y, $signed(p_z), $signed(p_r));
          end
        end
      end
    end
  end

  // single-cycle stimulus: every in-scope pair, one per cycle
  initial begin
    repeat (3) @(negedge clk);
    for (int xi = -(1 << (W - 1)); xi < (1 << (W - 1)); xi++) begin
      for (int yi = -(1 << (W - 1)); yi < (1 << (W - 1)); yi++) begin
        if (!in_scope(xi, yi, W)) continue;
        c_in_valid = 1'b1;
        c_x = W'(xi);
        c_y = W'(yi);
        c_pend.push_back('{xi, yi, cyc, 1'b0});
        classify(xi, yi);
        @(negedge clk);
      end
    end
    c_frac = 1'b1;
    n_frac++;
    for (int xi = -(1 << (W - 1)); xi < (1 << (W - 1)); xi++) begin
      for (int yi = -(1 << (W - 1)); yi < (1 << (W - 1)); yi++) begin
        if (!is_norm(xi, W) || !is_norm(yi, W)) continue;
        c_x = W'(xi);
        c_y = W'(yi);
        c_pend.push_back('{xi, yi, cyc, 1'b1});
        @(negedge clk);
      end
    end
    c_in_valid = 1'b0;
    c_total = c_done + c_pend.size();
  end

  // hold the pipeline's operands until they have been accepted
  task automatic p_send();
    int acc0;
    acc0 = p_accepted;
    do @(negedge clk); while (p_accepted == acc0);
  endtask

  // pipelined stimulus: the same pairs, stalled output
  initial begin
    repeat (3) @(negedge clk);
    for (int xi = -(1 << (W - 1)); xi < (1 << (W - 1)); xi++) begin
      for (int yi = -(1 << (W - 1)); yi < (1 << (W - 1)); yi++) begin
        if (!in_scope(xi, yi, W)) continue;
        p_in_valid = 1'b1;
        p_x = W'(xi);
        p_y = W'(yi);
        p_send();
      end
    end
    p_frac = 1'b1;
    for (int xi = -(1 << (W - 1)); xi < (1 << (W - 1)); xi++) begin
      for (int yi = -(1 << (W - 1)); yi < (1 << (W - 1)); yi++) begin
        if (!is_norm(xi, W) || !is_norm(yi, W)) continue;
        p_x = W'(xi);
        p_y = W'(yi);
        p_send();
      end
    end
    p_in_valid = 1'b0;
  end

  // output stall pattern for the pipeline
  always @(negedge clk) p_out_ready <= (cyc % 97 > 20) || ($urandom_range(0, 1) == 1);

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    wait (c_total > 0 && c_done == c_total && p_done == c_total);
    repeat (20) @(negedge clk);
    $display("checked: comb %0d pipe %0d", c_done, p_done);
    $display("mechanisms: cor1 %0d cor2 %0d cor3 %0d none %0d restore %0d odd %0d",
             n_cor1, n_cor2, n_cor3, n_nocor, n_restore, n_norestore);
    $display("mechanisms: premature-exact %0d N<=0 %0d K=0 %0d stall %0d blocked %0d mode-switch %0d",
             n_premature, n_small, n_k0, n_stall, n_blocked, n_frac);
    checks++;
    if (n_cor1 == 0 || n_cor2 == 0 || n_cor3 == 0 || n_nocor == 0 || n_restore == 0 ||
        n_norestore == 0 || n_premature == 0 || n_small == 0 || n_k0 == 0 ||
        n_stall == 0 || n_blocked == 0 || n_frac == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    if (c_pend.size() != 0 || p_pend.size() != 0) begin
      failures++;
      $display("FAIL results outstanding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
