// tb_pipe_stage_ctrl: one stage controller driving a data register between a
// random source and a random sink.
//
// The source offers numbered tokens; the sink accepts on random cycles. The
// tokens must arrive in order, none lost or repeated; in_ready must be high
// whenever the stage is empty or being read; a token offered to an empty
// stage must appear at the output one edge later; and the stage must carry a
// token per cycle when the sink never stalls. Stalls are counted.
module tb_pipe_stage_ctrl;

  int checks = 0;
  int failures = 0;
  int stalls = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready, load, valid;
  logic out_ready = 1'b0;
  int   data_reg;
  int   next_send = 0;
  int   next_recv = 0;
  int   streaming = 0;

  pipe_stage_ctrl dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .load(load), .valid(valid), .out_ready(out_ready)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (load) data_reg <= next_send;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (in_ready !== (!valid || out_ready) || load !== (in_valid && in_ready)) begin
        failures++;
        $display("FAIL handshake: valid=%b out_ready=%b in_ready=%b", valid, out_ready, in_ready);
      end
      if (valid && out_ready) begin
        checks++;
        if (data_reg != next_recv) begin
          failures++;
          $display("FAIL got token %0d, want %0d", data_reg, next_recv);
        end
        next_recv <= next_recv + 1;
      end
      if (valid && !out_ready) stalls++;
      if (load) next_send <= next_send + 1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 2) != 0);
      out_ready = ($urandom_range(0, 2) != 0);
    end
    // full rate: every cycle a token in and a token out
    @(negedge clk);
    in_valid = 1'b1;
    out_ready = 1'b1;
    @(negedge clk);
    streaming = next_recv;
    repeat (100) @(negedge clk);
    checks++;
    if (next_recv - streaming != 100) begin
      failures++;
      $display("FAIL throughput: %0d tokens in 100 cycles", next_recv - streaming);
    end
    // drain and check the one-edge latency into an empty stage
    in_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (valid) begin
      failures++;
      $display("FAIL stage did not empty");
    end
    in_valid = 1'b1;
    out_ready = 1'b0;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!valid) begin
      failures++;
      $display("FAIL token not in the stage after one edge");
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!valid) begin
      failures++;
      $display("FAIL stalled token lost");
    end
    out_ready = 1'b1;
    repeat (2) @(negedge clk);
    checks++;
    if (next_recv != next_send || stalls == 0) begin
      failures++;
      $display("FAIL sent %0d received %0d stalls %0d", next_send, next_recv, stalls);
    end
    $display("stalls=%0d tokens=%0d", stalls, next_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
