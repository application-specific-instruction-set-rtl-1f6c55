// tb_pipe_fifo: self-checking test of the one-entry stage FIFO.
// Streams random words through it with random stalls on both sides and
// compares the output order with a queue model; checks that a
// continuously drained FIFO passes one word per cycle, and that a full
// FIFO refuses a write when its item is not being taken.
module tb_pipe_fifo;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  pipe_fifo #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int sent, got, cyc;
  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready, "empty after reset");
    // random traffic
    sent = 0; got = 0;
    while (got < 500) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0) && (sent < 500);
      in_data   = W'($urandom);
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      if (out_valid) check(out_data == model[0], "order/data");
      if (out_valid && !out_ready && in_valid) check(!in_ready, "full refuses write");
      @(posedge clk);
      if (out_valid && out_ready) begin void'(model.pop_front()); got++; end
      if (in_valid && in_ready) begin model.push_back(in_data); sent++; end
    end
    // throughput: 100 words in 100 cycles with the consumer always ready
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    @(negedge clk);
    cyc = 0; got = 0; sent = 0;
    while (got < 100) begin
      in_valid = (sent < 100);
      in_data  = W'(sent);
      #1;
      if (out_valid) begin check(out_data == W'(got), "stream data"); got++; end
      if (in_valid && in_ready) sent++;
      @(negedge clk);
      cyc++;
    end
    check(cyc == 101, "one word per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
