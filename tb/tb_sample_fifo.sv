// tb_sample_fifo: self-checking test of the converter FIFO.
// Random pushes and pops are checked word by word against a queue model,
// together with count, half_full, full, empty, the one-clock read latency,
// overflow on a push into a full FIFO and flush.
module tb_sample_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst = 1, flush = 0, push = 0, pop = 0;
  logic [W-1:0] wr_data = 0, rd_data;
  logic rd_valid, half_full, full, empty, overflow;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] expect_q [$];

  sample_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // read data one clock after the pop
  always @(posedge clk) if (!rst) begin
    if (rd_valid) begin
      chk(expect_q.size() > 0 && rd_data == expect_q[0], "read data");
      if (expect_q.size() > 0) void'(expect_q.pop_front());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(empty && count == 0 && !half_full, "empty after reset");
    for (int t = 0; t < 2000; t++) begin
      push = ($urandom_range(0, 99) < (t < 1000 ? 60 : 40));
      pop  = ($urandom_range(0, 99) < (t < 1000 ? 40 : 60));
      wr_data = $urandom;
      // model, evaluated before the clock
      chk(count == model.size(), "count");
      chk(half_full == (model.size() >= D/2), "half_full");
      chk(full == (model.size() == D), "full");
      chk(empty == (model.size() == 0), "empty");
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == D);
        was_empty = (model.size() == 0);
        @(posedge clk);
        if (pop && !was_empty) expect_q.push_back(model.pop_front());
        if (push && !was_full) model.push_back(wr_data);
      end
      @(negedge clk);
    end
    push = 0; pop = 0;
    // fill to full, then one more push: overflow
    while (!full) begin push = 1; wr_data = $urandom; @(posedge clk); model.push_back(wr_data); @(negedge clk); end
    push = 1; @(negedge clk); push = 0;
    chk(overflow && count == D, "overflow on push into full FIFO");
    flush = 1; @(negedge clk); flush = 0;
    model.delete();
    chk(empty && !overflow && count == 0, "flush");
    repeat (2) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
