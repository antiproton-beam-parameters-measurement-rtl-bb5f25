// tb_global_memory: self-checking test of the dual-port global memory.
// Random reads and writes on both ports are compared with an array model,
// including the one-clock read latency, read-before-write, and the rule
// that the host port wins when both ports write the same word.
module tb_global_memory;
  logic clk = 0, a_we = 0, b_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [256];
  logic [31:0] ea, eb;

  global_memory #(.DEPTH(256), .W(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through both ports
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      model[k] = $urandom;
      if (k % 2 == 0) begin a_we = 1; a_addr = 8'(k); a_wdata = model[k]; b_we = 0; end
      else            begin b_we = 1; b_addr = 8'(k); b_wdata = model[k]; a_we = 0; end
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a_we = $urandom_range(0, 2) == 0;
      b_we = $urandom_range(0, 2) == 0;
      a_addr = 8'($urandom_range(0, 255));
      b_addr = (t % 7 == 0) ? a_addr : 8'($urandom_range(0, 255));
      a_wdata = $urandom;
      b_wdata = $urandom;
      ea = model[a_addr];
      eb = model[b_addr];
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
      @(negedge clk);
      checks += 2;
      if (a_rdata != ea) begin failures++; $display("FAIL port A read %h exp %h", a_rdata, ea); end
      if (b_rdata != eb) begin failures++; $display("FAIL port B read %h exp %h", b_rdata, eb); end
      a_we = 0; b_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
