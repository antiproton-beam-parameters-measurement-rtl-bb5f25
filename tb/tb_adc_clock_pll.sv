// tb_adc_clock_pll: test of the behavioural PLL model.
// A 10 MHz reference must give a locked 40 MHz clock after about 100 us;
// a 6 MHz reference a 24 MHz clock after a new lock; a 4 MHz reference
// (16 MHz out, below the 20 MHz range) must not lock.
module tb_adc_clock_pll;
  logic ref_clk = 0, out_clk, locked;
  real  half_ref = 50.0;   // ns
  int   checks = 0, failures = 0;

  adc_clock_pll dut (.*);

  always #(half_ref) ref_clk = ~ref_clk;

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real exp_mhz, input string name);
    real t0, t1;
    int  n;
    @(posedge out_clk) t0 = $realtime;
    for (n = 0; n < 100; n++) @(posedge out_clk);
    t1 = $realtime;
    checks++;
    if ((100.0e3 / (t1 - t0)) < exp_mhz * 0.999 || (100.0e3 / (t1 - t0)) > exp_mhz * 1.001) begin
      failures++;
      $display("FAIL %s: %0.3f MHz expected %0.3f", name, 100.0e3 / (t1 - t0), exp_mhz);
    end
  endtask

  initial begin
    real t_start;
    t_start = $realtime;
    #90us;
    checks++;
    if (locked) begin failures++; $display("FAIL locked before 100 us"); end
    wait (locked);
    checks++;
    if ($realtime - t_start > 120_000.0) begin failures++; $display("FAIL lock took too long"); end
    measure(40.0, "10 MHz reference");
    half_ref = 1000.0 / 12.0;       // 6 MHz
    #2us;
    checks++;
    if (locked) begin failures++; $display("FAIL still locked after reference step"); end
    wait (locked);
    measure(24.0, "6 MHz reference");
    half_ref = 125.0;               // 4 MHz: 16 MHz out of range
    #300us;
    checks++;
    if (locked) begin failures++; $display("FAIL locked at 16 MHz output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
