// tb_fft_engine: self-checking test of the chunk FFT.
// Random and single-tone chunks of 16, 256 and 512 points are transformed
// and every bin is compared with a floating-point DFT divided by N. The
// time from the last input sample to the first output is checked against
// (N/2)*log2(N) + 1 clocks, and the unload against N consecutive clocks.
module tb_fft_engine;
  import drx_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1, in_valid = 0;
  logic [3:0] log2n = 8;
  iq_t in_data = '0, out_data;
  logic in_ready, out_valid, out_last, busy;
  logic [8:0] out_index;
  int checks = 0, failures = 0;

  fft_engine #(.MAX_LOG2N(9)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xi [512], xq [512];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic run_chunk(input int l2, input int kind, input string name);
    int n;
    real max_err;
    longint t_last, t_first;
    int nout;
    n = 1 << l2;
    for (int k = 0; k < n; k++) begin
      if (kind == 0) begin
        xi[k] = $urandom_range(0, 40000) - 20000;
        xq[k] = $urandom_range(0, 40000) - 20000;
      end else begin
        xi[k] = int'($floor(20000.0 * $cos(2.0 * PI * 5.0 * k / n) + 0.5));
        xq[k] = int'($floor(20000.0 * $sin(2.0 * PI * 5.0 * k / n) + 0.5));
      end
    end
    @(negedge clk);
    log2n = 4'(l2);
    for (int k = 0; k < n; k++) begin
      while (!in_ready) @(negedge clk);
      in_valid  = 1;
      in_data.i = 16'(xi[k]);
      in_data.q = 16'(xq[k]);
      @(posedge clk);
      #1;
      t_last = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    nout = 0;
    max_err = 0;
    while (nout < n) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        real ri, rq, ei, eq;
        int k;
        if (nout == 0) t_first = cyc;
        k = int'(out_index);
        ri = 0; rq = 0;
        for (int m = 0; m < n; m++) begin
          real a;
          a = -2.0 * PI * real'(k) * real'(m) / real'(n);
          ri += xi[m] * $cos(a) - xq[m] * $sin(a);
          rq += xi[m] * $sin(a) + xq[m] * $cos(a);
        end
        ri /= n; rq /= n;
        ei = ri - out_data.i; eq = rq - out_data.q;
        if (ei < 0) ei = -ei;
        if (eq < 0) eq = -eq;
        if (ei > max_err) max_err = ei;
        if (eq > max_err) max_err = eq;
        checks++;
        if (k != nout || ei > 2.0 + l2 || eq > 2.0 + l2) begin
          failures++;
          $display("FAIL %s bin %0d (index %0d): got (%0d,%0d) expected (%0.1f,%0.1f)",
                   name, nout, k, out_data.i, out_data.q, ri, rq);
        end
        if (out_last != (nout == n - 1)) begin
          failures++;
          $display("FAIL %s out_last at %0d", name, nout);
        end
        nout++;
      end else if (nout > 0) begin
        failures++;
        $display("FAIL %s unload not continuous", name);
        nout = n;
      end
    end
    checks++;
    if (t_first - t_last != longint'((n / 2) * l2 + 1)) begin
      failures++;
      $display("FAIL %s latency %0d expected %0d", name, t_first - t_last, (n/2)*l2 + 1);
    end
    $display("INFO %s max error %0.2f LSB", name, max_err);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run_chunk(4, 0, "random-16");
    run_chunk(8, 0, "random-256");
    run_chunk(8, 1, "tone-256");
    run_chunk(9, 0, "random-512");
    run_chunk(4, 1, "tone-16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
