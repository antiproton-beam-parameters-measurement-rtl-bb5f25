// tb_ddc: self-checking test of the digital down converter.
// A cosine input is mixed down and decimated; every output is compared with
// a floating-point model of the same mixer (rotation by -phi with the
// CORDIC gain) and integrate-and-dump filter. Checked: output values for a
// tone on the local oscillator, a tone in a null of the filter, the output
// rate (one word per `decim` inputs) and the restart of the phase on run.
module tb_ddc;
  import drx_pkg::*;

  localparam real G  = 1.6467602581210654;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1, run = 0, in_valid = 0;
  logic signed [15:0] in_sample = 0;
  logic [31:0] phase_inc = 0;
  logic [15:0] decim = 0;
  logic [4:0]  shift = 0;
  logic out_valid;
  iq_t  out_iq;
  int checks = 0, failures = 0;

  ddc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #4_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference sums and received outputs
  real ref_i [$], ref_q [$];
  int  got_i [$], got_q [$];
  int  out_cnt;

  always @(posedge clk) if (out_valid) begin
    got_i.push_back(int'(out_iq.i));
    got_q.push_back(int'(out_iq.q));
    out_cnt++;
  end

  task automatic run_tone(input real amp, input real f_cyc, input real th,
                          input logic [31:0] inc, input int r, input int sh,
                          input int nblk, input string name);
    real si, sq, ph;
    int  s, n;
    ref_i.delete(); ref_q.delete(); got_i.delete(); got_q.delete();
    out_cnt = 0;
    @(negedge clk);
    run = 0; phase_inc = inc; decim = 16'(r); shift = 5'(sh);
    @(negedge clk);
    run = 1;
    n = 0;
    for (int b = 0; b < nblk; b++) begin
      si = 0; sq = 0;
      for (int k = 0; k < r; k++) begin
        s = int'($floor(amp * $cos(2.0 * PI * f_cyc * n + th) + 0.5));
        ph = 2.0 * PI * real'(32'(inc * 32'(n))) / 4294967296.0;
        si += G * s * $cos(ph);
        sq -= G * s * $sin(ph);
        in_sample = 16'(s);
        in_valid  = 1;
        @(negedge clk);
        n++;
      end
      ref_i.push_back(si / (2.0 ** sh));
      ref_q.push_back(sq / (2.0 ** sh));
    end
    in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (out_cnt != nblk) begin
      failures++;
      $display("FAIL %s: %0d outputs for %0d blocks", name, out_cnt, nblk);
    end
    for (int b = 0; b < nblk && b < out_cnt; b++) begin
      real ei, eq, tol;
      ei = got_i[b] - ref_i[b];
      eq = got_q[b] - ref_q[b];
      tol = 4.0 + 0.002 * ($sqrt(ref_i[b]*ref_i[b] + ref_q[b]*ref_q[b]));
      checks++;
      if (ei > tol || ei < -tol || eq > tol || eq < -tol) begin
        failures++;
        $display("FAIL %s block %0d: got (%0d,%0d) expected (%0.1f,%0.1f)",
                 name, b, got_i[b], got_q[b], ref_i[b], ref_q[b]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // tone exactly on the LO (K = 1/16), 4 LO periods per output
    run_tone(8000.0, 1.0/16.0, 0.0, 32'h1000_0000, 64, 6, 8, "on-LO");
    begin
      // the tone lands at DC: I about A/2*G, Q about 0
      checks++;
      if (got_i.size() < 2 || got_i[1] < 6400 || got_i[1] > 6800 ||
          got_q[1] > 20 || got_q[1] < -20) begin
        failures++;
        $display("FAIL on-LO magnitude: (%0d,%0d)", got_i[1], got_q[1]);
      end
    end
    // tone with a phase offset: energy moves to Q
    run_tone(8000.0, 1.0/16.0, PI/2.0, 32'h1000_0000, 64, 6, 6, "quadrature");
    checks++;
    if (got_q.size() < 2 || got_q[1] < 6400 || got_i[1] > 20 || got_i[1] < -20) begin
      failures++;
      $display("FAIL quadrature: (%0d,%0d)", got_i[1], got_q[1]);
    end
    // tone 2*fs/R away from the LO: in a null of the decimator
    run_tone(8000.0, 1.0/16.0 + 2.0/64.0, 0.3, 32'h1000_0000, 64, 6, 6, "null");
    checks++;
    if (got_i.size() < 2 || got_i[1] > 20 || got_i[1] < -20 || got_q[1] > 20 || got_q[1] < -20) begin
      failures++;
      $display("FAIL null: (%0d,%0d)", got_i[1], got_q[1]);
    end
    // odd K, decimation 5, shift 3, large input
    run_tone(20000.0, 0.137, 1.0, 32'h2312_6E98, 5, 3, 20, "odd");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
