// tb_bunched_amplitude: self-checking test of the two-harmonic fit.
// Channel A and B receive constant phasors with a little noise whose
// magnitudes follow J_k = I0*h*(2 - Delta*k^2) for a chosen Delta. The
// outputs are compared exactly with an integer model of the same formulas,
// and Delta, I0*h and tau*f_RF with the values the phasors were built from.
module tb_bunched_amplitude;
  import drx_pkg::*;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst = 1, clear = 0, a_valid = 0, b_valid = 0, start = 0;
  logic [15:0] nsamp = 0;
  iq_t a_data = '0, b_data = '0;
  logic have_all, busy, done;
  logic [31:0] j1, j2, i0h, delta_q16, tau_frf_q16;
  int checks = 0, failures = 0;

  bunched_amplitude dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  function automatic longint unsigned isq(input longint unsigned x);
    longint unsigned r;
    r = longint'($sqrt(real'(x)));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  task automatic run(input real i0h_v, input real delta, input int ns, input string name);
    longint si1, sq1, si2, sq2;
    longint unsigned e1, e2, ed, ei, et;
    real m1, m2;
    longint cyc;
    m1 = i0h_v * (2.0 - delta);
    m2 = i0h_v * (2.0 - 4.0 * delta);
    si1 = 0; sq1 = 0; si2 = 0; sq2 = 0;
    @(negedge clk);
    nsamp = 16'(ns);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int k = 0; k < ns + 5; k++) begin
      int ai, aq, bi, bq;
      ai = int'(m1 * $cos(0.7)) + $urandom_range(0, 20) - 10;
      aq = int'(m1 * $sin(0.7)) + $urandom_range(0, 20) - 10;
      bi = int'(m2 * $cos(-2.1)) + $urandom_range(0, 20) - 10;
      bq = int'(m2 * $sin(-2.1)) + $urandom_range(0, 20) - 10;
      a_valid = 1; b_valid = (k % 3 != 1);   // channel B arrives unevenly
      a_data.i = 16'(ai); a_data.q = 16'(aq);
      b_data.i = 16'(bi); b_data.q = 16'(bq);
      @(posedge clk);
      if (k < ns) begin si1 += ai; sq1 += aq; end
      @(negedge clk);
    end
    a_valid = 0;
    b_valid = 0;
    if (!have_all) begin
      // channel B short: feed the rest
      while (!have_all) begin
        b_valid = 1;
        b_data.i = 16'(int'(m2 * $cos(-2.1)));
        b_data.q = 16'(int'(m2 * $sin(-2.1)));
        @(negedge clk);
      end
      b_valid = 0;
    end
    // channel B sums are read back; channel A sums are checked against the model
    checks++;
    si2 = longint'(dut.bi); sq2 = longint'(dut.bq);
    if (longint'(dut.ai) != si1 || longint'(dut.aq) != sq1) begin
      failures++; $display("FAIL %s channel A sum", name);
    end
    e1 = isq(longint'(si1 * si1 + sq1 * sq1));
    e2 = isq(longint'(si2 * si2 + sq2 * sq2));
    ed = (e1 > e2) ? ((e1 - e2) << 17) / (4 * e1 - e2) : 0;
    ei = (4 * e1 > e2) ? (4 * e1 - e2) / 6 : 0;
    et = isq(ed * 26076);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 5;
    if (j1 != 32'(e1)) begin failures++; $display("FAIL %s j1 %0d exp %0d", name, j1, e1); end
    if (j2 != 32'(e2)) begin failures++; $display("FAIL %s j2 %0d exp %0d", name, j2, e2); end
    if (delta_q16 != 32'(ed)) begin failures++; $display("FAIL %s delta %0d exp %0d", name, delta_q16, ed); end
    if (i0h != 32'(ei)) begin failures++; $display("FAIL %s i0h %0d exp %0d", name, i0h, ei); end
    if (tau_frf_q16 != 32'(et)) begin failures++; $display("FAIL %s tau %0d exp %0d", name, tau_frf_q16, et); end
    // against the physics: Delta, I0*h*nsamp, tau*f_RF = sqrt(5*Delta/(4*pi))
    checks += 3;
    if (rabs(delta_q16 / 65536.0 - delta) > 0.01) begin
      failures++; $display("FAIL %s delta %f vs %f", name, delta_q16 / 65536.0, delta);
    end
    if (rabs(i0h / (i0h_v * ns) - 1.0) > 0.01) begin
      failures++; $display("FAIL %s i0h %0d vs %f", name, i0h, i0h_v * ns);
    end
    if (rabs(tau_frf_q16 / 65536.0 - $sqrt(5.0 * delta / (4.0 * PI))) > 0.01) begin
      failures++; $display("FAIL %s tau %f", name, tau_frf_q16 / 65536.0);
    end
    checks++;
    if (cyc > 300) begin failures++; $display("FAIL %s took %0d clocks", name, cyc); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(5000.0, 0.30, 200, "d030");
    run(3000.0, 0.10, 1000, "d010");
    run(8000.0, 0.45, 64, "d045");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
