// tb_drx_param_calc: self-checking test of the Ki / K-factor calculator.
// Revolution frequencies over the deceleration range are applied for bunched
// and debunched beams; Ki, f_S and both K factors are compared with
// integer models, and f_S is checked to be the largest multiple of f_REV
// not above 40 MHz. Each calculation must also finish within 250 clocks
// (bunched) or 100 clocks (debunched), far inside one 20 ms machine tick.
module tb_drx_param_calc;
  import drx_pkg::*;

  logic clk = 0, rst = 1, start = 0, bunched = 0, busy, done;
  logic [31:0] f_rev_hz = 0, fs_hz, k_a, k_b;
  logic [7:0] h = 1, n = 4;
  logic [15:0] ki;
  int checks = 0, failures = 0;

  drx_param_calc dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, max_cyc [2] = '{0, 0};

  task automatic run(input bit b, input int fr, input int hh, input int nn);
    longint unsigned eki, efs, eka, ekb;
    @(negedge clk);
    bunched = b; f_rev_hz = 32'(fr); h = 8'(hh); n = 8'(nn); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    // a set-up must be ready far inside one 20 ms machine tick; the divider
    // chain gives about 200 clocks bunched and 70 debunched
    checks++;
    if (cyc > (b ? 250 : 100)) begin
      failures++; $display("FAIL calculation took %0d clocks", cyc);
    end
    if (cyc > max_cyc[b]) max_cyc[b] = cyc;
    if (b) begin
      eki = 40_000_000 / fr;
      efs = eki * fr;
      eka = ((longint'(hh) << 32) / eki) & 64'hffff_ffff;
      ekb = ((longint'(2 * hh) << 32) / eki) & 64'hffff_ffff;
      checks += 2;
      if (!(efs <= 40_000_000 && efs + fr > 40_000_000)) begin
        failures++; $display("FAIL model");
      end
      if (fs_hz + 32'(fr) <= 32'd40_000_000 || fs_hz > 32'd40_000_000) begin
        failures++; $display("FAIL f_S %0d not the largest multiple of %0d", fs_hz, fr);
      end
    end else begin
      eki = 0;
      efs = 40_000_000;
      eka = (((longint'(nn) * fr) << 32) / 40_000_000) & 64'hffff_ffff;
      ekb = eka;
    end
    checks += 4;
    if (ki != 16'(eki)) begin failures++; $display("FAIL f=%0d Ki %0d exp %0d", fr, ki, eki); end
    if (fs_hz != 32'(efs)) begin failures++; $display("FAIL f=%0d fs %0d exp %0d", fr, fs_hz, efs); end
    if (k_a != 32'(eka)) begin failures++; $display("FAIL f=%0d K_A %h exp %h", fr, k_a, eka); end
    if (k_b != 32'(ekb)) begin failures++; $display("FAIL f=%0d K_B %h exp %h", fr, k_b, ekb); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(1, 1_588_000, 1, 0);   // 3.5 GeV/c, h = 1
    run(1, 1_588_000, 3, 0);
    run(1, 1_000_000, 1, 0);   // exact divisor: Ki = 40
    run(1, 174_000, 1, 0);     // 100 MeV/c
    run(1, 2_500_000, 20, 0);  // h above Ki: K factor wraps
    run(0, 1_588_000, 0, 4);   // debunched, n = 4
    run(0, 174_000, 0, 12);
    for (int t = 0; t < 10; t++) run($urandom_range(0, 1), $urandom_range(150_000, 2_000_000),
                                    $urandom_range(1, 6), $urandom_range(1, 30));
    $display("INFO longest calculation: %0d clocks debunched, %0d bunched", max_cyc[0], max_cyc[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
