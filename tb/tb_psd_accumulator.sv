// tb_psd_accumulator: self-checking test of the PSD accumulator.
// Several random spectra are streamed in; the accumulated power of every
// bin, read back in centred order with the noise correction applied, is
// compared with a model. Also checked: the spectrum counter, the floor at
// zero of the corrected value, and clear.
module tb_psd_accumulator;
  import drx_pkg::*;

  logic clk = 0, rst = 1, clear = 0, in_valid = 0, in_last = 0, clearing;
  logic [3:0] log2n = 4;
  logic [31:0] noise = 0;
  iq_t in_data = '0;
  logic [8:0] in_index = 0, rd_addr = 0;
  logic [15:0] fft_count;
  logic [39:0] rd_data;
  int checks = 0, failures = 0;
  longint unsigned model [512];

  psd_accumulator #(.MAX_LOG2N(9), .ACC_W(40)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_clear(input int l2);
    @(negedge clk);
    log2n = 4'(l2);
    clear = 1;
    @(negedge clk);
    clear = 0;
    while (clearing) @(negedge clk);
    for (int k = 0; k < 512; k++) model[k] = 0;
  endtask

  task automatic spectrum(input int l2);
    int n;
    n = 1 << l2;
    for (int k = 0; k < n; k++) begin
      int a, b;
      a = $urandom_range(0, 65535) - 32768;
      b = $urandom_range(0, 65535) - 32768;
      in_valid = 1;
      in_data.i = 16'(a);
      in_data.q = 16'(b);
      in_index = 9'(k);
      in_last = (k == n - 1);
      model[(k + n/2) % n] += longint'(a * a) + longint'(b * b);
      @(negedge clk);
    end
    in_valid = 0;
    in_last = 0;
  endtask

  task automatic check_all(input int l2, input int nfft, input string name);
    int n;
    n = 1 << l2;
    checks++;
    if (fft_count != 16'(nfft)) begin
      failures++;
      $display("FAIL %s count %0d expected %0d", name, fft_count, nfft);
    end
    for (int k = 0; k < n; k++) begin
      longint unsigned e, corr;
      rd_addr = 9'(k);
      @(negedge clk);
      corr = longint'(noise) * nfft;
      e = (model[k] > corr) ? model[k] - corr : 0;
      checks++;
      if (rd_data != 40'(e)) begin
        failures++;
        $display("FAIL %s bin %0d got %0d expected %0d", name, k, rd_data, e);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    do_clear(4);
    for (int s = 0; s < 5; s++) spectrum(4);
    check_all(4, 5, "N16");
    noise = 32'd900_000_000;          // about half the mean power per FFT
    check_all(4, 5, "N16-noise");
    noise = 32'hffff_ffff;            // larger than every bin: floored at 0
    check_all(4, 5, "N16-floor");
    noise = 0;
    do_clear(8);
    for (int s = 0; s < 3; s++) spectrum(8);
    noise = 32'd100;
    check_all(8, 3, "N256");
    do_clear(8);
    check_all(8, 0, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
