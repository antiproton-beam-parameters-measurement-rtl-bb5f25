// tb_psd_peak_analyzer: self-checking test of the PSD peak analysis.
// A Gaussian Schottky band on a small floor is placed in a PSD memory
// model with one clock of read latency; area, peak bin and value, width
// at exp(-2) of the peak and centroid are compared with values computed
// here. A second ROI that cuts the band and an empty PSD are also run.
module tb_psd_peak_analyzer;
  logic clk = 0, rst = 1, start = 0, busy, done;
  logic [8:0] roi_lo = 0, roi_hi = 0, rd_addr, peak_bin;
  logic [39:0] rd_data, peak_val;
  logic [63:0] area;
  logic [9:0] width;
  logic [16:0] centroid;
  int checks = 0, failures = 0;
  logic [39:0] psd [512];

  psd_peak_analyzer #(.MAX_LOG2N(9), .ACC_W(40)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) rd_data <= psd[rd_addr];

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input real mu, input real sigma, input real amp);
    for (int k = 0; k < 512; k++)
      psd[k] = 40'(longint'(amp * $exp(-0.5 * (k - mu) * (k - mu) / (sigma * sigma))) +
                   longint'($urandom_range(0, 1000)));
  endtask

  task automatic run(input int lo, input int hi, input string name);
    longint unsigned a, m, pv, thr;
    int pb, first, last, w;
    longint cyc;
    a = 0; m = 0; pv = 0; pb = lo;
    for (int k = lo; k <= hi; k++) begin
      a += psd[k];
      m += longint'(psd[k]) * k;
      if (psd[k] > pv) begin pv = psd[k]; pb = k; end
    end
    thr = (pv * 277) >> 11;
    first = -1; last = -1;
    for (int k = lo; k <= hi; k++)
      if (pv != 0 && psd[k] >= thr) begin
        if (first < 0) first = k;
        last = k;
      end
    w = (first < 0) ? 0 : last - first + 1;
    @(negedge clk);
    roi_lo = 9'(lo); roi_hi = 9'(hi); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 6;
    if (area != a) begin failures++; $display("FAIL %s area %0d exp %0d", name, area, a); end
    if (peak_val != 40'(pv) || peak_bin != 9'(pb)) begin
      failures++; $display("FAIL %s peak %0d@%0d exp %0d@%0d", name, peak_val, peak_bin, pv, pb);
    end
    if (width != 10'(w)) begin failures++; $display("FAIL %s width %0d exp %0d", name, width, w); end
    if (centroid != 17'((a == 0) ? 0 : (m * 256) / a)) begin
      failures++; $display("FAIL %s centroid %0d exp %0d", name, centroid, (a == 0) ? 0 : (m * 256) / a);
    end
    if (busy) begin failures++; $display("FAIL %s busy after done", name); end
    // two passes over the ROI plus the 72-clock divider
    if (cyc > 2 * (hi - lo + 1) + 90) begin
      failures++; $display("FAIL %s took %0d clocks", name, cyc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    fill(260.3, 6.0, 5.0e8);
    run(200, 320, "band");
    // 2-sigma-level width of a Gaussian is 4 sigma: about 24 bins here
    checks++;
    if (width < 22 || width > 26) begin failures++; $display("FAIL width %0d not near 4 sigma", width); end
    checks++;
    if (centroid < 17'(int'(259.5 * 256)) || centroid > 17'(int'(261.1 * 256))) begin
      failures++; $display("FAIL centroid %0d not near 260.3", centroid);
    end
    run(255, 300, "cut");
    fill(100.0, 2.0, 1.0e6);
    run(0, 511, "narrow");
    for (int k = 0; k < 512; k++) psd[k] = 0;
    run(10, 40, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
