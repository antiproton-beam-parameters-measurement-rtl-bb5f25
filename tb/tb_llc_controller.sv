// tb_llc_controller: self-checking test of the measurement controller.
// The controller runs with the real memory, FIFO, FFT, PSD, peak and
// bunched-beam blocks; the down converters are replaced by a source that,
// while a converter is released, pushes a numbered sample every 3 clocks.
// Checked: the IDLE/INITIALISING/READY/PROCESSING sequence, ping reply,
// error count for a bad or ill-timed command, the chunk contents of a
// sliding FFT with overlap (chunk k, sample i = source sample k*(N-ov)+i),
// the number of chunks and of samples taken before the converter is
// stopped, burst reads of half a FIFO, the results and PSD copied to global
// memory, the bunched-beam results, the status word and meas_done, and a
// debunched measurement over two converters chosen by the converter mask.
module tb_llc_controller;
  import drx_pkg::*;

  localparam int ND = 4, FD = 16, ML = 6, GD = 1024, AW = 40;
  localparam int CW = $clog2(FD) + 1;

  logic clk = 0, rst = 1, host_irq = 0, meas_done;
  llc_state_t llc_state;
  logic a_we = 0; logic [9:0] a_addr = 0; logic [31:0] a_wdata = 0, a_rdata;
  logic gm_we; logic [9:0] gm_addr; logic [31:0] gm_wdata, gm_rdata;
  logic [ND-1:0] ddc_run, fifo_pop, fifo_rv, fifo_ov, push;
  logic [31:0] ddc_phase_inc [ND];
  logic [15:0] ddc_decim [ND];
  logic [4:0]  ddc_shift [ND];
  logic [1:0]  ddc_input [ND];
  logic [CW-1:0] fifo_count [ND];
  iq_t fifo_rd_data [ND], src [ND];
  logic [3:0] fft_log2n;
  logic fft_in_valid, fft_in_ready, fo_valid, fo_last, fft_busy;
  iq_t fft_in_data, fo_data;
  logic [ML-1:0] fo_index;
  logic psd_clear, psd_clearing;
  logic [31:0] psd_noise;
  logic [15:0] psd_fft_count;
  logic [ML-1:0] psd_rd_addr, ana_rd_addr, ana_roi_lo, ana_roi_hi, ana_peak_bin;
  logic [AW-1:0] psd_rd_data, ana_peak_val;
  logic ana_start, ana_busy, ana_done;
  logic [63:0] ana_area;
  logic [ML:0] ana_width;
  logic [ML+7:0] ana_centroid;
  logic bun_clear, bun_a_valid, bun_b_valid, bun_have_all, bun_start, bun_busy, bun_done;
  logic [15:0] bun_nsamp;
  iq_t bun_a_data, bun_b_data;
  logic [31:0] bun_j1, bun_j2, bun_i0h, bun_delta, bun_tau;
  int checks = 0, failures = 0;

  llc_controller #(.NUM_DDC(ND), .FIFO_DEPTH(FD), .MAX_LOG2N(ML), .GM_DEPTH(GD), .ACC_W(AW)) dut (
    .clk, .rst, .host_irq, .meas_done, .llc_state, .gm_we, .gm_addr, .gm_wdata, .gm_rdata,
    .ddc_run, .ddc_phase_inc, .ddc_decim, .ddc_shift, .ddc_input, .fifo_pop, .fifo_count, .fifo_rd_data,
    .fifo_rd_valid(fifo_rv), .fifo_overflow(fifo_ov), .fft_log2n, .fft_in_valid, .fft_in_data,
    .fft_in_ready, .psd_clear, .psd_clearing, .psd_noise, .psd_fft_count, .psd_rd_addr,
    .psd_rd_data, .ana_start, .ana_roi_lo, .ana_roi_hi, .ana_rd_addr, .ana_done, .ana_area,
    .ana_peak_bin, .ana_peak_val, .ana_width, .ana_centroid, .bun_clear, .bun_nsamp,
    .bun_a_valid, .bun_a_data, .bun_b_valid, .bun_b_data, .bun_have_all, .bun_start,
    .bun_done, .bun_j1, .bun_j2, .bun_i0h, .bun_delta, .bun_tau);

  global_memory #(.DEPTH(GD), .W(32)) u_gm (.clk, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_we(gm_we), .b_addr(gm_addr), .b_wdata(gm_wdata), .b_rdata(gm_rdata));

  for (genvar d = 0; d < ND; d++) begin : g_f
    logic hf, fl, em;
    sample_fifo #(.WIDTH(32), .DEPTH(FD)) u_f (.clk, .rst, .flush(!ddc_run[d]), .push(push[d]),
      .wr_data(src[d]), .pop(fifo_pop[d]), .rd_data(fifo_rd_data[d]), .rd_valid(fifo_rv[d]),
      .count(fifo_count[d]), .half_full(hf), .full(fl), .empty(em), .overflow(fifo_ov[d]));
  end

  fft_engine #(.MAX_LOG2N(ML)) u_fft (.clk, .rst, .log2n(fft_log2n), .in_valid(fft_in_valid),
    .in_data(fft_in_data), .in_ready(fft_in_ready), .out_valid(fo_valid), .out_data(fo_data),
    .out_index(fo_index), .out_last(fo_last), .busy(fft_busy));
  psd_accumulator #(.MAX_LOG2N(ML), .ACC_W(AW)) u_psd (.clk, .rst, .clear(psd_clear),
    .log2n(fft_log2n), .noise(psd_noise), .clearing(psd_clearing), .in_valid(fo_valid),
    .in_data(fo_data), .in_index(fo_index), .in_last(fo_last), .fft_count(psd_fft_count),
    .rd_addr(psd_rd_addr), .rd_data(psd_rd_data));
  psd_peak_analyzer #(.MAX_LOG2N(ML), .ACC_W(AW)) u_ana (.clk, .rst, .start(ana_start),
    .roi_lo(ana_roi_lo), .roi_hi(ana_roi_hi), .rd_addr(ana_rd_addr), .rd_data(psd_rd_data),
    .busy(ana_busy), .done(ana_done), .area(ana_area), .peak_bin(ana_peak_bin),
    .peak_val(ana_peak_val), .width(ana_width), .centroid(ana_centroid));
  bunched_amplitude #(.ACC_W(AW)) u_bun (.clk, .rst, .clear(bun_clear), .nsamp(bun_nsamp),
    .a_valid(bun_a_valid), .a_data(bun_a_data), .b_valid(bun_b_valid), .b_data(bun_b_data),
    .have_all(bun_have_all), .start(bun_start), .busy(bun_busy), .done(bun_done),
    .j1(bun_j1), .j2(bun_j2), .i0h(bun_i0h), .delta_q16(bun_delta), .tau_frf_q16(bun_tau));

  always #5 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // converter model: numbered samples every 3 clocks while released
  int sidx [ND];
  int tick = 0;
  bit lb_mode;
  always @(posedge clk) begin
    tick <= (tick + 1) % 3;
    for (int d = 0; d < ND; d++) begin
      if (!ddc_run[d]) sidx[d] <= 0;
      else if (tick == 0) sidx[d] <= sidx[d] + 1;
    end
  end
  always_comb
    for (int d = 0; d < ND; d++) begin
      push[d] = ddc_run[d] && tick == 0;
      if (lb_mode) begin
        src[d].i = (d == 1) ? 16'sd3000 : 16'sd1000;
        src[d].q = (d == 1) ? -16'sd4000 : 16'sd0;
      end else begin
        src[d].i = 16'(sidx[d] * 37);
        src[d].q = 16'(-sidx[d]);
      end
    end

  // monitors
  int fft_in_cnt = 0, chunk_errs = 0, bursts = 0, taken [ND] = '{default: 0}, meas_done_cnt = 0;
  logic [ND-1:0] pop_d;
  always @(posedge clk) if (!rst) begin
    pop_d <= fifo_pop;
    if (meas_done) meas_done_cnt++;
    if (fft_in_valid) begin
      int k, i, e;
      k = fft_in_cnt / 16;
      i = fft_in_cnt % 16;
      e = (k % 5) * 12 + i;    // N = 16, overlap 4, 5 chunks per converter
      if (fft_in_data.i != 16'(e * 37) || fft_in_data.q != 16'(-e)) begin
        chunk_errs++;
        if (chunk_errs < 4) $display("INFO chunk %0d sample %0d got %0d/%0d", k, i, fft_in_data.i, fft_in_data.q);
      end
      fft_in_cnt++;
    end
    for (int d = 0; d < ND; d++) begin
      if (fifo_pop[d] && !pop_d[d]) bursts++;
      if (fifo_pop[d]) taken[d]++;
    end
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(input int adr, input logic [31:0] v);
    @(negedge clk); a_we = 1; a_addr = 10'(adr); a_wdata = v;
    @(negedge clk); a_we = 0;
  endtask
  task automatic rd(input int adr, output logic [31:0] v);
    @(negedge clk); a_addr = 10'(adr);
    @(negedge clk); v = a_rdata;
  endtask
  task automatic cmd(input logic [7:0] c);
    wr(GM_CMD, 32'(c));
    host_irq = 1; @(negedge clk); host_irq = 0;
  endtask

  logic [31:0] v;
  bit saw_init = 0, saw_proc = 0;
  always @(posedge clk) if (!rst) begin
    if (llc_state == LLC_INITIALISING) saw_init = 1;
    if (llc_state == LLC_PROCESSING) saw_proc = 1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    chk(llc_state == LLC_IDLE, "IDLE after reset");
    cmd(CMD_MEASURE);                      // not allowed in IDLE
    repeat (10) @(negedge clk);
    chk(llc_state == LLC_IDLE, "measure ignored in IDLE");
    cmd(CMD_PING);
    repeat (10) @(negedge clk);
    rd(GM_VERSION, v);
    chk(v == LLC_VERSION, "ping reply");
    cmd(8'h77);                            // unknown command
    cmd(CMD_INIT);
    repeat (100) @(negedge clk);
    chk(saw_init && llc_state == LLC_READY, "INITIALISING then READY");
    rd(GM_STATUS, v);
    chk(v[1:0] == 2'(LLC_READY) && v[15:8] == 8'd2, "status after init, two errors counted");

    // ---------------- debunched: N = 16, 5 FFTs, overlap 4, DDC 2
    wr(GM_PROC_TYPE, 32'(PROC_LD)); wr(GM_NAVG, 5); wr(GM_LOG2N, 4); wr(GM_OVERLAP, 4);
    wr(GM_ROI_LO, 2); wr(GM_ROI_HI, 13); wr(GM_NOISE, 0); wr(GM_DDC_A, 2); wr(GM_DDC_B, 3); wr(GM_DDC_MASK, 0);
    wr(GM_NSAMP_LB, 0);
    for (int d = 0; d < ND; d++) begin
      wr(GM_DDC_BASE + 2*d, 32'h1000_0000 * (d + 1));
      wr(GM_DDC_BASE + 2*d + 1, (32'(d % 4) << 24) | (32'(d) << 16) | 32'(d + 10));
    end
    lb_mode = 0;
    cmd(CMD_MEASURE);
    repeat (5) @(negedge clk);
    while (llc_state == LLC_PROCESSING || !saw_proc) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(ddc_phase_inc[2] == 32'h3000_0000 && ddc_decim[2] == 16'd12 && ddc_shift[2] == 5'd2 &&
        ddc_input[2] == 2'd2,
        "DDC set-up copied from global memory");
    chk(fft_in_cnt == 5 * 16, $sformatf("5 chunks of 16 into the FFT (%0d)", fft_in_cnt));
    chk(chunk_errs == 0, $sformatf("sliding-FFT chunk contents (%0d errors)", chunk_errs));
    chk(taken[2] == 16 + 4 * 12, $sformatf("samples taken from DDC 2: %0d", taken[2]));
    chk(taken[0] == 0 && taken[1] == 0 && taken[3] == 0, "other FIFOs untouched");
    chk(bursts >= 64 / (FD / 2), $sformatf("half-FIFO bursts: %0d", bursts));
    chk(ddc_run == '0, "converters stopped");
    chk(meas_done_cnt == 1, $sformatf("meas_done pulsed once (%0d)", meas_done_cnt));
    rd(GM_STATUS, v);
    chk(v[1:0] == 2'(LLC_READY) && v[2] && v[31:16] == 16'd1, "status done, count 1");
    rd(GM_AREA_LO, v);  chk(v == ana_area[31:0], "area word");
    rd(GM_WIDTH, v);    chk(v == 32'(ana_width), "width word");
    rd(GM_CENTROID, v); chk(v == 32'(ana_centroid), "centroid word");
    rd(GM_PEAK_BIN, v); chk(v == 32'(ana_peak_bin), "peak bin word");
    chk(ana_area != 0, "non-zero PSD area");
    for (int k = 0; k < 16; k++) begin
      logic [31:0] p;
      rd(GM_PSD_BASE + 2 * (1 << ML) + k, v);
      p = 32'(u_psd.acc[k] >> PSD_SHIFT);
      chk(v == p, $sformatf("PSD word %0d", k));
    end

    // ---------------- bunched: 40 samples from DDC 1 and DDC 3
    for (int d = 0; d < ND; d++) taken[d] = 0;
    wr(GM_PROC_TYPE, 32'(PROC_LB)); wr(GM_DDC_A, 1); wr(GM_DDC_B, 3); wr(GM_NSAMP_LB, 40); wr(GM_DDC_MASK, 0);
    lb_mode = 1;
    cmd(CMD_MEASURE);
    repeat (5) @(negedge clk);
    while (llc_state != LLC_READY) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(taken[1] == 40 && taken[3] == 40 && taken[2] == 0, "40 samples from DDC 1 and 3");
    rd(GM_J1, v); chk(v == 32'd200000, $sformatf("J1 = |40*(3000-4000j)| (%0d)", v));
    rd(GM_J2, v); chk(v == 32'd40000, $sformatf("J2 = 40*1000 (%0d)", v));
    rd(GM_I0H, v); chk(v == 32'((4 * 200000 - 40000) / 6), "I0*h word");
    rd(GM_DELTA, v); chk(v == 32'(((longint'(160000)) << 17) / 760000), "Delta word");
    rd(GM_STATUS, v);
    chk(v[31:16] == 16'd2 && v[2], "status count 2");
    chk(meas_done_cnt == 2, "meas_done pulsed twice");
    chk(!(|fifo_ov), "no FIFO overflow");

    // ---------------- debunched on converters 0 and 3 (mask), in turn
    for (int d = 0; d < ND; d++) taken[d] = 0;
    lb_mode = 0;
    fft_in_cnt = 0;
    wr(GM_PROC_TYPE, 32'(PROC_LD)); wr(GM_DDC_MASK, 32'b1001);
    cmd(CMD_MEASURE);
    repeat (5) @(negedge clk);
    while (llc_state != LLC_READY) @(negedge clk);
    repeat (3) @(negedge clk);
    chk(fft_in_cnt == 2 * 5 * 16, $sformatf("5 chunks per converter (%0d samples)", fft_in_cnt));
    chk(chunk_errs == 0, "chunk contents of both converters");
    chk(taken[0] == 64 && taken[3] == 64 && taken[1] == 0 && taken[2] == 0,
        $sformatf("samples from DDC 0 and 3: %0d %0d", taken[0], taken[3]));
    rd(GM_STATUS, v);
    chk(v[31:16] == 16'd3 && v[2], "status count 3");
    chk(meas_done_cnt == 3, "one meas_done for the two converters");
    rd(GM_CHRES_BASE + 3 * GM_CHRES_STEP + (GM_AREA_LO - GM_RES_BASE), v);
    chk(v == ana_area[31:0], "converter 3 result block");
    begin
      logic [31:0] v0;
      rd(GM_CHRES_BASE + 0 * GM_CHRES_STEP + (GM_AREA_LO - GM_RES_BASE), v0);
      chk(v0 == v, "converter 0 result block equals converter 3 (same data)");
    end
    for (int k = 0; k < 16; k++) begin
      logic [31:0] p0, p3;
      rd(GM_PSD_BASE + 3 * (1 << ML) + k, p3);
      rd(GM_PSD_BASE + 0 * (1 << ML) + k, p0);
      chk(p3 == 32'(u_psd.acc[k] >> PSD_SHIFT) && p0 == p3, $sformatf("PSD regions, word %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
