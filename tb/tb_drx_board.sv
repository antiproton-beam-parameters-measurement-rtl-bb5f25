// tb_drx_board: end-to-end test of the receiver board at its default size
// (8 converters, 4 inputs, 512-word FIFOs, 512-point FFT capacity, 8192-word global
// memory). The ADC clock is taken as 40 MHz.
//  1. reset, an ill-timed and an unknown command, INIT, PING;
//  2. the set-up calculator gives the K factor for a debunched beam at
//     f_REV = 1.588 MHz, harmonic n = 4;
//  3. debunched measurement (LD): the ADC sees a Schottky-like band of
//     lines around 4*f_REV, Gaussian in amplitude, plus white noise; 60
//     FFTs of 256 points with 64 samples of overlap, decimation 64, noise
//     correction on. Peak bin, width, centre and area are checked against
//     values computed here from the injected lines;
//  4. the calculator gives Ki and the K factors of a bunched beam at
//     f_REV = 1 MHz, h = 1 (Ki = 40, f_S = 40 MHz);
//  5. bunched measurement (LB): digitiser input 2 sees the first two
//     harmonics of a bunch train with amplitudes I0*h*(2 - Delta*k^2),
//     Delta = 0.25, while input 0 carries only noise; both converters
//     select input 2, and the fitted Delta, I0*h and tau*f_RF are checked;
//  6. debunched again with the largest spectrum: 8 FFTs of 512 points of
//     one line at bin +100, decimation 16, on converters 6 and 7 in one
//     measurement (converter mask); peak bin, width and the PSD words of
//     both converters in global memory are checked.
// Each mechanism (ping, error count, init, sliding-FFT overlap, half-FIFO
// bursts, converter stop, noise correction, LD and LB processing, mode
// switches both ways, both calculator modes, converter input selection,
// 512-point spectrum, several converters per measurement) is counted and must occur at least once.
module tb_drx_board;
  import drx_pkg::*;
  localparam real PI = 3.141592653589793;
  localparam real FS = 40.0e6;

  logic clk = 0, rst = 1;
  logic signed [11:0] adc_data [4] = '{default: 0};
  logic host_we = 0, host_irq = 0, meas_done;
  logic [12:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  llc_state_t llc_state;
  logic [7:0] fifo_overflow;
  logic pc_start = 0, pc_bunched = 0, pc_busy, pc_done;
  logic [31:0] pc_f_rev_hz = 0, pc_fs_hz, pc_k_a, pc_k_b;
  logic [7:0] pc_h = 0, pc_n = 0;
  logic [15:0] pc_ki;
  int checks = 0, failures = 0;

  drx_board dut (.*);

  always #12.5 clk = ~clk;     // 40 MHz

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic wr(input int adr, input logic [31:0] v);
    @(negedge clk); host_we = 1; host_addr = 13'(adr); host_wdata = v;
    @(negedge clk); host_we = 0;
  endtask
  task automatic rd(input int adr, output logic [31:0] v);
    @(negedge clk); host_addr = 13'(adr);
    @(negedge clk); v = host_rdata;
  endtask
  task automatic cmd(input logic [7:0] c);
    wr(GM_CMD, 32'(c));
    host_irq = 1; @(negedge clk); host_irq = 0;
  endtask

  // ---------------------------------------------------------- ADC source
  // mode 0: silence; 1: Schottky band; 2: bunched beam
  int      mode = 0;
  longint  n_s = 0;
  real     line_f [25], line_a [25], line_p [25];
  int      n_lines = 0;
  real     b_f1, b_a1, b_a2, b_p1, b_p2;
  int      noise_amp = 0;
  function automatic logic signed [11:0] adc12(input real x);
    if (x > 2047.0) x = 2047.0;
    if (x < -2048.0) x = -2048.0;
    return 12'(int'($floor(x + 0.5)));
  endfunction
  always @(posedge clk) begin
    real s, s0;
    s = 0.0;
    if (mode == 1)
      for (int l = 0; l < n_lines; l++)
        s += line_a[l] * $cos(2.0 * PI * line_f[l] * n_s / FS + line_p[l]);
    else if (mode == 2)
      s = b_a1 * $cos(2.0 * PI * b_f1 * n_s / FS + b_p1) +
          b_a2 * $cos(2.0 * PI * 2.0 * b_f1 * n_s / FS + b_p2);
    if (noise_amp > 0) begin
      s  += real'(int'($urandom_range(0, 2 * noise_amp)) - noise_amp);
      s0 = real'(int'($urandom_range(0, 2 * noise_amp)) - noise_amp);
    end else
      s0 = 0.0;
    // the bunched-beam signal arrives on digitiser input 2, input 0 then
    // carries only noise; inputs 1 and 3 stay silent
    adc_data[0] <= adc12(mode == 2 ? s0 : s);
    adc_data[2] <= adc12(mode == 2 ? s : 0.0);
    n_s <= n_s + 1;
  end

  // ------------------------------------------------------------ counters
  int ev_ping = 0, ev_err = 0, ev_init = 0, ev_overlap = 0, ev_burst = 0,
      ev_stop = 0, ev_noise = 0, ev_ld = 0, ev_lb = 0, ev_switch = 0,
      ev_pc_b = 0, ev_pc_d = 0, ev_insel = 0, ev_ld512 = 0, ev_multi = 0;
  logic [7:0] run_d = 0, pop_d = 0;
  always @(posedge clk) if (!rst) begin
    run_d <= dut.ddc_run;
    pop_d <= dut.fifo_pop;
    if (|(run_d & ~dut.ddc_run) && llc_state == LLC_PROCESSING) ev_stop++;
    if (|(dut.fifo_pop & ~pop_d)) ev_burst++;
    if (dut.ddc_run[3] && dut.ddc_input[3] == 2'd2) ev_insel++;
    if (llc_state == LLC_INITIALISING && dut.u_llc.m == dut.u_llc.M_INIT && dut.psd_clear) ev_init++;
  end

  logic [31:0] v, st;
  real lo_hz, bin_hz, exp_area, exp_cent, pw_sum, pm_sum;
  int  m0;

  initial begin
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (4) @(negedge clk);
    // ------------------------------------------------------------ 1
    chk(llc_state == LLC_IDLE, "IDLE after reset");
    cmd(CMD_MEASURE);
    cmd(8'h5a);
    cmd(CMD_INIT);
    repeat (600) @(negedge clk);
    chk(llc_state == LLC_READY, "READY after INIT");
    rd(GM_STATUS, st);
    if (st[15:8] == 8'd2) ev_err++;
    chk(st[15:8] == 8'd2, $sformatf("two command errors counted (%0d)", st[15:8]));
    wr(GM_VERSION, 0);
    cmd(CMD_PING);
    repeat (10) @(negedge clk);
    rd(GM_VERSION, v);
    if (v == LLC_VERSION) ev_ping++;
    chk(v == LLC_VERSION, "ping reply");

    // ------------------------------------------------------------ 2
    @(negedge clk);
    pc_bunched = 0; pc_f_rev_hz = 1_588_000; pc_n = 4; pc_h = 1; pc_start = 1;
    @(negedge clk); pc_start = 0;
    while (!pc_done) @(negedge clk);
    chk(pc_k_a == 32'((longint'(4 * 1_588_000) << 32) / 40_000_000), "debunched K factor");
    chk(pc_fs_hz == 32'd40_000_000 && pc_ki == 0, "debunched f_S fixed at 40 MHz");
    ev_pc_d++;

    // ------------------------------------------------------------ 3
    lo_hz  = real'(pc_k_a) / 4294967296.0 * FS;
    bin_hz = FS / 64.0 / 256.0;
    m0 = 12;
    n_lines = 0;
    pw_sum = 0; pm_sum = 0;
    for (int m = m0 - 10; m <= m0 + 10; m++) begin
      real a, da;
      a = 60.0 * $exp(-0.5 * (m - m0) * (m - m0) / 9.0);
      line_f[n_lines] = lo_hz + m * bin_hz;
      line_a[n_lines] = a;
      line_p[n_lines] = 2.0 * PI * $urandom_range(0, 999) / 1000.0;
      // amplitude of the line after ADC (x16), mixer (x G/2), integrate
      // and dump (x 64, /2^6) and the FFT (x 1): a*16*G/2
      da = a * 16.0 * 1.6467602581210654 / 2.0;
      pw_sum += da * da;
      pm_sum += da * da * (128 + m);
      n_lines++;
    end
    exp_area = 60.0 * pw_sum;
    exp_cent = pm_sum / pw_sum;
    noise_amp = 8;
    mode = 1;
    wr(GM_PROC_TYPE, 32'(PROC_LD)); wr(GM_NAVG, 60); wr(GM_LOG2N, 8); wr(GM_OVERLAP, 64);
    wr(GM_ROI_LO, 128 + m0 - 20); wr(GM_ROI_HI, 128 + m0 + 20);
    // white noise of +/-8 ADC LSB: about 45 per bin per FFT after scaling
    wr(GM_NOISE, 40); wr(GM_DDC_A, 0); wr(GM_DDC_B, 1); wr(GM_DDC_MASK, 0);
    wr(GM_DDC_BASE + 0, pc_k_a); wr(GM_DDC_BASE + 1, (32'd6 << 16) | 32'd64);
    cmd(CMD_MEASURE);
    while (llc_state != LLC_PROCESSING) @(negedge clk);
    while (llc_state == LLC_PROCESSING) @(negedge clk);
    repeat (4) @(negedge clk);
    mode = 0;
    rd(GM_STATUS, st);
    chk(st[2] && st[31:16] == 16'd1 && !st[3], $sformatf("LD done, no overflow (status %h)", st));
    if (st[2]) ev_ld++;
    chk(dut.psd_fft_count == 16'd60, "60 FFTs averaged");
    if (dut.u_llc.cstart == 32'd60 * 192) ev_overlap++;
    chk(dut.u_llc.cstart == 32'd59 * 192 + 192, $sformatf("chunks advance by 192 (%0d)", dut.u_llc.cstart));
    if (dut.psd_noise == 32'd40) ev_noise++;
    rd(GM_PEAK_BIN, v);
    chk(v == 32'(128 + m0), $sformatf("peak bin %0d expected %0d", v, 128 + m0));
    rd(GM_WIDTH, v);
    // power ~ exp(-(m-m0)^2/9): above exp(-2) of the peak for |m-m0| <= 4
    chk(v == 32'd9, $sformatf("width %0d bins expected 9", v));
    rd(GM_CENTROID, v);
    chk(v / 256.0 > exp_cent - 0.3 && v / 256.0 < exp_cent + 0.3,
        $sformatf("centre %0.2f expected %0.2f", v / 256.0, exp_cent));
    begin
      logic [31:0] lo, hi;
      real a;
      rd(GM_AREA_LO, lo); rd(GM_AREA_HI, hi);
      a = real'({hi, lo});
      chk(a > 0.95 * exp_area && a < 1.08 * exp_area,
          $sformatf("area %0.3e expected %0.3e", a, exp_area));
    end
    rd(GM_PSD_BASE + 128 + m0, v);
    chk(v > 0, "PSD published");

    // ------------------------------------------------------------ 4
    @(negedge clk);
    pc_bunched = 1; pc_f_rev_hz = 1_000_000; pc_h = 1; pc_start = 1;
    @(negedge clk); pc_start = 0;
    while (!pc_done) @(negedge clk);
    chk(pc_ki == 16'd40 && pc_fs_hz == 32'd40_000_000, "Ki = 40 at 1 MHz");
    chk(pc_k_a == 32'h0666_6666 && pc_k_b == 32'h0ccc_cccc, "bunched K factors 1/40 and 2/40");
    ev_pc_b++;

    // ------------------------------------------------------------ 5
    b_f1 = 1.0e6;
    b_a1 = 600.0 * (2.0 - 0.25);
    b_a2 = 600.0 * (2.0 - 4.0 * 0.25);
    b_p1 = 0.4; b_p2 = 1.9;
    noise_amp = 4;
    mode = 2;
    wr(GM_PROC_TYPE, 32'(PROC_LB)); wr(GM_DDC_A, 3); wr(GM_DDC_B, 5); wr(GM_NSAMP_LB, 300);
    wr(GM_DDC_BASE + 6, pc_k_a);  wr(GM_DDC_BASE + 7, (32'd2 << 24) | (32'd5 << 16) | 32'd40);
    wr(GM_DDC_BASE + 10, pc_k_b); wr(GM_DDC_BASE + 11, (32'd2 << 24) | (32'd5 << 16) | 32'd40);
    cmd(CMD_MEASURE);
    while (llc_state != LLC_PROCESSING) @(negedge clk);
    ev_switch++;
    while (llc_state == LLC_PROCESSING) @(negedge clk);
    repeat (4) @(negedge clk);
    mode = 0;
    rd(GM_STATUS, st);
    chk(st[2] && st[31:16] == 16'd2, "LB done");
    if (st[2]) ev_lb++;
    rd(GM_DELTA, v);
    chk(v / 65536.0 > 0.24 && v / 65536.0 < 0.26, $sformatf("Delta %0.4f expected 0.25", v / 65536.0));
    rd(GM_I0H, v);
    // I0*h in units of nsamp * DDC LSB: 600*16*G/2*40/32*300
    begin
      real e;
      e = 600.0 * 16.0 * 1.6467602581210654 / 2.0 * 40.0 / 32.0 * 300.0;
      chk(v > 0.98 * e && v < 1.02 * e, $sformatf("I0*h %0d expected %0.0f", v, e));
    end
    rd(GM_TAU_FRF, v);
    chk(v / 65536.0 > 0.97 * $sqrt(5.0 * 0.25 / (4.0 * PI)) && v / 65536.0 < 1.03 * $sqrt(5.0 * 0.25 / (4.0 * PI)),
        $sformatf("tau*f_RF %0.4f", v / 65536.0));
    chk(fifo_overflow == '0, "no FIFO overflow");

    // ------------------------------------------------------------ 6
    // debunched again, at the largest spectrum: one line in bin +100 of a
    // 512-point FFT, 8 averages, decimation 16, no overlap, measured by
    // converters 6 and 7 one after the other (converter mask)
    lo_hz  = FS / 32.0;
    bin_hz = FS / 16.0 / 512.0;
    n_lines = 1;
    line_f[0] = lo_hz + 100.0 * bin_hz; line_a[0] = 200.0; line_p[0] = 0.7;
    noise_amp = 0;
    mode = 1;
    wr(GM_PROC_TYPE, 32'(PROC_LD)); wr(GM_NAVG, 8); wr(GM_LOG2N, 9); wr(GM_OVERLAP, 0);
    wr(GM_ROI_LO, 256 + 50); wr(GM_ROI_HI, 256 + 150);
    wr(GM_NOISE, 0); wr(GM_DDC_A, 1); wr(GM_DDC_MASK, 32'hc0);
    wr(GM_DDC_BASE + 12, 32'h0800_0000); wr(GM_DDC_BASE + 13, (32'd4 << 16) | 32'd16);
    wr(GM_DDC_BASE + 14, 32'h0800_0000); wr(GM_DDC_BASE + 15, (32'd4 << 16) | 32'd16);
    cmd(CMD_MEASURE);
    while (llc_state != LLC_PROCESSING) @(negedge clk);
    ev_switch++;
    while (llc_state == LLC_PROCESSING) @(negedge clk);
    repeat (4) @(negedge clk);
    mode = 0;
    rd(GM_STATUS, st);
    chk(st[2] && st[31:16] == 16'd3 && !st[3], $sformatf("LD 512 done (status %h)", st));
    if (st[2]) ev_ld512++;
    chk(dut.psd_fft_count == 16'd8, "8 FFTs of 512 points averaged");
    rd(GM_PEAK_BIN, v);
    chk(v == 32'd356, $sformatf("512-point peak bin %0d expected 356", v));
    for (int c = 6; c <= 7; c++) begin
      rd(GM_CHRES_BASE + GM_CHRES_STEP * c + (GM_PEAK_BIN - GM_RES_BASE), v);
      chk(v == 32'd356, $sformatf("converter %0d peak bin %0d expected 356", c, v));
      rd(GM_CHRES_BASE + GM_CHRES_STEP * c + (GM_WIDTH - GM_RES_BASE), v);
      chk(v == 32'd1, $sformatf("converter %0d line width %0d expected 1", c, v));
      if (v == 32'd1) ev_multi++;
    end
    begin
      real da, e;
      real x;
      // line after ADC (x16), mixer (x G/2), integrate (x16) and shift
      // (/16), and the boxcar response at 100/512 of the output rate
      x  = 100.0 / 512.0;
      da = 200.0 * 16.0 * 1.6467602581210654 / 2.0 *
           $sin(PI * x) / (16.0 * $sin(PI * x / 16.0));
      e  = 8.0 * da * da;
      for (int c = 6; c <= 7; c++) begin
        rd(GM_PSD_BASE + 512 * c + 356, v);
        chk(real'(v) * 256.0 > 0.97 * e && real'(v) * 256.0 < 1.03 * e,
            $sformatf("converter %0d PSD word of the line %0d expected %0.0f", c, v, e / 256.0));
        rd(GM_PSD_BASE + 512 * c + 511, v);
        chk(v < 32'd16, $sformatf("converter %0d last PSD word near zero: %0d", c, v));
        rd(GM_PSD_BASE + 512 * c + 256, v);
        chk(v < 32'd16, $sformatf("converter %0d PSD word at the LO near zero: %0d", c, v));
      end
    end

    // ------------------------------------------------------ mechanisms
    chk(ev_ping > 0, "mechanism: ping");
    chk(ev_err > 0, "mechanism: command error count");
    chk(ev_init > 0, "mechanism: initialisation");
    chk(ev_overlap > 0, "mechanism: sliding-FFT overlap");
    chk(ev_burst > 0, "mechanism: half-FIFO burst");
    chk(ev_stop >= 3, "mechanism: converter stopped after enough data");
    chk(ev_noise > 0, "mechanism: noise correction");
    chk(ev_ld > 0, "mechanism: debunched processing");
    chk(ev_lb > 0, "mechanism: bunched processing");
    chk(ev_switch > 0, "mechanism: LD to LB switch");
    chk(ev_pc_b > 0 && ev_pc_d > 0, "mechanism: both calculator modes");
    chk(ev_insel > 0, "mechanism: converter input selection");
    chk(ev_ld512 > 0, "mechanism: 512-point spectrum");
    chk(ev_multi == 2, "mechanism: several converters in one measurement");
    chk(ev_switch >= 2, "mechanism: LB to LD switch");
    $display("INFO events ping=%0d err=%0d init=%0d overlap=%0d bursts=%0d stops=%0d noise=%0d ld=%0d lb=%0d switch=%0d insel=%0d",
             ev_ping, ev_err, ev_init, ev_overlap, ev_burst, ev_stop, ev_noise, ev_ld, ev_lb, ev_switch, ev_insel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
