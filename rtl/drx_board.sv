// drx_board: digital receiver for beam-transformer signals, top level.
//
// Signal path: each of the NUM_INPUTS (up to four) 12-bit digitiser words
// enters on the 12 most significant bits of a 16-bit receiver input, and
// every one of the NUM_DDC digital down converters takes the input chosen
// by bits 25:24 of its set-up word (input 0 if out of range). Each
// converter, when released by the controller, mixes its frequency window
// to DC, decimates and writes complex samples into its
// own FIFO. The controller (llc_controller) empties the FIFOs in bursts
// when they are half full and, depending on the processing type written by
// the host:
//   debunched beam (LD) - slices the stream of one converter into
//     overlapping chunks, runs each through the FFT, accumulates |X|^2 into
//     a PSD, then finds the area, width and centre of the Schottky band in
//     the region of interest;
//   bunched beam (LB)   - averages two converters tuned to f_RF and 2 f_RF
//     and fits I0*h, Delta and tau*f_RF.
// The host sees only the global memory (port host_*) plus an interrupt
// line (host_irq, host to board) and meas_done (board to host); command
// and memory layout are in drx_pkg and llc_controller.
// Beside it, drx_param_calc computes from f_REV the ADC clock harmonic Ki
// and the DDC K factors, for the host to write into the set-up words and
// to the clock generator. Everything runs on the ADC sample clock `clk`,
// one ADC word per clock; rst is synchronous and active high.
// The partition into converters, FIFOs, processor and global memory, and
// the four digitiser inputs, follow the system description; the single clock domain, the host bus
// and the hardware processing blocks are this design's choices.
module drx_board
  import drx_pkg::*;
#(
  parameter int unsigned NUM_DDC    = 8,
  parameter int unsigned NUM_INPUTS = 4,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MAX_LOG2N  = 9,
  parameter int unsigned GM_DEPTH   = 8192
) (
  input  logic                          clk,
  input  logic                          rst,
  // ADC
  input  logic signed [ADC_W-1:0]       adc_data [NUM_INPUTS],
  // host bus
  input  logic                          host_we,
  input  logic [$clog2(GM_DEPTH)-1:0]   host_addr,
  input  logic [GM_W-1:0]               host_wdata,
  output logic [GM_W-1:0]               host_rdata,
  input  logic                          host_irq,
  output logic                          meas_done,
  output llc_state_t                    llc_state,
  output logic [NUM_DDC-1:0]            fifo_overflow,
  // set-up calculator
  input  logic                          pc_start,
  input  logic                          pc_bunched,
  input  logic [31:0]                   pc_f_rev_hz,
  input  logic [7:0]                    pc_h,
  input  logic [7:0]                    pc_n,
  output logic                          pc_busy,
  output logic                          pc_done,
  output logic [15:0]                   pc_ki,
  output logic [31:0]                   pc_fs_hz,
  output logic [31:0]                   pc_k_a,
  output logic [31:0]                   pc_k_b
);

  localparam int unsigned ACC_W = 40;

  initial assert (NUM_INPUTS >= 1 && NUM_INPUTS <= 4)
    else $error("drx_board: NUM_INPUTS must be 1 to 4");
  localparam int unsigned GAW   = $clog2(GM_DEPTH);
  localparam int unsigned CW    = $clog2(FIFO_DEPTH) + 1;

  // each ADC word drives the 12 MSBs of a 16-bit receiver input
  logic signed [DRX_W-1:0] adc_in [4];
  for (genvar i = 0; i < 4; i++) begin : g_in
    assign adc_in[i] = (i < NUM_INPUTS) ? {adc_data[i < NUM_INPUTS ? i : 0], {(DRX_W-ADC_W){1'b0}}} : '0;
  end

  // ------------------------------------------------------ global memory
  logic            gm_we;
  logic [GAW-1:0]  gm_addr;
  logic [GM_W-1:0] gm_wdata, gm_rdata;

  global_memory #(.DEPTH(GM_DEPTH), .W(GM_W)) u_gm (
    .clk(clk),
    .a_we(host_we), .a_addr(host_addr), .a_wdata(host_wdata), .a_rdata(host_rdata),
    .b_we(gm_we), .b_addr(gm_addr), .b_wdata(gm_wdata), .b_rdata(gm_rdata)
  );

  // ------------------------------------------------ converters and FIFOs
  logic [NUM_DDC-1:0]   ddc_run, ddc_ov, fifo_pop, fifo_rv;
  logic [PHASE_W-1:0]   ddc_phase_inc [NUM_DDC];
  logic [15:0]          ddc_decim     [NUM_DDC];
  logic [4:0]           ddc_shift     [NUM_DDC];
  logic [1:0]           ddc_input     [NUM_DDC];
  iq_t                  ddc_out       [NUM_DDC];
  logic [CW-1:0]        fifo_count    [NUM_DDC];
  iq_t                  fifo_rd_data  [NUM_DDC];

  for (genvar d = 0; d < NUM_DDC; d++) begin : g_ch
    logic hf, fl, em;
    logic signed [DRX_W-1:0] drx_in;
    // digitiser input chosen by the set-up word; out-of-range selects input 0
    assign drx_in = adc_in[(32'(ddc_input[d]) < NUM_INPUTS) ? ddc_input[d] : 2'd0];
    ddc u_ddc (
      .clk(clk), .rst(rst), .run(ddc_run[d]), .in_valid(1'b1), .in_sample(drx_in),
      .phase_inc(ddc_phase_inc[d]), .decim(ddc_decim[d]), .shift(ddc_shift[d]),
      .out_valid(ddc_ov[d]), .out_iq(ddc_out[d])
    );
    sample_fifo #(.WIDTH(2*IQ_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk(clk), .rst(rst), .flush(!ddc_run[d]),
      .push(ddc_ov[d]), .wr_data(ddc_out[d]),
      .pop(fifo_pop[d]), .rd_data(fifo_rd_data[d]), .rd_valid(fifo_rv[d]),
      .count(fifo_count[d]), .half_full(hf), .full(fl), .empty(em),
      .overflow(fifo_overflow[d])
    );
  end

  // ----------------------------------------------------------- FFT, PSD
  logic [3:0]           fft_log2n;
  logic                 fft_in_valid, fft_in_ready, fft_out_valid, fft_out_last, fft_busy;
  iq_t                  fft_in_data, fft_out_data;
  logic [MAX_LOG2N-1:0] fft_out_index;

  fft_engine #(.MAX_LOG2N(MAX_LOG2N)) u_fft (
    .clk(clk), .rst(rst), .log2n(fft_log2n),
    .in_valid(fft_in_valid), .in_data(fft_in_data), .in_ready(fft_in_ready),
    .out_valid(fft_out_valid), .out_data(fft_out_data), .out_index(fft_out_index),
    .out_last(fft_out_last), .busy(fft_busy)
  );

  logic                 psd_clear, psd_clearing;
  logic [31:0]          psd_noise;
  logic [15:0]          psd_fft_count;
  logic [MAX_LOG2N-1:0] psd_rd_addr;
  logic [ACC_W-1:0]     psd_rd_data;

  psd_accumulator #(.MAX_LOG2N(MAX_LOG2N), .ACC_W(ACC_W)) u_psd (
    .clk(clk), .rst(rst), .clear(psd_clear), .log2n(fft_log2n), .noise(psd_noise),
    .clearing(psd_clearing), .in_valid(fft_out_valid), .in_data(fft_out_data),
    .in_index(fft_out_index), .in_last(fft_out_last), .fft_count(psd_fft_count),
    .rd_addr(psd_rd_addr), .rd_data(psd_rd_data)
  );

  logic                 ana_start, ana_busy, ana_done;
  logic [MAX_LOG2N-1:0] ana_roi_lo, ana_roi_hi, ana_rd_addr, ana_peak_bin;
  logic [63:0]          ana_area;
  logic [ACC_W-1:0]     ana_peak_val;
  logic [MAX_LOG2N:0]   ana_width;
  logic [MAX_LOG2N+7:0] ana_centroid;

  psd_peak_analyzer #(.MAX_LOG2N(MAX_LOG2N), .ACC_W(ACC_W)) u_ana (
    .clk(clk), .rst(rst), .start(ana_start), .roi_lo(ana_roi_lo), .roi_hi(ana_roi_hi),
    .rd_addr(ana_rd_addr), .rd_data(psd_rd_data), .busy(ana_busy), .done(ana_done),
    .area(ana_area), .peak_bin(ana_peak_bin), .peak_val(ana_peak_val),
    .width(ana_width), .centroid(ana_centroid)
  );

  // ------------------------------------------------------- bunched beam
  logic        bun_clear, bun_a_valid, bun_b_valid, bun_have_all, bun_start;
  logic        bun_busy, bun_done;
  logic [15:0] bun_nsamp;
  iq_t         bun_a_data, bun_b_data;
  logic [31:0] bun_j1, bun_j2, bun_i0h, bun_delta, bun_tau;

  bunched_amplitude #(.ACC_W(ACC_W)) u_bun (
    .clk(clk), .rst(rst), .clear(bun_clear), .nsamp(bun_nsamp),
    .a_valid(bun_a_valid), .a_data(bun_a_data), .b_valid(bun_b_valid), .b_data(bun_b_data),
    .have_all(bun_have_all), .start(bun_start), .busy(bun_busy), .done(bun_done),
    .j1(bun_j1), .j2(bun_j2), .i0h(bun_i0h), .delta_q16(bun_delta), .tau_frf_q16(bun_tau)
  );

  // --------------------------------------------------------- controller
  llc_controller #(
    .NUM_DDC(NUM_DDC), .FIFO_DEPTH(FIFO_DEPTH), .MAX_LOG2N(MAX_LOG2N),
    .GM_DEPTH(GM_DEPTH), .ACC_W(ACC_W)
  ) u_llc (
    .clk(clk), .rst(rst),
    .host_irq(host_irq), .meas_done(meas_done), .llc_state(llc_state),
    .gm_we(gm_we), .gm_addr(gm_addr), .gm_wdata(gm_wdata), .gm_rdata(gm_rdata),
    .ddc_run(ddc_run), .ddc_phase_inc(ddc_phase_inc), .ddc_decim(ddc_decim),
    .ddc_shift(ddc_shift), .ddc_input(ddc_input),
    .fifo_pop(fifo_pop), .fifo_count(fifo_count), .fifo_rd_data(fifo_rd_data),
    .fifo_rd_valid(fifo_rv), .fifo_overflow(fifo_overflow),
    .fft_log2n(fft_log2n), .fft_in_valid(fft_in_valid), .fft_in_data(fft_in_data),
    .fft_in_ready(fft_in_ready),
    .psd_clear(psd_clear), .psd_clearing(psd_clearing), .psd_noise(psd_noise),
    .psd_fft_count(psd_fft_count), .psd_rd_addr(psd_rd_addr), .psd_rd_data(psd_rd_data),
    .ana_start(ana_start), .ana_roi_lo(ana_roi_lo), .ana_roi_hi(ana_roi_hi),
    .ana_rd_addr(ana_rd_addr), .ana_done(ana_done), .ana_area(ana_area),
    .ana_peak_bin(ana_peak_bin), .ana_peak_val(ana_peak_val), .ana_width(ana_width),
    .ana_centroid(ana_centroid),
    .bun_clear(bun_clear), .bun_nsamp(bun_nsamp), .bun_a_valid(bun_a_valid),
    .bun_a_data(bun_a_data), .bun_b_valid(bun_b_valid), .bun_b_data(bun_b_data),
    .bun_have_all(bun_have_all), .bun_start(bun_start), .bun_done(bun_done),
    .bun_j1(bun_j1), .bun_j2(bun_j2), .bun_i0h(bun_i0h), .bun_delta(bun_delta),
    .bun_tau(bun_tau)
  );

  // ---------------------------------------------------- set-up calculator
  drx_param_calc u_pc (
    .clk(clk), .rst(rst), .start(pc_start), .bunched(pc_bunched),
    .f_rev_hz(pc_f_rev_hz), .h(pc_h), .n(pc_n), .busy(pc_busy), .done(pc_done),
    .ki(pc_ki), .fs_hz(pc_fs_hz), .k_a(pc_k_a), .k_b(pc_k_b)
  );

endmodule
