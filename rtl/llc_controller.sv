// llc_controller: measurement controller of the digital receiver board.
//
// It plays the part of the on-board processor program: it serves the host
// through the global memory and runs one measurement per host request.
// Board states (llc_state): IDLE -> INITIALISING -> READY -> PROCESSING ->
// READY. The host writes a command code to GM_CMD and pulses host_irq:
//   CMD_INIT    - from IDLE or READY: stop all converters, clear the PSD,
//                 write GM_STATUS, enter READY;
//   CMD_PING    - in any state: write LLC_VERSION to GM_VERSION;
//   CMD_MEASURE - from READY: one measurement, steps 1 to 8 below.
// Unknown or ill-timed commands only increment the error count.
// A measurement:
//   1 copy the control parameters and per-DDC set-up words from global
//     memory into local registers;
//   2 set up and release the requested DDCs (ddc_run), which start filling
//     their FIFOs; each set-up is a phase increment and a word
//     {input[25:24], shift[20:16], decim[15:0]} choosing the digitiser input;
//   3 whenever a FIFO of a requested DDC holds a burst (half the FIFO, or
//     the smaller remainder still needed), pop the burst into local memory;
//   4 hold a DDC in reset (and flush its FIFO) as soon as all the samples
//     it must deliver have been taken;
//   5 debunched (LD): copy each chunk of N = 2^log2n samples from the
//     local ring memory into the FFT as soon as it is complete; chunk k
//     starts at sample k*(N - overlap) (sliding FFT with overlap), NAVG
//     chunks in all, accumulated into the PSD. Bunched (LB): samples of the
//     two DDCs go to the coherent averager instead;
//   6 final processing: peak analysis of the PSD over the FFT ROI (LD) or
//     amplitude fit (LB);
//   7 write the results to global memory, both to the common result
//     block and to the converter's own block, and for LD the N-bin PSD to
//     the converter's PSD region. An LD measurement with a non-zero
//     converter mask repeats steps 2-7 for each converter of the mask in
//     turn, lowest first;
//   8 write GM_STATUS with the done bit and the measurement count, pulse
//     meas_done and return to READY.
// GM_STATUS = {count[31:16], errors[15:8], 4'b0, overflow[3], done[2],
// state[1:0]}. The local ring memory holds 2*2^MAX_LOG2N samples, so a
// chunk waits there while the FFT works on the previous one.
// The states, the ping and steps 1-8 follow the system description; the
// command codes, memory layout, burst rule and ring memory are this design's
// choices.
module llc_controller
  import drx_pkg::*;
#(
  parameter int unsigned NUM_DDC    = 8,
  parameter int unsigned FIFO_DEPTH = 512,
  parameter int unsigned MAX_LOG2N  = 9,
  parameter int unsigned GM_DEPTH   = 8192,
  parameter int unsigned ACC_W      = 40
) (
  input  logic                          clk,
  input  logic                          rst,
  // host side
  input  logic                          host_irq,
  output logic                          meas_done,
  output llc_state_t                    llc_state,
  // global memory, controller port
  output logic                          gm_we,
  output logic [$clog2(GM_DEPTH)-1:0]   gm_addr,
  output logic [GM_W-1:0]               gm_wdata,
  input  logic [GM_W-1:0]               gm_rdata,
  // down converters
  output logic [NUM_DDC-1:0]            ddc_run,
  output logic [PHASE_W-1:0]            ddc_phase_inc [NUM_DDC],
  output logic [15:0]                   ddc_decim     [NUM_DDC],
  output logic [4:0]                    ddc_shift     [NUM_DDC],
  output logic [1:0]                    ddc_input     [NUM_DDC],
  // FIFOs
  output logic [NUM_DDC-1:0]            fifo_pop,
  input  logic [$clog2(FIFO_DEPTH):0]   fifo_count    [NUM_DDC],
  input  iq_t                           fifo_rd_data  [NUM_DDC],
  input  logic [NUM_DDC-1:0]            fifo_rd_valid,
  input  logic [NUM_DDC-1:0]            fifo_overflow,
  // FFT
  output logic [3:0]                    fft_log2n,
  output logic                          fft_in_valid,
  output iq_t                           fft_in_data,
  input  logic                          fft_in_ready,
  // PSD
  output logic                          psd_clear,
  input  logic                          psd_clearing,
  output logic [31:0]                   psd_noise,
  input  logic [15:0]                   psd_fft_count,
  output logic [MAX_LOG2N-1:0]          psd_rd_addr,
  input  logic [ACC_W-1:0]              psd_rd_data,
  // peak analyser
  output logic                          ana_start,
  output logic [MAX_LOG2N-1:0]          ana_roi_lo,
  output logic [MAX_LOG2N-1:0]          ana_roi_hi,
  input  logic [MAX_LOG2N-1:0]          ana_rd_addr,
  input  logic                          ana_done,
  input  logic [63:0]                   ana_area,
  input  logic [MAX_LOG2N-1:0]          ana_peak_bin,
  input  logic [ACC_W-1:0]              ana_peak_val,
  input  logic [MAX_LOG2N:0]            ana_width,
  input  logic [MAX_LOG2N+7:0]          ana_centroid,
  // bunched-beam amplitudes
  output logic                          bun_clear,
  output logic [15:0]                   bun_nsamp,
  output logic                          bun_a_valid,
  output iq_t                           bun_a_data,
  output logic                          bun_b_valid,
  output iq_t                           bun_b_data,
  input  logic                          bun_have_all,
  output logic                          bun_start,
  input  logic                          bun_done,
  input  logic [31:0]                   bun_j1,
  input  logic [31:0]                   bun_j2,
  input  logic [31:0]                   bun_i0h,
  input  logic [31:0]                   bun_delta,
  input  logic [31:0]                   bun_tau
);

  localparam int unsigned GAW   = $clog2(GM_DEPTH);
  localparam int unsigned DW    = $clog2(NUM_DDC);
  localparam int unsigned HALF  = FIFO_DEPTH / 2;
  localparam int unsigned MAXN  = 1 << MAX_LOG2N;
  localparam int unsigned RING  = 2 * MAXN;
  localparam int unsigned RW    = $clog2(RING);
  localparam int unsigned NLOAD = GM_NUM_PAR + 2 * NUM_DDC;

  initial assert (GM_DEPTH >= GM_PSD_BASE + (NUM_DDC << MAX_LOG2N))
    else $error("llc_controller: global memory too small for the PSD regions");

  // ------------------------------------------------------ local parameters
  typedef struct packed {
    proc_type_t          proc_type;
    logic [15:0]         navg;
    logic [3:0]          log2n;
    logic [15:0]         overlap;
    logic [MAX_LOG2N-1:0] roi_lo;
    logic [MAX_LOG2N-1:0] roi_hi;
    logic [31:0]         noise;
    logic [DW-1:0]       ddc_a;
    logic [DW-1:0]       ddc_b;
    logic [15:0]         nsamp;
    logic [NUM_DDC-1:0]  ddc_mask;
  } ctrl_t;

  ctrl_t cp;
  logic [PHASE_W-1:0] ph_r  [NUM_DDC];
  logic [25:0]        dec_r [NUM_DDC];

  for (genvar d = 0; d < NUM_DDC; d++) begin : g_ddc_out
    assign ddc_phase_inc[d] = ph_r[d];
    assign ddc_decim[d]     = dec_r[d][15:0];
    assign ddc_shift[d]     = dec_r[d][20:16];
    assign ddc_input[d]     = dec_r[d][25:24];
  end

  assign fft_log2n  = cp.log2n;
  assign psd_noise  = cp.noise;
  assign ana_roi_lo = cp.roi_lo;
  assign ana_roi_hi = cp.roi_hi;
  assign bun_nsamp  = cp.nsamp;

  // ------------------------------------------------------- main sequencer
  typedef enum logic [3:0] {
    M_IDLE, M_INIT, M_INIT_WR, M_READY, M_LOAD, M_SETUP, M_ACQ,
    M_FINAL, M_FINAL_WAIT, M_PUBLISH, M_PUB_PSD, M_COMPLETE
  } mstate_t;
  mstate_t m;

  logic main_bus;     // main sequencer owns the memory port this clock
  assign main_bus = (m == M_INIT_WR) || (m == M_LOAD) || (m == M_PUBLISH) ||
                    (m == M_PUB_PSD) || (m == M_COMPLETE);

  // ------------------------------------------------------ command handler
  typedef enum logic [1:0] {C_IDLE, C_READ, C_DECODE, C_PING} cstate_t;
  cstate_t c;
  logic    irq_pending, cmd_init, cmd_measure;
  logic [7:0]  errors;
  logic [15:0] meas_count;
  logic        done_flag, ovf_seen;

  // memory port requests of the two sequencers
  logic            m_we;  logic [GAW-1:0] m_addr;  logic [GM_W-1:0] m_wdata;
  logic            c_we;  logic [GAW-1:0] c_addr;

  assign gm_we    = main_bus ? m_we    : c_we;
  assign gm_addr  = main_bus ? m_addr  : c_addr;
  assign gm_wdata = main_bus ? m_wdata : LLC_VERSION;

  always_comb begin
    c_we   = 1'b0;
    c_addr = GAW'(GM_CMD);
    if (c == C_PING) begin
      c_we   = 1'b1;
      c_addr = GAW'(GM_VERSION);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      c           <= C_IDLE;
      irq_pending <= 1'b0;
      cmd_init    <= 1'b0;
      cmd_measure <= 1'b0;
    end else begin
      cmd_init    <= 1'b0;
      cmd_measure <= 1'b0;
      if (host_irq) irq_pending <= 1'b1;
      unique case (c)
        C_IDLE: if (irq_pending || host_irq) c <= C_READ;
        C_READ: if (!main_bus) begin
          irq_pending <= host_irq;
          c           <= C_DECODE;
        end
        C_DECODE: begin
          c <= C_IDLE;
          unique case (gm_rdata[7:0])
            CMD_PING:    c <= C_PING;
            CMD_INIT:    cmd_init <= 1'b1;
            CMD_MEASURE: cmd_measure <= 1'b1;
            default: ;
          endcase
        end
        C_PING: if (!main_bus) c <= C_IDLE;
        default: c <= C_IDLE;
      endcase
    end
  end

  logic bad_cmd;
  assign bad_cmd = (c == C_DECODE) &&
                   !(gm_rdata[7:0] inside {CMD_PING, CMD_INIT, CMD_MEASURE});

  // ------------------------------------------------ acquisition datapath
  iq_t             ring [RING];
  logic [31:0]     wr_total;     // samples written into the ring
  logic [31:0]     cstart;       // first sample of the next chunk
  logic [15:0]     chunks_sent;
  logic [31:0]     remain_a, remain_b;
  logic [31:0]     advance, n_cur;
  logic            copying;
  logic [MAX_LOG2N:0] cp_idx;

  typedef enum logic [1:0] {D_IDLE, D_BURST, D_TAIL} dstate_t;
  dstate_t         dr;
  logic            dr_b;         // burst from DDC B (LB only)
  logic [31:0]     dr_len;
  logic            is_ld, is_lb;

  assign is_ld   = (cp.proc_type == PROC_LD);
  assign is_lb   = (cp.proc_type == PROC_LB);
  assign n_cur   = 32'd1 << cp.log2n;
  assign advance = (32'(cp.overlap) >= n_cur) ? 32'd1 : n_cur - 32'(cp.overlap);

  // burst sizes the FIFOs of A and B can deliver now
  logic [31:0] space, want_a, want_b, cnt_a, cnt_b;
  assign space  = cstart + 32'(RING) - wr_total;
  assign cnt_a  = 32'(fifo_count[cp.ddc_a]);
  assign cnt_b  = 32'(fifo_count[cp.ddc_b]);
  always_comb begin
    want_a = (remain_a < 32'(HALF)) ? remain_a : 32'(HALF);
    if (is_ld && space < want_a) want_a = space;
    want_b = (remain_b < 32'(HALF)) ? remain_b : 32'(HALF);
  end

  logic start_a, start_b;
  assign start_a = (m == M_ACQ) && (dr == D_IDLE) && remain_a != 0 &&
                   want_a != 0 && cnt_a >= want_a;
  assign start_b = (m == M_ACQ) && (dr == D_IDLE) && !start_a && is_lb &&
                   remain_b != 0 && cnt_b >= want_b;

  always_comb begin
    fifo_pop = '0;
    if (dr == D_BURST) begin
      if (dr_b) fifo_pop[cp.ddc_b] = 1'b1;
      else      fifo_pop[cp.ddc_a] = 1'b1;
    end
  end

  // returned FIFO words
  logic rv_a, rv_b;
  assign rv_a = fifo_rd_valid[cp.ddc_a] && (m == M_ACQ) && !(dr_b && is_lb);
  assign rv_b = fifo_rd_valid[cp.ddc_b] && (m == M_ACQ) && dr_b && is_lb;

  assign bun_a_valid = rv_a && is_lb;
  assign bun_a_data  = fifo_rd_data[cp.ddc_a];
  assign bun_b_valid = rv_b;
  assign bun_b_data  = fifo_rd_data[cp.ddc_b];

  always_ff @(posedge clk) begin
    if (rv_a && is_ld) ring[wr_total[RW-1:0]] <= fifo_rd_data[cp.ddc_a];
  end

  // chunk copy into the FFT
  logic chunk_ready;
  assign chunk_ready = (m == M_ACQ) && is_ld && !copying && fft_in_ready &&
                       chunks_sent != cp.navg && wr_total >= cstart + n_cur;
  assign fft_in_valid = copying;
  assign fft_in_data  = ring[RW'(cstart + 32'(cp_idx))];

  // ------------------------------------------------------ main sequencer
  logic [$clog2(NLOAD+1)-1:0] ld_i;
  logic                       ld_cap;
  logic [$clog2(NLOAD+1)-1:0] ld_i_d;
  logic [4:0]                 pub_i;
  logic [NUM_DDC-1:0]         ch_left;   // LD converters still to process
  logic [MAX_LOG2N:0]         psd_i;
  logic                       psd_cap;
  logic [MAX_LOG2N-1:0]       psd_i_d;

  assign psd_rd_addr = (m == M_PUB_PSD) ? psd_i[MAX_LOG2N-1:0] : ana_rd_addr;

  logic [31:0] status_word;
  assign status_word = {meas_count, errors, 4'b0, ovf_seen, done_flag, llc_state};

  function automatic logic [DW-1:0] first_ch(input logic [NUM_DDC-1:0] mask);
    first_ch = '0;
    for (int i = int'(NUM_DDC) - 1; i >= 0; i--)
      if (mask[i]) first_ch = DW'(i);
  endfunction

  function automatic logic [31:0] sat_psd(input logic [ACC_W-1:0] v);
    logic [ACC_W-1:0] s;
    s = v >> PSD_SHIFT;
    return (s > ACC_W'(32'hffff_ffff)) ? 32'hffff_ffff : s[31:0];
  endfunction

  // result word pub_i
  always_comb begin
    unique case (pub_i[3:0])
      4'd0:    m_wdata = ana_area[31:0];
      4'd1:    m_wdata = ana_area[63:32];
      4'd2:    m_wdata = 32'(ana_width);
      4'd3:    m_wdata = 32'(ana_centroid);
      4'd4:    m_wdata = 32'(ana_peak_bin);
      4'd5:    m_wdata = sat_psd(ana_peak_val);
      4'd6:    m_wdata = bun_j1;
      4'd7:    m_wdata = bun_j2;
      4'd8:    m_wdata = bun_i0h;
      4'd9:    m_wdata = bun_delta;
      default: m_wdata = bun_tau;
    endcase
    m_we   = 1'b0;
    m_addr = '0;
    unique case (m)
      M_INIT_WR, M_COMPLETE: begin
        m_we    = 1'b1;
        m_addr  = GAW'(GM_STATUS);
        m_wdata = status_word;
      end
      M_LOAD: begin
        m_addr = (ld_i < ($clog2(NLOAD+1))'(GM_NUM_PAR)) ?
                 GAW'(GM_PAR_BASE + 32'(ld_i)) :
                 GAW'(GM_DDC_BASE + 32'(ld_i) - GM_NUM_PAR);
      end
      M_PUBLISH: begin
        m_we   = 1'b1;
        m_addr = pub_i[4] ? GAW'(GM_CHRES_BASE + GM_CHRES_STEP * 32'(cp.ddc_a) + 32'(pub_i[3:0]))
                          : GAW'(GM_RES_BASE + 32'(pub_i[3:0]));
      end
      M_PUB_PSD: begin
        m_we    = psd_cap;
        m_addr  = GAW'(GM_PSD_BASE + (32'(cp.ddc_a) << MAX_LOG2N) + 32'(psd_i_d));
        m_wdata = sat_psd(psd_rd_data);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m             <= M_IDLE;
      llc_state     <= LLC_IDLE;
      cp            <= '0;
      ddc_run       <= '0;
      psd_clear     <= 1'b0;
      bun_clear     <= 1'b0;
      ana_start     <= 1'b0;
      bun_start     <= 1'b0;
      meas_done     <= 1'b0;
      errors        <= '0;
      meas_count    <= '0;
      done_flag     <= 1'b0;
      ovf_seen      <= 1'b0;
      ld_i          <= '0;
      ld_i_d        <= '0;
      ld_cap        <= 1'b0;
      pub_i         <= '0;
      ch_left       <= '0;
      psd_i         <= '0;
      psd_i_d       <= '0;
      psd_cap       <= 1'b0;
      wr_total      <= '0;
      cstart        <= '0;
      chunks_sent   <= '0;
      remain_a      <= '0;
      remain_b      <= '0;
      copying       <= 1'b0;
      cp_idx        <= '0;
      dr            <= D_IDLE;
      dr_b          <= 1'b0;
      dr_len        <= '0;
      for (int d = 0; d < int'(NUM_DDC); d++) begin
        ph_r[d]  <= '0;
        dec_r[d] <= '0;
      end
    end else begin
      psd_clear <= 1'b0;
      bun_clear <= 1'b0;
      ana_start <= 1'b0;
      bun_start <= 1'b0;
      meas_done <= 1'b0;
      if (bad_cmd || (cmd_init && !(m inside {M_IDLE, M_READY})) ||
          (cmd_measure && m != M_READY))
        errors <= errors + 8'd1;
      if (|fifo_overflow) ovf_seen <= 1'b1;

      unique case (m)
        M_IDLE: if (cmd_init) begin
          m         <= M_INIT;
          llc_state <= LLC_INITIALISING;
          ddc_run   <= '0;
          psd_clear <= 1'b1;
          bun_clear <= 1'b1;
        end
        M_INIT: if (!psd_clear && !psd_clearing) begin
          done_flag <= 1'b0;
          ovf_seen  <= 1'b0;
          llc_state <= LLC_READY;
          m         <= M_INIT_WR;
        end
        M_INIT_WR: m <= M_READY;
        M_READY: begin
          if (cmd_measure) begin
            llc_state <= LLC_PROCESSING;
            done_flag <= 1'b0;
            ld_i      <= '0;
            ld_cap    <= 1'b0;
            m         <= M_LOAD;
          end else if (cmd_init) begin
            m         <= M_INIT;
            llc_state <= LLC_INITIALISING;
            ddc_run   <= '0;
            psd_clear <= 1'b1;
            bun_clear <= 1'b1;
          end
        end
        // step 1: control parameters into local registers
        M_LOAD: begin
          ld_cap <= (ld_i != ($clog2(NLOAD+1))'(NLOAD));
          ld_i_d <= ld_i;
          if (ld_i != ($clog2(NLOAD+1))'(NLOAD)) ld_i <= ld_i + 1'b1;
          if (ld_cap) begin
            unique case (32'(ld_i_d))
              0: cp.proc_type <= proc_type_t'(gm_rdata[1:0]);
              1: cp.navg      <= gm_rdata[15:0];
              2: cp.log2n     <= (gm_rdata[3:0] < 4'd2) ? 4'd2 :
                                 (gm_rdata[3:0] > 4'(MAX_LOG2N)) ? 4'(MAX_LOG2N) :
                                 gm_rdata[3:0];
              3: cp.overlap   <= gm_rdata[15:0];
              4: cp.roi_lo    <= gm_rdata[MAX_LOG2N-1:0];
              5: cp.roi_hi    <= gm_rdata[MAX_LOG2N-1:0];
              6: cp.noise     <= gm_rdata;
              7: cp.ddc_a     <= gm_rdata[DW-1:0];
              8: cp.ddc_b     <= gm_rdata[DW-1:0];
              9: cp.nsamp     <= gm_rdata[15:0];
              10: cp.ddc_mask <= gm_rdata[NUM_DDC-1:0];
              default: begin
                if (((32'(ld_i_d) - GM_NUM_PAR) & 1) == 0)
                  ph_r[DW'((32'(ld_i_d) - GM_NUM_PAR) >> 1)] <= gm_rdata;
                else
                  dec_r[DW'((32'(ld_i_d) - GM_NUM_PAR) >> 1)] <= gm_rdata[25:0];
              end
            endcase
          end
          if (ld_cap && 32'(ld_i_d) == NLOAD - 1) begin
            m       <= M_SETUP;
            ch_left <= '0;
            // LD over several converters: start with the lowest one of the
            // mask, the others follow one after another
            if (is_ld && cp.ddc_mask != '0) begin
              cp.ddc_a <= first_ch(cp.ddc_mask);
              ch_left  <= cp.ddc_mask & ~(NUM_DDC'(1) << first_ch(cp.ddc_mask));
            end
          end
        end
        // step 2: set up and release the requested DDCs
        M_SETUP: begin
          wr_total    <= '0;
          cstart      <= '0;
          chunks_sent <= '0;
          copying     <= 1'b0;
          dr          <= D_IDLE;
          psd_clear   <= 1'b1;
          bun_clear   <= 1'b1;
          if (is_ld) begin
            remain_a <= n_cur + (32'(cp.navg) - 32'd1) * advance;
            remain_b <= '0;
            ddc_run[cp.ddc_a] <= (cp.navg != 0);
          end else if (is_lb) begin
            remain_a <= 32'(cp.nsamp);
            remain_b <= 32'(cp.nsamp);
            ddc_run[cp.ddc_a] <= (cp.nsamp != 0);
            ddc_run[cp.ddc_b] <= (cp.nsamp != 0);
          end else begin
            remain_a <= '0;
            remain_b <= '0;
          end
          m <= M_ACQ;
        end
        // steps 3-5: acquisition and per-chunk processing
        M_ACQ: begin
          unique case (dr)
            D_IDLE: begin
              if (start_a) begin
                dr <= D_BURST; dr_b <= 1'b0; dr_len <= want_a;
                remain_a <= remain_a - want_a;
              end else if (start_b) begin
                dr <= D_BURST; dr_b <= 1'b1; dr_len <= want_b;
                remain_b <= remain_b - want_b;
              end
            end
            D_BURST: begin
              dr_len <= dr_len - 32'd1;
              if (dr_len == 32'd1) dr <= D_TAIL;
            end
            D_TAIL: begin
              dr <= D_IDLE;
              // step 4: enough data from this DDC, hold it in reset
              if (!dr_b && remain_a == 0) ddc_run[cp.ddc_a] <= 1'b0;
              if (dr_b && remain_b == 0)  ddc_run[cp.ddc_b] <= 1'b0;
            end
            default: dr <= D_IDLE;
          endcase
          if (rv_a && is_ld) wr_total <= wr_total + 32'd1;
          // step 5 (LD): one chunk into the FFT
          if (chunk_ready) begin
            copying <= 1'b1;
            cp_idx  <= '0;
          end else if (copying) begin
            if (32'(cp_idx) == n_cur - 32'd1) begin
              copying     <= 1'b0;
              chunks_sent <= chunks_sent + 16'd1;
              cstart      <= cstart + advance;
            end
            cp_idx <= cp_idx + 1'b1;
          end
          if (!psd_clear && !psd_clearing && dr == D_IDLE &&
              ((is_ld && chunks_sent == cp.navg && psd_fft_count == cp.navg) ||
               (is_lb && bun_have_all && remain_a == 0 && remain_b == 0) ||
               (!is_ld && !is_lb)))
            m <= M_FINAL;
        end
        // step 6: final joint processing
        M_FINAL: begin
          ddc_run <= '0;
          if (is_ld) ana_start <= 1'b1;
          if (is_lb) bun_start <= 1'b1;
          m <= M_FINAL_WAIT;
        end
        M_FINAL_WAIT: if ((is_ld && ana_done) || (is_lb && bun_done) || (!is_ld && !is_lb)) begin
          pub_i <= '0;
          m     <= M_PUBLISH;
        end
        // step 7: results to global memory
        M_PUBLISH: begin
          // words 0-10 to the result block, then 16-26 to the converter's
          // own copy
          pub_i <= (32'(pub_i) == GM_NUM_RES - 1) ? 5'd16 : pub_i + 5'd1;
          if (32'(pub_i) == 16 + GM_NUM_RES - 1) begin
            psd_i   <= '0;
            psd_cap <= 1'b0;
            m       <= is_ld ? M_PUB_PSD : M_COMPLETE;
            if (!is_ld) begin
              done_flag  <= 1'b1;
              meas_count <= meas_count + 16'd1;
              llc_state  <= LLC_READY;
            end
          end
        end
        M_PUB_PSD: begin
          psd_cap <= (32'(psd_i) < n_cur);
          psd_i_d <= psd_i[MAX_LOG2N-1:0];
          if (32'(psd_i) < n_cur) psd_i <= psd_i + 1'b1;
          if (psd_cap && 32'(psd_i_d) == n_cur - 32'd1) begin
            if (ch_left != '0) begin
              // next converter of the mask: steps 2-7 again
              cp.ddc_a <= first_ch(ch_left);
              ch_left  <= ch_left & ~(NUM_DDC'(1) << first_ch(ch_left));
              m        <= M_SETUP;
            end else begin
              done_flag  <= 1'b1;
              meas_count <= meas_count + 16'd1;
              llc_state  <= LLC_READY;
              m          <= M_COMPLETE;
            end
          end
        end
        // step 8: measurement complete
        M_COMPLETE: begin
          meas_done <= 1'b1;
          m         <= M_READY;
        end
        default: m <= M_IDLE;
      endcase
    end
  end

  // a FIFO is only popped when it holds data
  for (genvar d = 0; d < NUM_DDC; d++) begin : g_chk
    a_pop_nonempty: assert property (@(posedge clk) disable iff (rst)
      fifo_pop[d] |-> fifo_count[d] != '0);
  end

endmodule
