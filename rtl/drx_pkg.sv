// drx_pkg: types, constants and the global-memory map shared by the digital
// receiver blocks.
//
// The receiver takes the beam-transformer signal sampled by a 12-bit ADC,
// mixes it down to baseband in several digital down converters (DDCs) and
// either builds a power spectral density (debunched beam, "LD" processing)
// or measures the amplitudes of the first two RF harmonics (bunched beam,
// "LB" processing). The numbers below that come from the description of the
// system are: 12-bit ADC placed on the 12 MSBs of a 16-bit receiver input,
// a maximum sample rate of 40 MHz, eight DDCs, spectra of 256 or 512 bins.
// The word layout of the global memory, the command codes and all widths
// not listed above are this design's own choices.
package drx_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned ADC_W     = 12;          // ADC resolution
  localparam int unsigned DRX_W     = 16;          // receiver input width
  localparam int unsigned IQ_W      = 16;          // DDC output, per rail
  localparam int unsigned PHASE_W   = 32;          // NCO phase accumulator
  localparam int unsigned FS_MAX_HZ = 40_000_000;  // highest ADC clock
  localparam int unsigned GM_W      = 32;          // global memory word

  // Complex baseband sample, I in the upper half.
  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
  } iq_t;

  // Controller states of the measurement state machine.
  typedef enum logic [1:0] {
    LLC_IDLE         = 2'd0,
    LLC_INITIALISING = 2'd1,
    LLC_READY        = 2'd2,
    LLC_PROCESSING   = 2'd3
  } llc_state_t;

  // Processing types.
  typedef enum logic [1:0] {
    PROC_NONE = 2'd0,
    PROC_LD   = 2'd1,   // longitudinal, debunched: Schottky PSD
    PROC_LB   = 2'd2    // longitudinal, bunched: RF harmonic amplitudes
  } proc_type_t;

  // Host commands, written to GM_CMD before the host interrupt.
  localparam logic [7:0] CMD_INIT    = 8'h01;
  localparam logic [7:0] CMD_MEASURE = 8'h02;
  localparam logic [7:0] CMD_PING    = 8'h03;

  localparam logic [31:0] LLC_VERSION = 32'h0001_0002;

  // ------------------------------------------------- global memory map
  // Word addresses.
  localparam int unsigned GM_CMD        = 0;   // command code [7:0]
  localparam int unsigned GM_STATUS     = 1;   // see llc_controller
  localparam int unsigned GM_VERSION    = 2;   // ping reply
  // control parameters (host writes, controller copies at step 1)
  localparam int unsigned GM_PAR_BASE   = 16;
  localparam int unsigned GM_PROC_TYPE  = 16;  // proc_type_t
  localparam int unsigned GM_NAVG       = 17;  // number of averaged FFTs
  localparam int unsigned GM_LOG2N      = 18;  // log2 of FFT bins number
  localparam int unsigned GM_OVERLAP    = 19;  // sliding-FFT overlap, samples
  localparam int unsigned GM_ROI_LO     = 20;  // FFT region of interest
  localparam int unsigned GM_ROI_HI     = 21;
  localparam int unsigned GM_NOISE      = 22;  // noise power per bin per FFT
  localparam int unsigned GM_DDC_A      = 23;  // LD DDC, or LB fundamental
  localparam int unsigned GM_DDC_B      = 24;  // LB second harmonic DDC
  localparam int unsigned GM_NSAMP_LB   = 25;  // LB samples per channel
  localparam int unsigned GM_DDC_MASK   = 26;  // LD: converters to process, 0 = DDC_A only
  localparam int unsigned GM_NUM_PAR    = 11;
  // per-DDC setup: phase increment, then {shift[20:16], decimation[15:0]}
  localparam int unsigned GM_DDC_BASE   = 32;
  // results
  localparam int unsigned GM_RES_BASE   = 64;
  localparam int unsigned GM_AREA_LO    = 64;
  localparam int unsigned GM_AREA_HI    = 65;
  localparam int unsigned GM_WIDTH      = 66;  // bins above the 2-sigma level
  localparam int unsigned GM_CENTROID   = 67;  // peak centre, bins * 256
  localparam int unsigned GM_PEAK_BIN   = 68;
  localparam int unsigned GM_PEAK_VAL   = 69;  // peak, upper 32 of 40 bits
  localparam int unsigned GM_J1         = 70;  // |J1|
  localparam int unsigned GM_J2         = 71;  // |J2|
  localparam int unsigned GM_I0H        = 72;  // I0*h from the fit
  localparam int unsigned GM_DELTA      = 73;  // Delta, Q16
  localparam int unsigned GM_TAU_FRF    = 74;  // tau*f_RF, Q16
  localparam int unsigned GM_NUM_RES    = 11;
  localparam int unsigned GM_CHRES_BASE = 128; // per-converter copy of words 64-74,
  localparam int unsigned GM_CHRES_STEP = 16;  // at 128 + 16*c
  localparam int unsigned GM_PSD_BASE   = 512; // PSD of converter c, bin k at
                                               // 512 + c*2^MAX_LOG2N + k
  localparam int unsigned PSD_SHIFT     = 8;   // PSD word = sum >> 8

  // ------------------------------------------------------------ CORDIC
  // Angles are in turns scaled to 2^32. Entry i is atan(2^-i)/(2*pi)*2^32.
  localparam int unsigned CORDIC_N = 20;
  localparam logic [31:0] CORDIC_ATAN [CORDIC_N] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756, 32'd42667331,
    32'd21354465,  32'd10679838,  32'd5340245,   32'd2670163,  32'd1335087,
    32'd667544,    32'd333772,    32'd166886,    32'd83443,    32'd41722,
    32'd20861,     32'd10430,     32'd5215,      32'd2608,     32'd1304
  };

  // cos and sin of a 32-bit angle (turns * 2^32) in Q1.15, saturated to
  // +/-32767; integer CORDIC, usable in constant expressions.
  function automatic logic [31:0] cossin_q15(input logic [31:0] angle);
    logic signed [23:0] x, y, xn, yn;
    logic signed [32:0] z;
    logic [31:0] a;
    logic flip;
    // fold into [-1/4, 1/4) turn, remember a half-turn rotation
    flip = (angle[31:30] == 2'b01) || (angle[31:30] == 2'b10);
    a = flip ? angle - 32'h8000_0000 : angle;
    x = 24'sd159188;              // 2^18 / 1.64676 (CORDIC gain removed)
    y = '0;
    z = 33'(signed'(a));
    for (int i = 0; i < CORDIC_N; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i); yn = y + (x >>> i); z = z - 33'(CORDIC_ATAN[i]);
      end else begin
        xn = x + (y >>> i); yn = y - (x >>> i); z = z + 33'(CORDIC_ATAN[i]);
      end
      x = xn; y = yn;
    end
    if (flip) begin x = -x; y = -y; end
    // Q2.18 -> Q1.15 with rounding and saturation
    x = (x + 24'sd4) >>> 3;
    y = (y + 24'sd4) >>> 3;
    if (x > 24'sd32767) x = 24'sd32767;
    if (x < -24'sd32767) x = -24'sd32767;
    if (y > 24'sd32767) y = 24'sd32767;
    if (y < -24'sd32767) y = -24'sd32767;
    return {x[15:0], y[15:0]};
  endfunction

endpackage
