// bunched_amplitude: bunched-beam intensity from the first two RF harmonics.
//
// Two down converters are tuned to f_RF and 2*f_RF. With the ADC clock
// locked to a multiple of f_REV the harmonic sits at DC of each channel, so
// this block sums `nsamp` complex samples per channel (coherent average),
// then computes in sequence:
//   J1, J2   = |sum of I + jQ| of channel A and B (integer square root);
//   the fit of J_k = I0*h*(2 - Delta*k^2) through k = 1, 2:
//     I0*h  = (4*J1 - J2) / 6,
//     Delta = 2*(J1 - J2) / (4*J1 - J2), in Q16 (0 when J2 >= J1);
//   tau*f_RF = sqrt(5*Delta / (4*pi)), in Q16, the bunch half length
//   in RF periods.
// J1, J2 and I0*h are in units of (nsamp * DDC output LSB) and saturate at
// 2^32-1; turning them into particles needs the calibration of the host.
// `clear` restarts accumulation; have_all rises when both channels hold
// nsamp samples; `start` then runs the arithmetic (about 260 clocks) and
// `done` pulses. Samples beyond nsamp are ignored.
// The two-harmonic measurement and equations of the fit follow the system
// description; the coherent average and the fixed-point formats are this
// design's choices.
module bunched_amplitude
  import drx_pkg::*;
#(
  parameter int unsigned ACC_W = 40
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic [15:0] nsamp,
  input  logic        a_valid,
  input  iq_t         a_data,
  input  logic        b_valid,
  input  iq_t         b_data,
  output logic        have_all,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [31:0] j1,
  output logic [31:0] j2,
  output logic [31:0] i0h,
  output logic [31:0] delta_q16,
  output logic [31:0] tau_frf_q16
);

  localparam logic [31:0] FIVE_OVER_4PI_Q16 = 32'd26076; // 5/(4*pi)*2^16

  logic signed [ACC_W-1:0] ai, aq, bi, bq;
  logic [15:0]             na, nb;

  assign have_all = (na == nsamp) && (nb == nsamp);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ai <= '0; aq <= '0; bi <= '0; bq <= '0;
      na <= '0; nb <= '0;
    end else begin
      if (a_valid && na != nsamp) begin
        ai <= ai + ACC_W'(a_data.i);
        aq <= aq + ACC_W'(a_data.q);
        na <= na + 16'd1;
      end
      if (b_valid && nb != nsamp) begin
        bi <= bi + ACC_W'(b_data.i);
        bq <= bq + ACC_W'(b_data.q);
        nb <= nb + 16'd1;
      end
    end
  end

  function automatic logic [2*ACC_W-1:0] mag2(input logic signed [ACC_W-1:0] i,
                                              input logic signed [ACC_W-1:0] q);
    return (2*ACC_W)'(i * i) + (2*ACC_W)'(q * q);
  endfunction

  function automatic logic [31:0] sat32(input logic [63:0] v);
    return (v > 64'hffff_ffff) ? 32'hffff_ffff : v[31:0];
  endfunction

  typedef enum logic [2:0] {B_IDLE, B_J1, B_J2, B_DELTA, B_I0H, B_TAU} bstate_t;
  bstate_t state;

  logic                 sq_start, sq_done, sq_busy;
  logic [2*ACC_W-1:0]   sq_x;
  logic [ACC_W-1:0]     sq_root;
  logic                 dv_start, dv_done, dv_busy;
  logic [63:0]          dv_n, dv_d, dv_q, dv_r;
  logic [ACC_W-1:0]     rj1, rj2;
  logic [ACC_W+2:0]     fitden;

  assign fitden = ({rj1, 2'b00} > (ACC_W+2)'(rj2)) ? (ACC_W+3)'({rj1, 2'b00}) - (ACC_W+3)'(rj2) : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= B_IDLE; busy <= 1'b0; done <= 1'b0;
      sq_start <= 1'b0; dv_start <= 1'b0;
      sq_x <= '0; dv_n <= '0; dv_d <= '0;
      rj1 <= '0; rj2 <= '0;
      j1 <= '0; j2 <= '0; i0h <= '0; delta_q16 <= '0; tau_frf_q16 <= '0;
    end else begin
      done     <= 1'b0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      unique case (state)
        B_IDLE: if (start) begin
          busy     <= 1'b1;
          sq_x     <= mag2(ai, aq);
          sq_start <= 1'b1;
          state    <= B_J1;
        end
        B_J1: if (sq_done) begin
          rj1      <= sq_root;
          j1       <= sat32(64'(sq_root));
          sq_x     <= mag2(bi, bq);
          sq_start <= 1'b1;
          state    <= B_J2;
        end
        B_J2: if (sq_done) begin
          rj2      <= sq_root;
          j2       <= sat32(64'(sq_root));
          dv_n     <= (rj1 > sq_root) ? (64'(rj1 - sq_root) << 17) : 64'd0;
          dv_d     <= 64'({rj1, 2'b00}) - 64'(sq_root);
          dv_start <= 1'b1;
          state    <= B_DELTA;
        end
        B_DELTA: if (dv_done) begin
          delta_q16 <= sat32(dv_q);
          sq_x      <= (2*ACC_W)'(sat32(dv_q)) * (2*ACC_W)'(FIVE_OVER_4PI_Q16);
          dv_n      <= 64'(fitden);
          dv_d      <= 64'd6;
          dv_start  <= 1'b1;
          state     <= B_I0H;
        end
        B_I0H: if (dv_done) begin
          i0h      <= sat32(dv_q);
          sq_start <= 1'b1;
          state    <= B_TAU;
        end
        B_TAU: if (sq_done) begin
          tau_frf_q16 <= sat32(64'(sq_root));
          busy        <= 1'b0;
          done        <= 1'b1;
          state       <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  isqrt #(.W(2*ACC_W)) u_sqrt (
    .clk(clk), .rst(rst), .start(sq_start), .x(sq_x),
    .busy(sq_busy), .done(sq_done), .root(sq_root)
  );

  seq_divider #(.W(64)) u_div (
    .clk(clk), .rst(rst), .start(dv_start), .dividend(dv_n), .divisor(dv_d),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r)
  );

endmodule
