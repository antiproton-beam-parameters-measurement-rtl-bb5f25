// adc_clock_pll: behavioural model of the analogue PLL that multiplies the
// reference by four to make the ADC sample clock. Not synthesizable.
//
// The reference is the DDS output that follows the revolution frequency
// (bunched beam, up to 10 MHz) or a fixed 10 MHz clock (debunched beam).
// The model measures the reference period on every rising edge; once the
// period has been steady (within 0.1 %) for LOCK_NS it raises `locked` and
// produces out_clk at four times the reference frequency. If the period
// changes, `locked` drops and the lock time starts again. An output outside
// the 20-40 MHz range of the real part is not produced (locked stays low).
// The factor 4, the 20-40 MHz range and the lock time of about 100 us
// follow the system description; phase noise is not modelled.
module adc_clock_pll #(
  parameter real LOCK_NS     = 100_000.0,
  parameter real FOUT_MIN_HZ = 20.0e6,
  parameter real FOUT_MAX_HZ = 40.0e6
) (
  input  logic ref_clk,
  output logic out_clk,
  output logic locked
);

  real t_last  = -1.0;
  real period  = 0.0;
  real t_steady = 0.0;
  real half_out = 0.0;

  initial begin
    out_clk = 1'b0;
    locked  = 1'b0;
  end

  always @(posedge ref_clk) begin
    real now, p, f_out;
    now = $realtime;
    if (t_last >= 0.0) begin
      p = now - t_last;
      if (period == 0.0 || p > period * 1.001 || p < period * 0.999) begin
        period   = p;
        t_steady = now;
        locked   = 1'b0;
      end else begin
        f_out = 4.0e9 / period;
        if (now - t_steady >= LOCK_NS && f_out >= FOUT_MIN_HZ && f_out <= FOUT_MAX_HZ) begin
          half_out = period / 8.0;
          locked   = 1'b1;
        end else if (f_out < FOUT_MIN_HZ || f_out > FOUT_MAX_HZ) begin
          locked = 1'b0;
        end
      end
    end
    t_last = now;
  end

  // output oscillator
  always begin
    if (locked && half_out > 0.0) begin
      #(half_out) out_clk = ~out_clk;
    end else begin
      out_clk = 1'b0;
      #1;
    end
  end

endmodule
