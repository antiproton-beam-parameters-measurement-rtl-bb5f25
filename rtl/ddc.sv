// ddc: digital down converter of one receiver channel.
//
// Each input sample (16 bits, the 12 ADC bits in the MSBs) is multiplied by
// exp(-j*phi), where phi is the phase of a numerically controlled oscillator
// that advances by phase_inc every input sample. phase_inc is the "K factor"
// K = f_LO/f_S scaled to 2^32, so the component at f_LO lands at DC. The
// complex product is then decimated by an integrate-and-dump filter over
// `decim` samples, which narrows the band to about f_S/decim around f_LO,
// and scaled down by 2^shift with saturation to 16-bit I and Q.
// Interface: while `run` is low the channel is held in reset (phase, filter
// and counter cleared); raising it starts the oscillator at phase 0.
// in_valid marks input samples (normally every clock of the ADC clock);
// out_valid pulses once per `decim` input samples. Latency from the last
// sample of a block to out_valid is 18 clocks.
// The function (downmix with K, then decimate) follows the system
// description; the commercial converter's filter chain is not described, so
// the CORDIC mixer and integrate-and-dump decimator are this design's choice.
module ddc
  import drx_pkg::*;
#(
  parameter int unsigned CORDIC_W = 20,
  parameter int unsigned STAGES   = 16,
  parameter int unsigned ACC_W    = 40
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    run,
  input  logic                    in_valid,
  input  logic signed [DRX_W-1:0] in_sample,
  input  logic [PHASE_W-1:0]      phase_inc,
  input  logic [15:0]             decim,     // 0 is taken as 1
  input  logic [4:0]              shift,
  output logic                    out_valid,
  output iq_t                     out_iq
);

  logic [PHASE_W-1:0] phase;
  logic               mix_valid;
  logic signed [CORDIC_W-1:0] mix_i, mix_q;
  logic               clr;

  assign clr = rst || !run;

  always_ff @(posedge clk) begin
    if (clr)           phase <= '0;
    else if (in_valid) phase <= phase + phase_inc;
  end

  // rotate (s, 0) by -phi
  cordic_rotator #(.W(CORDIC_W), .STAGES(STAGES)) u_mix (
    .clk      (clk),
    .rst      (clr),
    .in_valid (in_valid && run),
    .in_x     (CORDIC_W'(in_sample)),
    .in_y     ('0),
    .in_angle (-phase),
    .out_valid(mix_valid),
    .out_x    (mix_i),
    .out_y    (mix_q)
  );

  logic signed [ACC_W-1:0] acc_i, acc_q, sum_i, sum_q;
  logic [15:0]             cnt;
  logic [15:0]             dec_n;

  assign dec_n = (decim == 16'd0) ? 16'd1 : decim;
  assign sum_i = acc_i + ACC_W'(mix_i);
  assign sum_q = acc_q + ACC_W'(mix_q);

  function automatic logic signed [IQ_W-1:0] sat(input logic signed [ACC_W-1:0] v,
                                                 input logic [4:0] sh);
    logic signed [ACC_W-1:0] s;
    s = v >>> sh;
    if (s > ACC_W'(32767))       return 16'sh7fff;
    else if (s < -ACC_W'(32768)) return 16'sh8000;
    else                         return s[IQ_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (clr) begin
      acc_i     <= '0;
      acc_q     <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_iq    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (mix_valid) begin
        if (cnt == dec_n - 16'd1) begin
          out_iq.i  <= sat(sum_i, shift);
          out_iq.q  <= sat(sum_q, shift);
          out_valid <= 1'b1;
          acc_i     <= '0;
          acc_q     <= '0;
          cnt       <= '0;
        end else begin
          acc_i <= sum_i;
          acc_q <= sum_q;
          cnt   <= cnt + 16'd1;
        end
      end
    end
  end

endmodule
