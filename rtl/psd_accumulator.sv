// psd_accumulator: cumulative power spectral density over many FFTs.
//
// For every FFT output bin X[k] it adds |X[k]|^2 = I^2 + Q^2 into a bin
// accumulator. Bins are stored in centred order (the halves of the
// spectrum swapped), so the local-oscillator frequency, bin 0 of the FFT,
// sits in the middle at N/2 and frequency increases with the stored index.
// `clear` zeroes the N used accumulators (one per clock, `clearing` high
// meanwhile) and the FFT counter; `fft_count` counts completed spectra
// (in_last). The read port returns, one clock after rd_addr, the sum for
// that bin less the noise correction noise*fft_count, floored at zero:
// the averaged PSD times the number of averages, in arbitrary units.
// Accumulating |X|^2 over the averaged FFTs and subtracting a noise
// correction follow the system description; the single per-bin noise
// level and keeping the sum instead of the mean are this design's choices.
module psd_accumulator
  import drx_pkg::*;
#(
  parameter int unsigned MAX_LOG2N = 9,
  parameter int unsigned ACC_W     = 40
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  clear,
  input  logic [3:0]            log2n,
  input  logic [31:0]           noise,
  output logic                  clearing,
  input  logic                  in_valid,
  input  iq_t                   in_data,
  input  logic [MAX_LOG2N-1:0]  in_index,
  input  logic                  in_last,
  output logic [15:0]           fft_count,
  input  logic [MAX_LOG2N-1:0]  rd_addr,
  output logic [ACC_W-1:0]      rd_data
);

  localparam int unsigned MAXN = 1 << MAX_LOG2N;
  localparam int unsigned AW   = MAX_LOG2N;

  logic [ACC_W-1:0] acc [MAXN];
  logic [AW-1:0]    clr_idx;
  logic [AW-1:0]    waddr;
  logic [32:0]      pwr;
  logic [AW-1:0]    n_m1;

  assign n_m1  = AW'((32'd1 << log2n) - 1);
  // centred order: flip the top bit of an index of log2n bits
  assign waddr = in_index ^ AW'(32'd1 << (log2n - 4'd1));
  assign pwr   = 33'($signed(in_data.i) * $signed(in_data.i)) +
                 33'($signed(in_data.q) * $signed(in_data.q));

  always_ff @(posedge clk) begin
    if (clearing)
      acc[clr_idx] <= '0;
    else if (in_valid)
      acc[waddr] <= acc[waddr] + ACC_W'(pwr);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      clearing  <= 1'b0;
      clr_idx   <= '0;
      fft_count <= '0;
    end else if (clear) begin
      clearing  <= 1'b1;
      clr_idx   <= '0;
      fft_count <= '0;
    end else if (clearing) begin
      if (clr_idx == n_m1) clearing <= 1'b0;
      clr_idx <= clr_idx + 1'b1;
    end else if (in_valid && in_last) begin
      fft_count <= fft_count + 16'd1;
    end
  end

  logic [ACC_W-1:0] corr, raw;
  always_ff @(posedge clk) begin
    raw  <= acc[rd_addr];
    corr <= ACC_W'(noise) * ACC_W'(fft_count);
  end
  assign rd_data = (raw > corr) ? raw - corr : '0;

endmodule
