// psd_peak_analyzer: beam parameters from the accumulated Schottky PSD.
//
// Within the region of interest [roi_lo, roi_hi] (centred bin indices) it
// finds, in two passes over the PSD read port (one bin per clock, data one
// clock after the address):
//   pass 1 - area  = sum of the PSD bins (proportional to the particle
//            number N times f_REV^2), the highest bin and its index, and
//            the first moment sum(k * PSD[k]);
//   pass 2 - width = number of bins from the first to the last bin whose
//            PSD reaches the level of a Gaussian at 2 sigma from its
//            centre, exp(-2) * peak, taken as peak*277/2048;
// then the centre of the peak, centroid = 256 * sum(k*PSD[k]) / area, in
// 1/256 bin, by a 72-clock divider. `done` pulses when all outputs are
// valid; a run over R bins takes about 2R + 80 clocks. The centroid is
// the measured band position from which the host derives the measured
// revolution frequency.
// Area and width at the 2-sigma level follow the system description; the
// reading of "width at 2-sigma height" as the width at exp(-2) of the peak
// and the centroid as mean frequency are this design's choices.
module psd_peak_analyzer #(
  parameter int unsigned MAX_LOG2N = 9,
  parameter int unsigned ACC_W     = 40
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic [MAX_LOG2N-1:0]    roi_lo,
  input  logic [MAX_LOG2N-1:0]    roi_hi,
  output logic [MAX_LOG2N-1:0]    rd_addr,
  input  logic [ACC_W-1:0]        rd_data,
  output logic                    busy,
  output logic                    done,
  output logic [63:0]             area,
  output logic [MAX_LOG2N-1:0]    peak_bin,
  output logic [ACC_W-1:0]        peak_val,
  output logic [MAX_LOG2N:0]      width,
  output logic [MAX_LOG2N+7:0]    centroid
);

  localparam int unsigned AW = MAX_LOG2N;
  localparam int unsigned DW = 72;

  typedef enum logic [2:0] {A_IDLE, A_P1, A_P2, A_DIV, A_WAIT} astate_t;
  astate_t state;

  logic          iss, iss_d, last_iss, last_d;
  logic [AW-1:0] idx_d;
  logic [63:0]   msum;
  logic [ACC_W-1:0] thr;
  logic          found;
  logic [AW-1:0] first, last;
  logic          div_start, div_done, div_busy;
  logic [DW-1:0] div_q, div_r;

  assign last_iss = (rd_addr == roi_hi);
  assign thr      = ACC_W'(({8'd0, peak_val} * 48'd277) >> 11);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= A_IDLE;
      rd_addr   <= '0;
      iss       <= 1'b0;
      iss_d     <= 1'b0;
      last_d    <= 1'b0;
      idx_d     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      area      <= '0;
      msum      <= '0;
      peak_bin  <= '0;
      peak_val  <= '0;
      width     <= '0;
      centroid  <= '0;
      found     <= 1'b0;
      first     <= '0;
      last      <= '0;
      div_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      iss_d     <= iss;
      idx_d     <= rd_addr;
      last_d    <= iss && last_iss;
      unique case (state)
        A_IDLE: if (start) begin
          busy     <= 1'b1;
          area     <= '0;
          msum     <= '0;
          peak_val <= '0;
          peak_bin <= roi_lo;
          found    <= 1'b0;
          rd_addr  <= roi_lo;
          iss      <= 1'b1;
          state    <= A_P1;
        end
        A_P1: begin
          if (iss) begin
            if (last_iss) iss <= 1'b0;
            else          rd_addr <= rd_addr + 1'b1;
          end
          if (iss_d) begin
            area <= area + 64'(rd_data);
            msum <= msum + 64'(rd_data) * 64'(idx_d);
            if (rd_data > peak_val) begin
              peak_val <= rd_data;
              peak_bin <= idx_d;
            end
          end
          if (last_d) begin
            rd_addr <= roi_lo;
            iss     <= 1'b1;
            state   <= A_P2;
          end
        end
        A_P2: begin
          if (iss) begin
            if (last_iss) iss <= 1'b0;
            else          rd_addr <= rd_addr + 1'b1;
          end
          if (iss_d && peak_val != '0 && rd_data >= thr) begin
            if (!found) first <= idx_d;
            found <= 1'b1;
            last  <= idx_d;
          end
          if (last_d) state <= A_DIV;
        end
        A_DIV: begin
          width     <= found ? (AW+1)'(last - first) + 1'b1 : '0;
          div_start <= 1'b1;
          state     <= A_WAIT;
        end
        A_WAIT: if (div_done) begin
          centroid <= (area == '0) ? '0 : (AW+8)'(div_q);
          busy     <= 1'b0;
          done     <= 1'b1;
          state    <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  seq_divider #(.W(DW)) u_div (
    .clk      (clk),
    .rst      (rst),
    .start    (div_start),
    .dividend (DW'(msum) << 8),
    .divisor  (DW'(area)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

endmodule
