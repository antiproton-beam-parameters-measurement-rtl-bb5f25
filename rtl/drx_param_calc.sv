// drx_param_calc: run-time receiver set-up values derived from f_REV.
//
// Bunched beam (LB): the ADC clock must follow the revolution frequency, so
//   Ki     = floor(40 MHz / f_REV)  (largest multiple not above 40 MHz),
//   f_S    = Ki * f_REV,
//   K_A    = frac(h / Ki)   * 2^32  (down converter on f_RF = h*f_REV),
//   K_B    = frac(2h / Ki)  * 2^32  (down converter on 2*f_RF).
// The K factors K = f_LO/f_S stay constant while Ki does.
// Debunched beam (LD): f_S is fixed at 40 MHz, Ki is reported as 0 and
//   K_A = K_B = frac(n * f_REV / 40 MHz) * 2^32 (window on harmonic n).
// f_REV is an integer number of hertz. A `start` pulse begins a calculation
// of one to three 64-clock divisions; `done` pulses when the outputs, held
// until the next start, are valid (about 200 clocks bunched, 70 debunched).
// The relations follow the system description of the ADC clock generator
// and the DDC K factor; performing them in logic rather than in host
// software, and the formats, are this design's choices.
module drx_param_calc
  import drx_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         bunched,
  input  logic [31:0]  f_rev_hz,
  input  logic [7:0]   h,          // RF harmonic number
  input  logic [7:0]   n,          // observation harmonic, debunched beam
  output logic         busy,
  output logic         done,
  output logic [15:0]  ki,
  output logic [31:0]  fs_hz,
  output logic [31:0]  k_a,
  output logic [31:0]  k_b
);

  typedef enum logic [1:0] {P_IDLE, P_KI, P_KA, P_KB} pstate_t;
  pstate_t state;

  logic        dv_start, dv_done, dv_busy;
  logic [63:0] dv_n, dv_d, dv_q, dv_r;
  logic        bun;
  logic [7:0]  h_r;
  logic [15:0] ki_c;

  assign ki_c = (dv_q == 64'd0) ? 16'd1 :
                (dv_q > 64'hffff) ? 16'hffff : dv_q[15:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= P_IDLE; busy <= 1'b0; done <= 1'b0; dv_start <= 1'b0;
      dv_n <= '0; dv_d <= '0; bun <= 1'b0; h_r <= '0;
      ki <= '0; fs_hz <= '0; k_a <= '0; k_b <= '0;
    end else begin
      done     <= 1'b0;
      dv_start <= 1'b0;
      unique case (state)
        P_IDLE: if (start) begin
          busy     <= 1'b1;
          bun      <= bunched;
          h_r      <= h;
          dv_start <= 1'b1;
          if (bunched) begin
            dv_n  <= 64'(FS_MAX_HZ);
            dv_d  <= 64'(f_rev_hz);
            state <= P_KI;
          end else begin
            dv_n  <= (64'(n) * 64'(f_rev_hz)) << 32;
            dv_d  <= 64'(FS_MAX_HZ);
            state <= P_KA;
          end
        end
        P_KI: if (dv_done) begin
          ki       <= ki_c;
          fs_hz    <= 32'(ki_c) * f_rev_hz;
          dv_n     <= 64'(h_r) << 32;
          dv_d     <= 64'(ki_c);
          dv_start <= 1'b1;
          state    <= P_KA;
        end
        P_KA: if (dv_done) begin
          k_a <= dv_q[31:0];
          if (bun) begin
            dv_n     <= 64'(h_r) << 33;
            dv_start <= 1'b1;
            state    <= P_KB;
          end else begin
            ki    <= '0;
            fs_hz <= FS_MAX_HZ;
            k_b   <= dv_q[31:0];
            busy  <= 1'b0;
            done  <= 1'b1;
            state <= P_IDLE;
          end
        end
        P_KB: if (dv_done) begin
          k_b   <= dv_q[31:0];
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  seq_divider #(.W(64)) u_div (
    .clk(clk), .rst(rst), .start(dv_start), .dividend(dv_n), .divisor(dv_d),
    .busy(dv_busy), .done(dv_done), .quotient(dv_q), .remainder(dv_r)
  );

endmodule
