// fft_engine: in-place radix-2 decimation-in-time FFT of one data chunk.
//
// The chunk length is N = 2^log2n samples, log2n from 2 to MAX_LOG2N, set
// per chunk. Operation has three phases:
//   load    - N complex samples are accepted on in_valid while in_ready is
//             high and written to bit-reversed addresses;
//   compute - log2n stages of N/2 butterflies, one butterfly per clock,
//             reading two words of the array and writing two back. Each
//             butterfly halves its results, so the output is DFT/N and
//             cannot overflow;
//   unload  - X[0] .. X[N-1] leave in natural order on out_valid, one per
//             clock, with out_index; out_last marks X[N-1].
// A chunk therefore takes N + (N/2)*log2n + N clocks (1280 + 2 for N = 256).
// Twiddle factors exp(-j*2*pi*k/2^MAX_LOG2N), k < 2^(MAX_LOG2N-1), form a
// constant table computed at elaboration with an integer CORDIC.
// That the partial processing of a chunk is an FFT of 256 or 512 bins
// follows the system description; the architecture is this design's choice.
module fft_engine
  import drx_pkg::*;
#(
  parameter int unsigned MAX_LOG2N = 9
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [3:0]             log2n,      // sampled at the first load
  input  logic                   in_valid,
  input  iq_t                    in_data,
  output logic                   in_ready,
  output logic                   out_valid,
  output iq_t                    out_data,
  output logic [MAX_LOG2N-1:0]   out_index,
  output logic                   out_last,
  output logic                   busy
);

  localparam int unsigned MAXN = 1 << MAX_LOG2N;
  localparam int unsigned AW   = MAX_LOG2N;

  typedef logic [31:0] tw_t;
  typedef tw_t tw_tab_t [MAXN/2];

  function automatic tw_tab_t make_twiddles();
    tw_tab_t t;
    for (int k = 0; k < int'(MAXN/2); k++) begin
      // angle -k/MAXN turn
      t[k] = cossin_q15(32'(-(longint'(k) << (32 - MAX_LOG2N))));
    end
    return t;
  endfunction

  localparam tw_tab_t TW = make_twiddles();

  typedef enum logic [1:0] {F_LOAD, F_COMPUTE, F_UNLOAD} fstate_t;
  fstate_t state;

  iq_t           mem [MAXN];
  logic [3:0]    l2n;
  logic [AW:0]   cnt;        // load / unload index
  logic [3:0]    stage;
  logic [AW-1:0] bf;         // butterfly index within a stage
  logic [AW:0]   n_cur;

  assign n_cur = (AW+1)'(1) << l2n;

  // bit reversal of an index of l2n bits
  function automatic logic [AW-1:0] bitrev(input logic [AW-1:0] v, input logic [3:0] nb);
    logic [AW-1:0] r;
    for (int b = 0; b < int'(AW); b++) r[b] = v[AW-1-b];
    return r >> (4'(AW) - nb);
  endfunction

  // butterfly addresses and twiddle
  logic [AW-1:0] half, pos, grp, addr_a, addr_b;
  logic [AW-2:0] tw_idx;
  always_comb begin
    half   = AW'(1) << stage;
    pos    = bf & (half - AW'(1));
    grp    = bf >> stage;
    addr_a = (grp << (stage + 4'd1)) | pos;
    addr_b = addr_a | half;
    tw_idx = (AW-1)'(pos << (4'(AW - 1) - stage));
  end

  iq_t                xa, xb, ya, yb;
  logic signed [15:0] wr, wi;
  logic signed [31:0] pr, pi;
  logic signed [16:0] tr, ti;
  logic signed [17:0] sr0, si0, sr1, si1;

  always_comb begin
    xa = mem[addr_a];
    xb = mem[addr_b];
    wr = TW[tw_idx][31:16];
    wi = TW[tw_idx][15:0];
    // t = w * xb (Q1.15)
    pr = 32'(wr * xb.i) - 32'(wi * xb.q);
    pi = 32'(wr * xb.q) + 32'(wi * xb.i);
    tr = 17'(pr >>> 15);
    ti = 17'(pi >>> 15);
    sr0 = 18'(xa.i) + 18'(tr);
    si0 = 18'(xa.q) + 18'(ti);
    sr1 = 18'(xa.i) - 18'(tr);
    si1 = 18'(xa.q) - 18'(ti);
    ya.i = 16'(sr0 >>> 1);
    ya.q = 16'(si0 >>> 1);
    yb.i = 16'(sr1 >>> 1);
    yb.q = 16'(si1 >>> 1);
  end

  always_ff @(posedge clk) begin
    if (state == F_LOAD && in_valid && in_ready)
      mem[bitrev(cnt[AW-1:0], (cnt == '0) ? log2n : l2n)] <= in_data;
    else if (state == F_COMPUTE) begin
      mem[addr_a] <= ya;
      mem[addr_b] <= yb;
    end
  end

  assign in_ready = (state == F_LOAD);
  assign busy     = (state != F_LOAD) || (cnt != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= F_LOAD;
      cnt       <= '0;
      stage     <= '0;
      bf        <= '0;
      l2n       <= 4'(MAX_LOG2N);
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_index <= '0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        F_LOAD: if (in_valid) begin
          if (cnt == '0) l2n <= log2n;
          if (cnt == ((AW+1)'(1) << ((cnt == '0) ? log2n : l2n)) - 1'b1) begin
            cnt   <= '0;
            stage <= '0;
            bf    <= '0;
            state <= F_COMPUTE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        F_COMPUTE: begin
          if (bf == AW'((n_cur >> 1) - 1'b1)) begin
            bf <= '0;
            if (stage == l2n - 4'd1) state <= F_UNLOAD;
            else                     stage <= stage + 4'd1;
          end else begin
            bf <= bf + 1'b1;
          end
        end
        F_UNLOAD: begin
          out_valid <= 1'b1;
          out_data  <= mem[cnt[AW-1:0]];
          out_index <= cnt[AW-1:0];
          if (cnt == n_cur - 1'b1) begin
            out_last <= 1'b1;
            cnt      <= '0;
            state    <= F_LOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= F_LOAD;
      endcase
    end
  end

  initial assert (MAX_LOG2N >= 2 && MAX_LOG2N <= 12) else $error("MAX_LOG2N out of range");

endmodule
