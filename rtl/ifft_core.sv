// ifft_core: integer radix-2 Cooley-Tukey (i)FFT of one OFDM symbol.
//
// The DU turns the N frequency-domain sub-carriers of an OFDM symbol into N
// time-domain samples with an inverse FFT. As in the reference design, the
// inverse transform is computed with the forward FFT: the input samples are
// complex-conjugated on the way in and the results on the way out, and the
// transform itself is the integer decimation-in-time Cooley-Tukey FFT
// (decomposition into single points, then log2(N) stages of butterflies).
//
// Architecture (this design's own choice, built for small area rather than
// the fully unrolled or radix-4 streaming engines of the reference work):
//   LOAD    one sample per cycle is written to the symbol memory at its
//           bit-reversed address, which performs the decomposition step;
//   CALC    one radix-2 butterfly per cycle, in place, stage by stage;
//           twiddles are Q1.15 constants built at elaboration time;
//   UNLOAD  the N results leave in natural order, one per accepted cycle.
// Every butterfly halves its outputs (with rounding and saturation), so the
// forward result is DFT/N and the inverse result is the normalised IDFT
// x[n] = (1/N) * sum_k X[k] exp(+j*2*pi*k*n/N), which cannot overflow.
//
// Timing: N load cycles, (N/2)*log2(N) butterfly cycles, then N output
// cycles when out_ready is held high. The core accepts a new symbol only
// after the last output sample has left. in_last is not needed: the core
// counts N samples.
module ifft_core
  import ofdm_pkg::*;
#(
  parameter int unsigned N       = 4096,  // OFDM symbol size (power of two)
  parameter bit          INVERSE = 1'b1   // 1: iFFT (downlink), 0: FFT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  iq_t  in_data,
  output logic out_valid,
  input  logic out_ready,
  output iq_t  out_data,
  output logic out_last,
  output logic busy            // high while computing (not loading/unloading)
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned AW   = LOGN;

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_UNLOAD} state_t;

  typedef logic [31:0] tw_table_t [N/2];  // {c, s} per twiddle_t

  function automatic tw_table_t build_twiddles();
    tw_table_t t;
    for (int unsigned k = 0; k < N/2; k++) t[k] = 32'(make_twiddle(k, N));
    return t;
  endfunction

  localparam tw_table_t TW = build_twiddles();

  function automatic logic [AW-1:0] bitrev(logic [AW-1:0] x);
    logic [AW-1:0] y;
    for (int unsigned i = 0; i < AW; i++) y[i] = x[AW-1-i];
    return y;
  endfunction

  function automatic logic signed [15:0] sat16(logic signed [19:0] v);
    if (v > 20'sd32767)       return 16'sd32767;
    else if (v < -20'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

  iq_t mem [N];

  state_t              state;
  logic [AW-1:0]       cnt;        // load / unload index, butterfly index
  logic [$clog2(LOGN+1)-1:0] stage;

  // Butterfly addressing for stage s and butterfly j:
  //   half = 2^s, a = (j >> s) * 2*half + (j mod half), b = a + half,
  //   twiddle index k = (j mod half) * N / (2*half).
  logic [AW-1:0] bf_j, pos, a_idx, b_idx;
  logic [AW-2:0] tw_idx;
  logic [AW:0]   half;

  always_comb begin
    bf_j   = cnt;
    half   = (AW+1)'(1) << stage;
    pos    = bf_j & AW'(half - 1);
    a_idx  = AW'(((bf_j >> stage) << (stage + 1)) | pos);
    b_idx  = AW'(a_idx + half);
    tw_idx = (AW-1)'(pos << (LOGN - 1 - 32'(stage)));
  end

  // Butterfly datapath: t = b * W, W = c - j*s; a' = (a + t)/2, b' = (a - t)/2.
  iq_t a_v, b_v, a_new, b_new;
  twiddle_t w;
  logic signed [32:0] pr, pi;
  logic signed [17:0] tr, ti;
  logic signed [19:0] sum_r, sum_i, dif_r, dif_i;

  always_comb begin
    a_v = mem[a_idx];
    b_v = mem[b_idx];
    w   = twiddle_t'(TW[tw_idx]);
    pr  = 33'(b_v.re * w.c) + 33'(b_v.im * w.s);
    pi  = 33'(b_v.im * w.c) - 33'(b_v.re * w.s);
    tr  = 18'((pr + 33'sd16384) >>> 15);
    ti  = 18'((pi + 33'sd16384) >>> 15);
    sum_r = 20'(a_v.re) + 20'(tr) + 20'sd1;
    sum_i = 20'(a_v.im) + 20'(ti) + 20'sd1;
    dif_r = 20'(a_v.re) - 20'(tr) + 20'sd1;
    dif_i = 20'(a_v.im) - 20'(ti) + 20'sd1;
    a_new.re = sat16(sum_r >>> 1);
    a_new.im = sat16(sum_i >>> 1);
    b_new.re = sat16(dif_r >>> 1);
    b_new.im = sat16(dif_i >>> 1);
  end

  assign in_ready  = (state == S_LOAD);
  assign busy      = (state == S_CALC);
  assign out_valid = (state == S_UNLOAD);
  assign out_data  = INVERSE ? conj(mem[cnt]) : mem[cnt];
  assign out_last  = out_valid && (cnt == AW'(N - 1));

  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid)
      mem[bitrev(cnt)] <= INVERSE ? conj(in_data) : in_data;
    else if (state == S_CALC) begin
      mem[a_idx] <= a_new;
      mem[b_idx] <= b_new;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      stage <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) begin
            state <= S_CALC;
            stage <= '0;
          end
        end
        S_CALC: begin
          if (cnt == AW'(N/2 - 1)) begin
            cnt <= '0;
            if (stage == ($bits(stage))'(LOGN - 1)) state <= S_UNLOAD;
            else                                   stage <= stage + 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_UNLOAD: if (out_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == AW'(N - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
