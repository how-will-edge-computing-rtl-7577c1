// ofdm_du_dl: downlink OFDM processing of the DU for the option 7-1 split.
//
// The DU receives compressed frequency-domain I/Q samples from the midhaul
// and produces the time-domain burst for the radio front end:
//   A-law expansion -> iFFT (N points) -> cyclic-prefix insertion (M samples)
// which is the chain of the reference DU processing (decompression, iFFT,
// cyclic prefix). The three stages are joined by valid/ready streams, so a
// stalled radio interface holds the whole chain.
//
// Interface: one compressed sample per cycle in (two 8-bit A-law codes),
// one 32-bit I/Q time sample per cycle out, with out_first / out_last
// framing the N+M sample burst of one symbol. Per symbol the chain needs
// N load cycles, (N/2)*log2(N) butterfly cycles, N cycles to pass the
// result to the prefix buffer and N+M output cycles; the expander adds one
// cycle of latency.
module ofdm_du_dl
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 4096,        // OFDM symbol size
  parameter int unsigned M = N * 5 / 64   // cyclic prefix length
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_i,
  input  logic [7:0] in_q,
  output logic       out_valid,
  input  logic       out_ready,
  output iq_t        out_data,
  output logic       out_first,
  output logic       out_last,
  output logic       fft_busy
);

  logic exp_valid, exp_ready;
  iq_t  exp_data;
  logic fft_valid, fft_ready, fft_last;
  iq_t  fft_data;

  alaw_expand u_expand (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_i, .in_q, .in_last(1'b0),
    .out_valid(exp_valid), .out_ready(exp_ready), .out_data(exp_data),
    .out_last()
  );

  ifft_core #(.N(N), .INVERSE(1'b1)) u_ifft (
    .clk, .rst_n,
    .in_valid(exp_valid), .in_ready(exp_ready), .in_data(exp_data),
    .out_valid(fft_valid), .out_ready(fft_ready), .out_data(fft_data),
    .out_last(fft_last), .busy(fft_busy)
  );

  cp_insert #(.N(N), .M(M)) u_cp (
    .clk, .rst_n,
    .in_valid(fft_valid), .in_ready(fft_ready), .in_data(fft_data),
    .out_valid, .out_ready, .out_data, .out_first, .out_last
  );

endmodule
