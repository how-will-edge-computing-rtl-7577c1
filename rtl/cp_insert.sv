// cp_insert: cyclic-prefix insertion for one OFDM symbol.
//
// The cyclic prefix is a guard interval: a copy of the last M time-domain
// samples of a symbol sent in front of it, so that the output burst is
//   x[N-M], ..., x[N-1], x[0], ..., x[N-1]      (N + M samples).
// The default M = N*5/64 reproduces the numerology of the reference OFDM
// table (N = 128 -> M = 10, ..., 4096 -> 320, 8192 -> 640).
//
// How: the N incoming samples are written to a symbol buffer (FILL); the
// buffer is then read out starting at address N-M, wrapping to 0, for N+M
// samples (PLAY). The buffer is this design's choice; the reference design
// reads the prefix straight behind its streaming iFFT.
//
// Interface: valid/ready stream in and out. out_first marks the first prefix
// sample, out_last the last sample of the burst. Timing: N input cycles,
// then N+M output cycles when out_ready stays high; the buffer read is
// combinational, so the first output is offered the cycle after the last
// input sample was taken.
module cp_insert
  import ofdm_pkg::*;
#(
  parameter int unsigned N = 4096,        // OFDM symbol size
  parameter int unsigned M = N * 5 / 64   // cyclic prefix length, M < N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  iq_t  in_data,
  output logic out_valid,
  input  logic out_ready,
  output iq_t  out_data,
  output logic out_first,
  output logic out_last
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned CW = $clog2(N + M + 1);

  iq_t buffer [N];

  logic          playing;
  logic [AW-1:0] wr_idx;
  logic [AW-1:0] rd_idx;
  logic [CW-1:0] out_cnt;

  assign in_ready  = !playing;
  assign out_valid = playing;
  assign out_data  = buffer[rd_idx];
  assign out_first = playing && (out_cnt == '0);
  assign out_last  = playing && (out_cnt == CW'(N + M - 1));

  always_ff @(posedge clk) begin
    if (!playing && in_valid) buffer[wr_idx] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      playing <= 1'b0;
      wr_idx  <= '0;
      rd_idx  <= '0;
      out_cnt <= '0;
    end else if (!playing) begin
      if (in_valid) begin
        wr_idx <= wr_idx + 1'b1;
        if (wr_idx == AW'(N - 1)) begin
          playing <= 1'b1;
          rd_idx  <= AW'(N - M);
          out_cnt <= '0;
        end
      end
    end else if (out_ready) begin
      rd_idx  <= rd_idx + 1'b1;          // wraps from N-1 to 0
      out_cnt <= out_cnt + 1'b1;
      if (out_last) begin
        playing <= 1'b0;
        wr_idx  <= '0;
      end
    end
  end

  initial assert (M < N) else $error("cp_insert: M must be below N");

endmodule
