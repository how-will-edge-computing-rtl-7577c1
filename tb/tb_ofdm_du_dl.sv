// tb_ofdm_du_dl: sends three OFDM symbols of A-law coded I/Q samples
// (64 sub-carriers, cyclic prefix 5) through the downlink chain while the
// consumer stalls at random. For each symbol the expected output is built
// here: G.711 A-law expansion, inverse DFT in real arithmetic divided by N,
// then the last M samples repeated in front. Every output sample must be
// within a few LSB, out_first/out_last must mark the 69-sample symbol
// boundaries, and no sample may be lost or added.
module tb_ofdm_du_dl;
  import ofdm_pkg::*;

  localparam int N = 64, M = 5, NSYM = 3, TOL = 4;
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid = 0, in_ready, out_valid, out_ready = 1, out_first, out_last, fft_busy;
  logic [7:0] in_i = '0, in_q = '0;
  iq_t        out_data;

  ofdm_du_dl #(.N(N), .M(M)) dut (.*);

  int checks = 0, failures = 0;
  byte unsigned codes_i [NSYM][N], codes_q [NSYM][N];
  real exp_re [NSYM][N + M], exp_im [NSYM][N + M];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int alaw(byte unsigned c);
    int a, seg, mag;
    a = c ^ 'h55;
    seg = (a >> 4) & 7;
    mag = (seg == 0) ? ((a & 15) << 4) + 8 : (((a & 15) << 4) + 'h108) << (seg - 1);
    return (a & 'h80) ? mag : -mag;
  endfunction

  function automatic bit close(int got, real want);
    real d;
    d = real'(got) - want;
    return (d <= TOL) && (d >= -TOL);
  endfunction

  task automatic build(int s);
    real xr [N], xi [N];
    for (int n = 0; n < N; n++) begin
      real ar, ai;
      ar = 0; ai = 0;
      for (int k = 0; k < N; k++) begin
        real a;
        a = 2.0 * PI_R * real'((k * n) % N) / real'(N);
        ar += alaw(codes_i[s][k]) * $cos(a) - alaw(codes_q[s][k]) * $sin(a);
        ai += alaw(codes_q[s][k]) * $cos(a) + alaw(codes_i[s][k]) * $sin(a);
      end
      xr[n] = ar / N; xi[n] = ai / N;
    end
    for (int n = 0; n < N + M; n++) begin
      exp_re[s][n] = xr[(n + N - M) % N];
      exp_im[s][n] = xi[(n + N - M) % N];
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer with random stalls
  always @(negedge clk) out_ready <= ($urandom_range(99) < 70);

  initial begin
    for (int s = 0; s < NSYM; s++) begin
      for (int k = 0; k < N; k++) begin
        codes_i[s][k] = 8'($urandom());
        codes_q[s][k] = 8'($urandom());
      end
      build(s);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      for (int s = 0; s < NSYM; s++)
        for (int k = 0; k < N; k++) begin
          @(negedge clk);
          in_valid = 1; in_i = codes_i[s][k]; in_q = codes_q[s][k];
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          @(posedge clk);
          #1 in_valid = 0;
        end
      for (int s = 0; s < NSYM; s++)
        for (int n = 0; n < N + M; n++) begin
          @(posedge clk);
          while (!(out_valid && out_ready)) @(posedge clk);
          check(close(int'(out_data.re), exp_re[s][n]) && close(int'(out_data.im), exp_im[s][n]),
                $sformatf("sym %0d n %0d got %0d,%0d want %f,%f", s, n, out_data.re,
                          out_data.im, exp_re[s][n], exp_im[s][n]));
          check(out_first == (n == 0) && out_last == (n == N + M - 1), "symbol markers");
        end
    join
    repeat (20) @(posedge clk);
    check(!out_valid, "no extra samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
