// tb_ifft_core: drives random frequency-domain symbols into ifft_core and
// compares every output sample with an inverse DFT computed here in real
// arithmetic, x[n] = (1/N) * sum_k X[k] * exp(+j*2*pi*k*n/N), allowing a few
// LSB of fixed-point rounding. A second core with INVERSE = 0 is checked
// against the forward DFT divided by N. The symbol is sent twice, the
// second time with a stalling consumer, and the compute time between the
// last input and the first output must be (N/2)*log2(N) cycles.
module tb_ifft_core;
  import ofdm_pkg::*;

  localparam int N   = 64;
  localparam int TOL = 4;
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  iq_t  in_data = '0;
  logic out_ready = 1'b1;
  logic in_ready_i, out_valid_i, out_last_i, busy_i;
  logic in_ready_f, out_valid_f, out_last_f, busy_f;
  iq_t  out_i, out_f;

  ifft_core #(.N(N), .INVERSE(1'b1)) dut_inv (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_i), .in_data,
    .out_valid(out_valid_i), .out_ready, .out_data(out_i), .out_last(out_last_i),
    .busy(busy_i));
  ifft_core #(.N(N), .INVERSE(1'b0)) dut_fwd (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_f), .in_data,
    .out_valid(out_valid_f), .out_ready, .out_data(out_f), .out_last(out_last_f),
    .busy(busy_f));

  int checks = 0, failures = 0;
  int sym_re [N], sym_im [N];
  real ref_ir [N], ref_ii [N], ref_fr [N], ref_fi [N];
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit close(int got, real want);
    real d;
    d = real'(got) - want;
    return (d <= TOL) && (d >= -TOL);
  endfunction

  task automatic make_reference();
    for (int n = 0; n < N; n++) begin
      real ar, ai, br, bi;
      ar = 0; ai = 0; br = 0; bi = 0;
      for (int k = 0; k < N; k++) begin
        real a, c, s;
        a = 2.0 * PI_R * real'((k * n) % N) / real'(N);
        c = $cos(a); s = $sin(a);
        ar += sym_re[k] * c - sym_im[k] * s;   // X * exp(+ja)
        ai += sym_im[k] * c + sym_re[k] * s;
        br += sym_re[k] * c + sym_im[k] * s;   // X * exp(-ja)
        bi += sym_im[k] * c - sym_re[k] * s;
      end
      ref_ir[n] = ar / N; ref_ii[n] = ai / N;
      ref_fr[n] = br / N; ref_fi[n] = bi / N;
    end
  endtask

  task automatic run_symbol(bit stall);
    longint t_last_in, t_first_out;
    int got;
    foreach (sym_re[k]) begin
      sym_re[k] = int'($urandom_range(0, 40000)) - 20000;
      sym_im[k] = int'($urandom_range(0, 40000)) - 20000;
    end
    sym_re[0] = 32000; sym_im[0] = -32000;   // a large corner value
    make_reference();
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data.re = 16'(sym_re[k]);
      in_data.im = 16'(sym_im[k]);
      #1;
      check(in_ready_i && in_ready_f, "input accepted during load");
      @(posedge clk);
    end
    #1 t_last_in = cyc;
    @(negedge clk);
    in_valid = 1'b0;
    check(busy_i, "computing after load");
    while (!out_valid_i) begin @(posedge clk); #1; end
    t_first_out = cyc;
    check(t_first_out - t_last_in == longint'((N / 2) * $clog2(N)),
          $sformatf("compute cycles %0d, expected %0d", t_first_out - t_last_in,
                    (N / 2) * $clog2(N)));
    got = 0;
    while (got < N) begin
      @(negedge clk);
      out_ready = stall ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      if (out_ready && out_valid_i) begin
        check(close(int'(out_i.re), ref_ir[got]) && close(int'(out_i.im), ref_ii[got]),
              $sformatf("ifft n=%0d got %0d,%0d want %f,%f", got, out_i.re, out_i.im,
                        ref_ir[got], ref_ii[got]));
        check(close(int'(out_f.re), ref_fr[got]) && close(int'(out_f.im), ref_fi[got]),
              $sformatf("fft n=%0d got %0d,%0d want %f,%f", got, out_f.re, out_f.im,
                        ref_fr[got], ref_fi[got]));
        check(out_last_i == (got == N - 1), "out_last position");
        got++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    out_ready = 1'b1;
    #1;
    check(in_ready_i && !out_valid_i, "ready for next symbol");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_symbol(1'b0);
    run_symbol(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
