// tb_ofdm_numerology: runs the downlink chain at the smaller symbol sizes of
// the 5G numerology, N = 128, 256, 512, 1024 and 2048 with cyclic prefixes
// of 10, 20, 40, 80 and 160 samples (M = N*5/64), one instance per size,
// all fed at the same time. For each size one symbol of random A-law codes
// is sent and every one of the N+M output samples is compared with an
// inverse DFT computed here (G.711 expansion, exp(+j2pi kn/N), divided by
// N), within a few LSB. It also checks each prefix length, the symbol
// markers, and the iFFT compute time of (N/2)*log2(N) cycles through the
// busy flag. The 4096-point size runs in tb_edge5g_full.
module tb_ofdm_numerology;
  import ofdm_pkg::*;

  localparam int NS = 5;
  localparam int SIZES [NS] = '{128, 256, 512, 1024, 2048};
  localparam int TOL = 4;
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid [NS], in_ready [NS], out_valid [NS], out_first [NS], out_last [NS];
  logic       fft_busy [NS];
  logic [7:0] in_i [NS], in_q [NS];
  iq_t        out_data [NS];
  logic       out_ready = 1'b1;

  for (genvar g = 0; g < NS; g++) begin : g_size
    ofdm_du_dl #(.N(SIZES[g])) dut (
      .clk, .rst_n, .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_i(in_i[g]),
      .in_q(in_q[g]), .out_valid(out_valid[g]), .out_ready, .out_data(out_data[g]),
      .out_first(out_first[g]), .out_last(out_last[g]), .fft_busy(fft_busy[g]));
  end

  int checks = 0, failures = 0;
  int busy_cycles [NS];
  always @(negedge clk) for (int g = 0; g < NS; g++) if (fft_busy[g]) busy_cycles[g]++;

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

  task automatic run_size(int g);
    int n_sz, m_sz, bad, n;
    byte unsigned ci [], cq [];
    real xr [], xi [], cs [], sn [];
    n_sz = SIZES[g];
    m_sz = n_sz * 5 / 64;
    ci = new[n_sz]; cq = new[n_sz]; xr = new[n_sz]; xi = new[n_sz];
    cs = new[n_sz]; sn = new[n_sz];
    for (int k = 0; k < n_sz; k++) begin
      ci[k] = 8'($urandom()); cq[k] = 8'($urandom());
      cs[k] = $cos(2.0 * PI_R * k / n_sz); sn[k] = $sin(2.0 * PI_R * k / n_sz);
    end
    for (int t = 0; t < n_sz; t++) begin
      real ar, ai;
      int idx;
      ar = 0; ai = 0; idx = 0;
      for (int k = 0; k < n_sz; k++) begin
        ar += alaw(ci[k]) * cs[idx] - alaw(cq[k]) * sn[idx];
        ai += alaw(cq[k]) * cs[idx] + alaw(ci[k]) * sn[idx];
        idx = (idx + t) % n_sz;
      end
      xr[t] = ar / n_sz; xi[t] = ai / n_sz;
    end
    for (int k = 0; k < n_sz; k++) begin
      @(negedge clk);
      in_valid[g] = 1; in_i[g] = ci[k]; in_q[g] = cq[k];
      #1;
      while (!in_ready[g]) begin @(negedge clk); #1; end
      @(posedge clk);
      #1 in_valid[g] = 0;
    end
    bad = 0; n = 0;
    while (n < n_sz + m_sz) begin
      @(posedge clk);
      if (out_valid[g]) begin
        real dr, di;
        dr = real'(int'(out_data[g].re)) - xr[(n + n_sz - m_sz) % n_sz];
        di = real'(int'(out_data[g].im)) - xi[(n + n_sz - m_sz) % n_sz];
        if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) bad++;
        if (out_first[g] != (n == 0) || out_last[g] != (n == n_sz + m_sz - 1)) bad++;
        n++;
      end
    end
    check(bad == 0, $sformatf("N=%0d: %0d bad samples", n_sz, bad));
    check(m_sz == n_sz * 10 / 128, $sformatf("N=%0d prefix %0d", n_sz, m_sz));
    check(busy_cycles[g] == (n_sz / 2) * $clog2(n_sz),
          $sformatf("N=%0d compute %0d cycles, want %0d", n_sz, busy_cycles[g],
                    (n_sz / 2) * $clog2(n_sz)));
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NS; g++) begin
      in_valid[g] = 0; in_i[g] = '0; in_q[g] = '0; busy_cycles[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_size(0);
      run_size(1);
      run_size(2);
      run_size(3);
      run_size(4);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
