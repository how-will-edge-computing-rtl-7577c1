// tb_token_bucket_pf: fills the bucket, freezes refilling with a very long
// token period and sends a mix of matching and non-matching packets of
// one to three beats under random output back-pressure. Expected output:
// all non-matching packets, plus the first `bucket_size` matching ones,
// byte for byte and in order. Then checks refill timing (one token per
// token_period cycles, capped at bucket_size), the counters, and that a
// disabled filter passes everything.
module tb_token_bucket_pf;
  import net_pkg::*;
  import pkt_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  tbf_cfg_t   cfg = '0;
  logic       s_valid = 0, s_ready, m_valid, m_ready = 1;
  axis_beat_t s_beat = '0, m_beat;
  logic [1:0] s_user = '0, m_user;
  logic [31:0] tokens, cnt_pass, cnt_drop;

  token_bucket_pf dut (.*);

  localparam longint unsigned A = 48'h0200_0000_00AA, B = 48'h0200_0000_00BB;

  int checks = 0, failures = 0, ready_pct = 100;
  bytes_t exp_q [$];
  bytes_t cur;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // receiver: random back-pressure, compares each finished packet
  always @(negedge clk) m_ready <= ($urandom_range(99) < ready_pct);
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    for (int i = 0; i < 32; i++) if (m_beat.tkeep[i]) cur.push_back(m_beat.tdata[i*8 +: 8]);
    if (m_beat.tlast) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected packet"); end
      else begin
        bytes_t e;
        e = exp_q.pop_front();
        if (e != cur) begin failures++; $display("FAIL: packet bytes differ (len %0d want %0d, b12 %h)", cur.size(), e.size(), cur[12]); end
      end
      cur = {};
    end
  end

  task automatic send(bytes_t f);
    int nb = (f.size() + 31) / 32;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      s_valid = 1;
      s_beat = '0;
      for (int i = 0; i < 32; i++)
        if (b * 32 + i < f.size()) begin
          s_beat.tdata[i*8 +: 8] = f[b*32 + i];
          s_beat.tkeep[i] = 1'b1;
        end
      s_beat.tlast = (b == nb - 1);
      #1;
      while (!s_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  task automatic drain();
    int t = 0;
    while ((exp_q.size() != 0 || m_valid) && t < 2000) begin @(posedge clk); t++; end
    check(exp_q.size() == 0, "all expected packets delivered");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int passed = 0, n_match = 0;
    cfg.enable = 1; cfg.src_mac = A; cfg.dst_mac = B;
    cfg.bucket_size = 5; cfg.token_period = 1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    check(tokens == 5, $sformatf("bucket capped at 5, got %0d", tokens));
    cfg.token_period = 1000000;
    ready_pct = 60;
    for (int k = 0; k < 24; k++) begin
      automatic bit m = (k % 3 != 2);
      automatic bytes_t f = make_frame(m ? B : A, m ? A : B, 2, 1, 2, k, 'h02, 40 + 29 * (k % 3));
      if (m) n_match++;
      if (!m || passed < 5) begin exp_q.push_back(f); if (m) passed++; end
      send(f);
    end
    drain();
    check(cnt_pass == 5 && cnt_drop == 32'(n_match - 5),
          $sformatf("counters pass=%0d drop=%0d", cnt_pass, cnt_drop));
    check(tokens == 0, "bucket empty");
    // refill rate: one token per 10 cycles
    @(negedge clk);
    cfg.token_period = 10; cfg.bucket_size = 100;
    repeat (100) @(posedge clk);
    #1;
    check(tokens >= 9 && tokens <= 11, $sformatf("refill 100 cycles/period 10 -> %0d", tokens));
    // disabled: everything passes
    cfg.enable = 0;
    ready_pct = 100;
    for (int k = 0; k < 6; k++) begin
      automatic bytes_t f = make_frame(B, A, 1, 1, 2, k, 0, 64);
      exp_q.push_back(f);
      send(f);
    end
    drain();
    check(cnt_pass == 5, "disabled filter does not count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
