// tb_p4_synflood_switch: end-to-end test of the SYN-flood mitigation
// switch. The control plane installs forwarding entries and monitored
// sessions; the test then sends a port scan (dports 81, 82, ...) as in the
// reference capture, ordinary TCP, UDP and non-IP traffic, a scan from an
// unmonitored host and a non-sequential SYN. A software model decides
// for every frame whether it must leave and on which port; the received
// frames are compared byte by byte, and the packet counters are checked.
// The output is stalled at random to exercise back-pressure.
module tb_p4_synflood_switch;
  import net_pkg::*;
  import pkt_tb_pkg::*;

  localparam int PORTS = 4;
  localparam int IPM   = 16;
  localparam int FWD   = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_valid = 1'b0, s_ready, m_valid, m_ready = 1'b1;
  axis_beat_t s_beat = '0, m_beat;
  logic [PORTS-1:0] m_tdest;
  logic [7:0] syn_threshold = 8'd3;
  logic [PORTS-1:0] default_port = 4'b1000;
  logic fwd_wr_en = 0, fwd_wr_valid = 0, ipm_wr_en = 0, ipm_wr_valid = 0;
  logic [$clog2(FWD)-1:0] fwd_wr_idx = '0;
  logic [$clog2(IPM)-1:0] ipm_wr_idx = '0;
  logic [31:0] fwd_wr_ip = '0, ipm_wr_src = '0, ipm_wr_dst = '0;
  logic [PORTS-1:0] fwd_wr_port = '0;
  logic [31:0] cnt_fwd, cnt_drop, cnt_syn;

  p4_synflood_switch #(.IPM_ENTRIES(IPM), .FWD_ENTRIES(FWD), .FIFO_BEATS(64),
                       .PORTS(PORTS)) dut (.*);

  int checks = 0, failures = 0;
  bytes_t expq [$];
  int     expport [$];
  int     n_drop_exp = 0, n_fwd_exp = 0, n_syn_exp = 0;
  int     rx_done = 0;
  bit     stall_out = 1'b1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic send(bytes_t f);
    int nb = (f.size() + 31) / 32;
    for (int b = 0; b < nb; b++) begin
      axis_beat_t bt;
      bt = '0;
      for (int i = 0; i < 32; i++)
        if (b * 32 + i < f.size()) begin
          bt.tdata[i*8 +: 8] = f[b*32 + i];
          bt.tkeep[i] = 1'b1;
        end
      bt.tlast = (b == nb - 1);
      @(negedge clk);
      s_beat  = bt;
      s_valid = 1'b1;
      #1;
      while (!s_ready) begin
        @(negedge clk);
        #1;
      end
      @(posedge clk);
    end
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  // Reference model of the program.
  int unsigned mon_src [$], mon_dst [$];
  int last_port [IPM], attempts [IPM];
  int unsigned fwd_ip [$];
  int fwd_pt [$];

  function automatic int model_port(int unsigned dip, bit ip);
    if (ip) foreach (fwd_ip[i]) if (fwd_ip[i] == dip) return fwd_pt[i];
    return 8;
  endfunction

  task automatic frame(longint unsigned smac, int kind, int unsigned sip, int unsigned dip,
                       int dport, int flags, int len);
    bytes_t f;
    bit drop = 0;
    f = make_frame(48'h0002_0304_0506, smac, kind, sip, dip, dport, flags, len);
    if (kind == 2 && (flags & 'h12) == 'h02) begin
      foreach (mon_src[i]) if (mon_src[i] == sip && mon_dst[i] == dip) begin
        attempts[i] = (dport == ((last_port[i] + 1) & 'hFFFF)) ? attempts[i] + 1 : 1;
        last_port[i] = dport;
        drop = attempts[i] > int'(syn_threshold);
        n_syn_exp++;
      end
    end
    if (drop) n_drop_exp++;
    else begin
      n_fwd_exp++;
      expq.push_back(f);
      expport.push_back(model_port(dip, kind != 0));
    end
    send(f);
  endtask

  // Receiver.
  bytes_t cur;
  always @(posedge clk) begin
    if (stall_out) m_ready <= 1'($urandom_range(0, 3) != 0);
    else           m_ready <= 1'b1;
    if (rst_n && m_valid && m_ready) begin
      for (int i = 0; i < 32; i++) if (m_beat.tkeep[i]) cur.push_back(m_beat.tdata[i*8 +: 8]);
      if (m_beat.tlast) begin
        if (expq.size() == 0) check(0, "unexpected frame");
        else begin
          bytes_t e;
          int p;
          e = expq.pop_front();
          p = expport.pop_front();
          check(e == cur, $sformatf("frame %0d content (len %0d vs %0d)", rx_done,
                                    cur.size(), e.size()));
          check(int'(m_tdest) == p, $sformatf("frame %0d port %0d want %0d", rx_done,
                                              m_tdest, p));
        end
        cur.delete();
        rx_done++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned victim = 32'h0A00_010A, attacker = 32'h0A00_020F, other = 32'h0A00_0309;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // forwarding entries
    fwd_wr_en <= 1; fwd_wr_valid <= 1;
    fwd_wr_idx <= 0; fwd_wr_ip <= victim; fwd_wr_port <= 4'b0001;
    @(posedge clk);
    fwd_wr_idx <= 1; fwd_wr_ip <= other;  fwd_wr_port <= 4'b0010;
    @(posedge clk);
    fwd_wr_en <= 0;
    fwd_ip.push_back(victim); fwd_pt.push_back(1);
    fwd_ip.push_back(other);  fwd_pt.push_back(2);
    // monitored session attacker -> victim at entry 5
    ipm_wr_en <= 1; ipm_wr_valid <= 1; ipm_wr_idx <= 5;
    ipm_wr_src <= attacker; ipm_wr_dst <= victim;
    @(posedge clk);
    ipm_wr_en <= 0;
    mon_src.push_back(attacker); mon_dst.push_back(victim);
    foreach (attempts[i]) begin attempts[i] = 0; last_port[i] = 0; end
    @(posedge clk);

    // Port scan 81..100, one SYN per port, interleaved with normal traffic.
    for (int p = 81; p <= 100; p++) begin
      frame(48'hAAAA_AAAA_AAAA, 2, attacker, victim, p, 'h02, 60 + (p % 5) * 40);
      frame(48'h0001_0203_0405, 2, other, victim, 443, 'h18, 64);
    end
    // UDP, non-IP, SYN-ACK of the monitored pair, unmonitored scan
    frame(48'h0A0B_0C0D_0E0F, 1, attacker, victim, 53, 0, 100);
    frame(48'h0A0B_0C0D_0E0F, 0, 0, 0, 0, 0, 64);
    frame(48'hAAAA_AAAA_AAAA, 2, attacker, victim, 101, 'h12, 64);
    for (int p = 1000; p < 1010; p++) frame(48'h1111_2222_3333, 2, other, 32'h0A00_0999, p, 'h02, 64);
    // A non-sequential SYN restarts the count.
    frame(48'hAAAA_AAAA_AAAA, 2, attacker, victim, 7, 'h02, 64);
    frame(48'hAAAA_AAAA_AAAA, 2, attacker, victim, 8, 'h02, 64);
    // Short frames back to back without output stalls
    stall_out = 1'b0;
    for (int p = 0; p < 6; p++) frame(48'h0101_0101_0101, 2, other, other, p, 'h10, 33);
    repeat (200) @(posedge clk);
    check(expq.size() == 0, $sformatf("%0d frames never arrived", expq.size()));
    check(cnt_fwd == 32'(n_fwd_exp), $sformatf("cnt_fwd %0d want %0d", cnt_fwd, n_fwd_exp));
    check(cnt_drop == 32'(n_drop_exp), $sformatf("cnt_drop %0d want %0d", cnt_drop, n_drop_exp));
    check(cnt_syn == 32'(n_syn_exp), $sformatf("cnt_syn %0d want %0d", cnt_syn, n_syn_exp));
    check(n_drop_exp == 17, "scan 84..100 dropped in the model");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
