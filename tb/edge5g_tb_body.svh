// edge5g_tb_body.svh: stimulus and checking shared by tb_edge5g_top
// (reduced sizes) and tb_edge5g_full (default sizes). The including module
// defines N (OFDM symbol size), CP (prefix length) and IPM (IP-match table
// entries), then instantiates edge5g_top as `dut` with `.*` after this
// file. All three subsystems run at the same time:
//   * DU: two A-law symbols through A-law expansion, iFFT and CP insertion,
//     every output sample compared with a real-arithmetic inverse DFT;
//   * SYN-flood switch: a forwarding entry, an IP-match session in the last
//     table entry, a sequential port scan from the monitored pair (dropped
//     above the threshold), and ordinary traffic;
//   * PF pipeline: a rate-limited flow (token bucket drops), learning,
//     flooding and unicast forwarding, with the image slot looped back.
// Each mechanism is counted; the test fails if any of them never occurs.
import ofdm_pkg::*;
import net_pkg::*;
import pkt_tb_pkg::*;

localparam int TOL = 4;
localparam real PI_R = 3.14159265358979323846;

logic clk = 1'b0, rst_n = 1'b0;
always #5 clk = ~clk;

// DU
logic       du_in_valid = 0, du_in_ready, du_out_valid, du_out_ready = 1;
logic       du_out_first, du_out_last, du_fft_busy;
logic [7:0] du_in_i = '0, du_in_q = '0;
iq_t        du_out_data;
// switch
logic        sw_s_valid = 0, sw_s_ready, sw_m_valid, sw_m_ready = 1;
axis_beat_t  sw_s_beat = '0, sw_m_beat;
logic [3:0]  sw_m_tdest, sw_default_port = 4'd8, sw_fwd_wr_port = '0;
logic [7:0]  sw_syn_threshold = 8'd3;
logic        sw_fwd_wr_en = 0, sw_fwd_wr_valid = 0, sw_ipm_wr_en = 0, sw_ipm_wr_valid = 0;
logic [5:0]  sw_fwd_wr_idx = '0;
logic [$clog2(IPM)-1:0] sw_ipm_wr_idx = '0;
logic [31:0] sw_fwd_wr_ip = '0, sw_ipm_wr_src = '0, sw_ipm_wr_dst = '0;
logic [31:0] sw_cnt_fwd, sw_cnt_drop, sw_cnt_syn;
// PF pipeline
logic        pf_s_valid [2], pf_s_ready [2];
axis_beat_t  pf_s_beat [2];
logic        pf_pd_m_valid [2], pf_pd_m_ready [2], pf_pd_s_valid [2], pf_pd_s_ready [2];
axis_beat_t  pf_pd_m_beat [2], pf_pd_s_beat [2];
logic        pf_m_valid [4], pf_m_ready [4];
axis_beat_t  pf_m_beat [4];
logic        pf_awvalid = 0, pf_awready, pf_wvalid = 0, pf_wready, pf_bvalid, pf_bready = 1;
logic        pf_arvalid = 0, pf_arready, pf_rvalid, pf_rready = 1;
logic [11:0] pf_awaddr = '0, pf_araddr = '0;
logic [31:0] pf_wdata = '0, pf_rdata;
logic [3:0]  pf_wstrb = 4'hF;
logic [1:0]  pf_bresp, pf_rresp;
logic [31:0] pf_cnt_learn, pf_cnt_flood, pf_pass [4], pf_drop [4];

for (genvar p = 0; p < 2; p++) begin : g_loop
  assign pf_pd_s_valid[p] = pf_pd_m_valid[p];
  assign pf_pd_s_beat[p]  = pf_pd_m_beat[p];
  assign pf_pd_m_ready[p] = pf_pd_s_ready[p];
end

int checks = 0, failures = 0;
// mechanism counters
int m_du_sym = 0, m_du_cp = 0, m_du_stall = 0;
int m_sw_fwd = 0, m_sw_default = 0, m_sw_syn_drop = 0, m_sw_scan_pass = 0;
int m_pf_tb_drop = 0, m_pf_learn = 0, m_pf_flood = 0, m_pf_unicast = 0;

task automatic check(bit cond, string what);
  checks++;
  if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
endtask

initial begin
  #50000000;
  failures++;
  $display("FAIL: watchdog");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

// ---------------- DU ----------------
localparam int NSYM = 2;
byte unsigned codes_i [NSYM][N], codes_q [NSYM][N];
real exp_re [NSYM][N + CP], exp_im [NSYM][N + CP];
real cos_t [N], sin_t [N];

function automatic int alaw(byte unsigned c);
  int a, seg, mag;
  a = c ^ 'h55;
  seg = (a >> 4) & 7;
  mag = (seg == 0) ? ((a & 15) << 4) + 8 : (((a & 15) << 4) + 'h108) << (seg - 1);
  return (a & 'h80) ? mag : -mag;
endfunction

task automatic build_symbol(int s);
  int  vr [N], vi [N];
  real xr [N], xi [N];
  for (int k = 0; k < N; k++) begin vr[k] = alaw(codes_i[s][k]); vi[k] = alaw(codes_q[s][k]); end
  for (int n = 0; n < N; n++) begin
    real ar, ai;
    int  idx;
    ar = 0; ai = 0; idx = 0;
    for (int k = 0; k < N; k++) begin
      ar += vr[k] * cos_t[idx] - vi[k] * sin_t[idx];
      ai += vi[k] * cos_t[idx] + vr[k] * sin_t[idx];
      idx = (idx + n) % N;
    end
    xr[n] = ar / N; xi[n] = ai / N;
  end
  for (int n = 0; n < N + CP; n++) begin
    exp_re[s][n] = xr[(n + N - CP) % N];
    exp_im[s][n] = xi[(n + N - CP) % N];
  end
endtask

always @(negedge clk) du_out_ready <= ($urandom_range(99) < 80);
always @(posedge clk) if (rst_n && du_out_valid && !du_out_ready) m_du_stall++;

task automatic du_run();
  for (int k = 0; k < N; k++) begin cos_t[k] = $cos(2.0 * PI_R * k / N); sin_t[k] = $sin(2.0 * PI_R * k / N); end
  for (int s = 0; s < NSYM; s++) begin
    for (int k = 0; k < N; k++) begin
      codes_i[s][k] = 8'($urandom());
      codes_q[s][k] = 8'($urandom());
    end
    build_symbol(s);
  end
  fork
    for (int s = 0; s < NSYM; s++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        du_in_valid = 1; du_in_i = codes_i[s][k]; du_in_q = codes_q[s][k];
        #1;
        while (!du_in_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1 du_in_valid = 0;
      end
    for (int s = 0; s < NSYM; s++) begin
      int bad;
      bad = 0;
      for (int n = 0; n < N + CP; n++) begin
        real dr, di;
        @(posedge clk);
        while (!(du_out_valid && du_out_ready)) @(posedge clk);
        dr = real'(int'(du_out_data.re)) - exp_re[s][n];
        di = real'(int'(du_out_data.im)) - exp_im[s][n];
        if (dr > TOL || dr < -TOL || di > TOL || di < -TOL) bad++;
        if (n < CP && dr <= TOL && dr >= -TOL && di <= TOL && di >= -TOL) m_du_cp++;
        if (du_out_first != (n == 0) || du_out_last != (n == N + CP - 1)) bad++;
      end
      check(bad == 0, $sformatf("DU symbol %0d: %0d bad samples", s, bad));
      m_du_sym++;
    end
  join
endtask

// ---------------- switch ----------------
localparam int unsigned VICTIM = 32'h0A00_0001, ATTACKER = 32'hC0A8_0101, OTHER = 32'h0A00_0002;
bytes_t sw_exp [$];
int     sw_exp_port [$];
bytes_t sw_cur;

always @(posedge clk) if (rst_n && sw_m_valid && sw_m_ready) begin
  for (int i = 0; i < 32; i++) if (sw_m_beat.tkeep[i]) sw_cur.push_back(sw_m_beat.tdata[i*8 +: 8]);
  if (sw_m_beat.tlast) begin
    bytes_t e;
    int p;
    checks++;
    if (sw_exp.size() == 0) begin failures++; $display("FAIL: switch: unexpected packet"); end
    else begin
      e = sw_exp.pop_front();
      p = sw_exp_port.pop_front();
      if (e != sw_cur || int'(sw_m_tdest) != p) begin
        failures++;
        $display("FAIL: switch: packet differs (port %0d want %0d)", sw_m_tdest, p);
      end
      else if (p == 8) m_sw_default++;
      else m_sw_fwd++;
    end
    sw_cur = {};
  end
end

task automatic sw_send(bytes_t f);
  int nb = (f.size() + 31) / 32;
  for (int b = 0; b < nb; b++) begin
    @(negedge clk);
    sw_s_valid = 1;
    sw_s_beat = '0;
    for (int i = 0; i < 32; i++)
      if (b * 32 + i < f.size()) begin
        sw_s_beat.tdata[i*8 +: 8] = f[b*32 + i];
        sw_s_beat.tkeep[i] = 1'b1;
      end
    sw_s_beat.tlast = (b == nb - 1);
    #1;
    while (!sw_s_ready) begin @(negedge clk); #1; end
    @(posedge clk);
  end
  @(negedge clk);
  sw_s_valid = 0;
endtask

task automatic sw_run();
  int last_p = 0, att = 0;
  @(negedge clk);
  sw_fwd_wr_en = 1; sw_fwd_wr_valid = 1; sw_fwd_wr_idx = 0;
  sw_fwd_wr_ip = VICTIM; sw_fwd_wr_port = 4'd1;
  sw_ipm_wr_en = 1; sw_ipm_wr_valid = 1; sw_ipm_wr_idx = $clog2(IPM)'(IPM - 1);
  sw_ipm_wr_src = ATTACKER; sw_ipm_wr_dst = VICTIM;
  @(negedge clk);
  sw_fwd_wr_en = 0; sw_ipm_wr_en = 0;
  for (int k = 0; k < 30; k++) begin
    automatic bytes_t f;
    automatic int port = (k < 20) ? 1000 + k : 5 + 7 * k;
    if (k % 5 == 4) begin
      // ordinary traffic: not monitored, to an unknown destination
      f = make_frame(48'h0200_0000_0001, 48'h0200_0000_0002, 2, OTHER, OTHER + 1, port, 'h02, 80);
      sw_exp.push_back(f); sw_exp_port.push_back(8);
    end else begin
      f = make_frame(48'h0200_0000_0001, 48'h0200_0000_0003, 2, ATTACKER, VICTIM, port, 'h02, 60);
      att = (port == last_p + 1) ? att + 1 : 1;
      last_p = port;
      if (att > 3) m_sw_syn_drop++;
      else begin sw_exp.push_back(f); sw_exp_port.push_back(1); m_sw_scan_pass++; end
    end
    sw_send(f);
  end
  repeat (100) @(posedge clk);
  check(sw_exp.size() == 0, "switch: all expected packets forwarded");
  check(sw_cnt_drop == 32'(m_sw_syn_drop), $sformatf("switch: %0d drops want %0d", sw_cnt_drop,
                                                     m_sw_syn_drop));
endtask

// ---------------- PF pipeline ----------------
localparam longint unsigned HA = 48'h0200_0000_000A, HB = 48'h0200_0000_000B;
bytes_t pf_exp [4][$];
bytes_t pf_cur [4];

for (genvar o = 0; o < 4; o++) begin : g_rx
  always @(negedge clk) pf_m_ready[o] <= ($urandom_range(99) < 70);
  always @(posedge clk) if (rst_n && pf_m_valid[o] && pf_m_ready[o]) begin
    for (int i = 0; i < 32; i++)
      if (pf_m_beat[o].tkeep[i]) pf_cur[o].push_back(pf_m_beat[o].tdata[i*8 +: 8]);
    if (pf_m_beat[o].tlast) begin
      int hit;
      hit = -1;
      for (int k = 0; k < pf_exp[o].size(); k++) if (hit < 0 && pf_exp[o][k] == pf_cur[o]) hit = k;
      checks++;
      if (hit < 0) begin failures++; $display("FAIL: PF: unexpected packet on port %0d", o); end
      else pf_exp[o].delete(hit);
      pf_cur[o] = {};
    end
  end
end

task automatic pf_send(int p, bytes_t f);
  int nb = (f.size() + 31) / 32;
  for (int b = 0; b < nb; b++) begin
    @(negedge clk);
    pf_s_valid[p] = 1;
    pf_s_beat[p] = '0;
    for (int i = 0; i < 32; i++)
      if (b * 32 + i < f.size()) begin
        pf_s_beat[p].tdata[i*8 +: 8] = f[b*32 + i];
        pf_s_beat[p].tkeep[i] = 1'b1;
      end
    pf_s_beat[p].tlast = (b == nb - 1);
    #1;
    while (!pf_s_ready[p]) begin @(negedge clk); #1; end
    @(posedge clk);
  end
  @(negedge clk);
  pf_s_valid[p] = 0;
endtask

task automatic pf_write(logic [11:0] a, logic [31:0] d);
  @(negedge clk);
  pf_awvalid = 1; pf_wvalid = 1; pf_awaddr = a; pf_wdata = d;
  #1;
  while (!pf_awready) begin @(negedge clk); #1; end
  @(posedge clk);
  @(negedge clk);
  pf_awvalid = 0; pf_wvalid = 0;
endtask

function automatic int pf_pending();
  int n = 0;
  for (int o = 0; o < 4; o++) n += pf_exp[o].size();
  return n;
endfunction

task automatic pf_run();
  int t = 0, passed = 0;
  bytes_t f;
  // DDoS PF 1 of input 0 (window 0): HA -> HB limited to 2 packets
  pf_write(12'h004, 32'(HA)); pf_write(12'h008, 32'(HA >> 32));
  pf_write(12'h00C, 32'(HB)); pf_write(12'h010, 32'(HB >> 32));
  pf_write(12'h014, 32'd2);
  repeat (5) @(posedge clk);
  pf_write(12'h018, 32'd1000000);
  pf_write(12'h000, 32'd1);
  // HB (input 1) announces itself with a broadcast: learned and flooded
  f = make_frame(48'hFFFF_FFFF_FFFF, HB, 1, 1, 2, 0, 0, 64);
  for (int o = 0; o < 4; o++) if (o != 1) pf_exp[o].push_back(f);
  m_pf_flood++; m_pf_learn++;
  pf_send(1, f);
  while (pf_pending() != 0 && t < 2000) begin @(posedge clk); t++; end
  // HA (input 0) sends 6 packets to HB: learned, unicast to port 1, 4 dropped
  for (int k = 0; k < 6; k++) begin
    f = make_frame(HB, HA, 1, 1, 2, k, 0, 50 + 10 * k);
    if (passed < 2) begin pf_exp[1].push_back(f); passed++; m_pf_unicast++; end
    else m_pf_tb_drop++;
    pf_send(0, f);
  end
  m_pf_learn++;
  t = 0;
  while (pf_pending() != 0 && t < 2000) begin @(posedge clk); t++; end
  check(pf_pending() == 0, "PF: all expected packets delivered");
  check(pf_drop[0] == 32'(m_pf_tb_drop), "PF: token-bucket drop counter");
  check(pf_cnt_learn == 32'(m_pf_learn) && pf_cnt_flood == 32'(m_pf_flood),
        "PF: learn / flood counters");
endtask

initial begin
  for (int p = 0; p < 2; p++) begin pf_s_valid[p] = 0; pf_s_beat[p] = '0; end
  repeat (3) @(posedge clk);
  rst_n = 1'b1;
  fork
    du_run();
    sw_run();
    pf_run();
  join
  $display("MECH du_symbols=%0d du_cp_samples=%0d du_backpressure=%0d", m_du_sym, m_du_cp,
           m_du_stall);
  $display("MECH sw_table_fwd=%0d sw_default_port=%0d sw_syn_drop=%0d sw_scan_pass=%0d",
           m_sw_fwd, m_sw_default, m_sw_syn_drop, m_sw_scan_pass);
  $display("MECH pf_token_drop=%0d pf_learn=%0d pf_flood=%0d pf_unicast=%0d", m_pf_tb_drop,
           m_pf_learn, m_pf_flood, m_pf_unicast);
  check(m_du_sym == NSYM && m_du_cp == NSYM * CP && m_du_stall > 0, "DU mechanisms occurred");
  check(m_sw_fwd > 0 && m_sw_default > 0 && m_sw_syn_drop > 0 && m_sw_scan_pass > 0,
        "switch mechanisms occurred");
  check(m_pf_tb_drop > 0 && m_pf_learn > 0 && m_pf_flood > 0 && m_pf_unicast > 0,
        "PF mechanisms occurred");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
