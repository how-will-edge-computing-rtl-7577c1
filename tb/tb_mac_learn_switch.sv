// tb_mac_learn_switch: sends 300 random packets between ten hosts (one of
// them moving between ports) plus broadcasts through a mac_learn_switch
// with an 8-entry table, so learning, station moves, round-robin
// replacement, flooding on miss and on group addresses, and filtering back
// to the source port all occur. A software copy of the table predicts the
// port mask of every packet; the receiver compares bytes and mask under
// random back-pressure, and the learn/flood counters are compared at the end.
module tb_mac_learn_switch;
  import net_pkg::*;
  import pkt_tb_pkg::*;
  localparam int P = 4, E = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       s_valid = 0, s_ready, m_valid, m_ready = 1;
  axis_beat_t s_beat = '0, m_beat;
  logic [1:0] s_port = '0;
  logic [P-1:0] m_tdest;
  logic [31:0] cnt_learn, cnt_flood;

  mac_learn_switch #(.PORTS(P), .MAC_ENTRIES(E)) dut (.*);

  int checks = 0, failures = 0;
  int n_learn = 0, n_flood = 0, n_filter = 0, n_unicast = 0, n_move = 0;
  bytes_t exp_q [$];
  int     exp_m [$];
  bytes_t cur;

  // model table
  bit              t_valid [E];
  longint unsigned t_mac [E];
  int              t_port [E];
  int              repl = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int lookup(longint unsigned m);
    for (int i = 0; i < E; i++) if (t_valid[i] && t_mac[i] == m) return i;
    return -1;
  endfunction

  always @(negedge clk) m_ready <= ($urandom_range(99) < 70);
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    for (int i = 0; i < 32; i++) if (m_beat.tkeep[i]) cur.push_back(m_beat.tdata[i*8 +: 8]);
    if (m_beat.tlast) begin
      bytes_t e;
      int em;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected packet"); end
      else begin
        e = exp_q.pop_front();
        em = exp_m.pop_front();
        if (e != cur || int'(m_tdest) != em) begin
          failures++;
          $display("FAIL: packet differs, mask %b want %b", m_tdest, em[P-1:0]);
        end
      end
      cur = {};
    end
  end

  task automatic send(bytes_t f, int port);
    int nb = (f.size() + 31) / 32;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      s_valid = 1;
      s_port = 2'(port);
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

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned hosts [10];
    int home [10];
    for (int h = 0; h < 10; h++) begin
      hosts[h] = 48'h0200_0000_1000 + h;
      home[h]  = h % P;
    end
    foreach (t_valid[i]) t_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      automatic int s = $urandom_range(9);
      automatic int d = $urandom_range(10);   // 10 = broadcast
      automatic longint unsigned dm = (d == 10) ? 48'hFFFF_FFFF_FFFF : hosts[d];
      automatic int di, si, mask;
      automatic bytes_t f;
      if (s == 9 && $urandom_range(3) == 0) begin home[9] = (home[9] + 1) % P; n_move++; end
      f = make_frame(dm, hosts[s], 1, 1, 2, k, 0, 40 + $urandom_range(60));
      di = lookup(dm);
      if (di >= 0 && d != 10) begin
        mask = (1 << t_port[di]) & ~(1 << home[s]);
        if (mask == 0) n_filter++; else n_unicast++;
      end else begin
        mask = ~(1 << home[s]) & ((1 << P) - 1);
        n_flood++;
      end
      si = lookup(hosts[s]);
      if (si >= 0) t_port[si] = home[s];
      else begin
        t_valid[repl] = 1; t_mac[repl] = hosts[s]; t_port[repl] = home[s];
        repl = (repl + 1) % E;
        n_learn++;
      end
      if (mask != 0) begin exp_q.push_back(f); exp_m.push_back(mask); end
      send(f, home[s]);
    end
    repeat (200) @(posedge clk);
    check(exp_q.size() == 0, "all packets delivered");
    check(cnt_learn == 32'(n_learn), $sformatf("learn %0d want %0d", cnt_learn, n_learn));
    check(cnt_flood == 32'(n_flood), $sformatf("flood %0d want %0d", cnt_flood, n_flood));
    check(n_filter > 0 && n_unicast > 0 && n_move > 0 && n_learn > E, "all cases exercised");
    $display("learn=%0d flood=%0d unicast=%0d filter=%0d move=%0d", n_learn, n_flood,
             n_unicast, n_filter, n_move);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
