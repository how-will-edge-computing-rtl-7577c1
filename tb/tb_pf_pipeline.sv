// tb_pf_pipeline: end-to-end test of the PF pipeline with the image-
// processing slot looped back. The host programs DDoS PF 1 of input 0
// over AXI4-Lite to rate-limit one flow (bucket of 3 tokens, no refill).
// A learning phase teaches the switch where two hosts live (input 0 ->
// port 0, input 1 -> port 1); then both inputs send traffic at the same
// time: unicast to the learned host, unknown destinations (flooded to all
// other ports), broadcasts, and the limited flow, whose packets beyond the
// third must be dropped. Outputs run under random back-pressure. Every
// packet received on every output port must match one expected for that
// port (order between the two inputs is not fixed), none may be missing,
// and the PF drop and switch counters must agree.
module tb_pf_pipeline;
  import net_pkg::*;
  import pkt_tb_pkg::*;
  localparam int NI = 2, NO = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        s_valid [NI], s_ready [NI];
  axis_beat_t  s_beat [NI];
  logic        pd_m_valid [NI], pd_m_ready [NI], pd_s_valid [NI], pd_s_ready [NI];
  axis_beat_t  pd_m_beat [NI], pd_s_beat [NI];
  logic        m_valid [NO], m_ready [NO];
  axis_beat_t  m_beat [NO];
  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic        arvalid = 0, arready, rvalid, rready = 1;
  logic [11:0] awaddr = '0, araddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = 4'hF;
  logic [1:0]  bresp, rresp;
  logic [31:0] cnt_learn, cnt_flood, pf_pass [2*NI], pf_drop [2*NI];

  pf_pipeline #(.NUM_IN(NI), .NUM_OUT(NO), .QUEUE_BEATS(16), .MAC_ENTRIES(16)) dut (.*);

  // image-processing slot bypassed
  for (genvar p = 0; p < NI; p++) begin : g_loop
    assign pd_s_valid[p] = pd_m_valid[p];
    assign pd_s_beat[p]  = pd_m_beat[p];
    assign pd_m_ready[p] = pd_s_ready[p];
  end

  int checks = 0, failures = 0;
  bytes_t exp_q [NO][$];
  bytes_t cur [NO];
  int     n_rx [NO];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  for (genvar o = 0; o < NO; o++) begin : g_rx
    always @(negedge clk) m_ready[o] <= ($urandom_range(99) < 60);
    always @(posedge clk) if (rst_n && m_valid[o] && m_ready[o]) begin
      for (int i = 0; i < 32; i++)
        if (m_beat[o].tkeep[i]) cur[o].push_back(m_beat[o].tdata[i*8 +: 8]);
      if (m_beat[o].tlast) begin
        int hit;
        hit = -1;
        for (int k = 0; k < exp_q[o].size(); k++) if (hit < 0 && exp_q[o][k] == cur[o]) hit = k;
        checks++;
        if (hit < 0) begin failures++; $display("FAIL: unexpected packet on port %0d", o); end
        else exp_q[o].delete(hit);
        n_rx[o]++;
        cur[o] = {};
      end
    end
  end

  task automatic send(int p, bytes_t f);
    int nb = (f.size() + 31) / 32;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      s_valid[p] = 1;
      s_beat[p] = '0;
      for (int i = 0; i < 32; i++)
        if (b * 32 + i < f.size()) begin
          s_beat[p].tdata[i*8 +: 8] = f[b*32 + i];
          s_beat[p].tkeep[i] = 1'b1;
        end
      s_beat[p].tlast = (b == nb - 1);
      #1;
      while (!s_ready[p]) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    s_valid[p] = 0;
  endtask

  task automatic expect_pkt(bytes_t f, int mask);
    for (int o = 0; o < NO; o++) if (mask[o]) exp_q[o].push_back(f);
  endtask

  task automatic axi_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    #1;
    while (!awready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
  endtask

  function automatic int pending();
    int n = 0;
    for (int o = 0; o < NO; o++) n += exp_q[o].size();
    return n;
  endfunction

  task automatic drain();
    int t = 0;
    while (pending() != 0 && t < 5000) begin @(posedge clk); t++; end
    repeat (50) @(posedge clk);
  endtask

  localparam longint unsigned HA = 48'h0200_0000_000A, HB = 48'h0200_0000_000B;
  localparam longint unsigned BC = 48'hFFFF_FFFF_FFFF;

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_lim_sent = 0, n_lim_pass = 0, n_flood = 0;

  initial begin
    for (int p = 0; p < NI; p++) begin s_valid[p] = 0; s_beat[p] = '0; end
    for (int o = 0; o < NO; o++) n_rx[o] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // PF window 1 = DDoS PF 2 of input 0: limit HA -> HB to 3 packets
    axi_write(12'h020 + 12'h04, 32'(HA));
    axi_write(12'h020 + 12'h08, 32'(HA >> 32));
    axi_write(12'h020 + 12'h0C, 32'(HB));
    axi_write(12'h020 + 12'h10, 32'(HB >> 32));
    axi_write(12'h020 + 12'h14, 32'd3);
    repeat (10) @(posedge clk);
    axi_write(12'h020 + 12'h18, 32'd1000000);
    axi_write(12'h020 + 12'h00, 32'd1);
    // learning phase (host C, on input 0, is learned from its first packet later)
    begin
      bytes_t f;
      f = make_frame(BC, HA, 1, 1, 2, 1, 0, 64);
      expect_pkt(f, 4'b1110); n_flood++;
      send(0, f);
      drain();
      f = make_frame(HA, HB, 1, 1, 2, 2, 0, 64);
      expect_pkt(f, 4'b0001);
      send(1, f);
      drain();
    end
    // traffic phase, both inputs at once
    fork
      for (int k = 0; k < 40; k++) begin
        automatic int kind = k % 4;
        automatic bytes_t f;
        case (kind)
          0: begin   // limited flow
            f = make_frame(HB, HA, 2, 1, 2, 100 + k, 'h10, 60 + k);
            n_lim_sent++;
            if (n_lim_pass < 3) begin expect_pkt(f, 4'b0010); n_lim_pass++; end
          end
          1: begin f = make_frame(48'h0200_0000_0077, HA, 1, 1, 2, k, 0, 90); expect_pkt(f, 4'b1110); n_flood++; end
          2: begin f = make_frame(BC, HA, 1, 1, 2, k, 0, 40); expect_pkt(f, 4'b1110); n_flood++; end
          default: begin f = make_frame(HB, 48'h0200_0000_000C, 1, 1, 2, k, 0, 33 + k); expect_pkt(f, 4'b0010); end
        endcase
        send(0, f);
      end
      for (int k = 0; k < 40; k++) begin
        automatic bytes_t f;
        if (k % 3 == 0) begin f = make_frame(48'h0200_0000_0088, HB, 1, 3, 4, k, 0, 70); expect_pkt(f, 4'b1101); n_flood++; end
        else begin f = make_frame(HA, HB, 2, 3, 4, k, 'h02, 50 + 3 * k); expect_pkt(f, 4'b0001); end
        send(1, f);
      end
    join
    drain();
    check(pending() == 0, $sformatf("%0d expected packets missing", pending()));
    check(pf_drop[1] == 32'(n_lim_sent - 3) && pf_pass[1] == 3,
          $sformatf("PF drop %0d pass %0d", pf_drop[1], pf_pass[1]));
    check(pf_drop[0] == 0 && pf_drop[2] == 0 && pf_drop[3] == 0, "other PFs idle");
    check(cnt_learn == 3, $sformatf("learned %0d", cnt_learn));
    check(cnt_flood == 32'(n_flood), $sformatf("flooded %0d want %0d", cnt_flood, n_flood));
    $display("rx per port %0d %0d %0d %0d", n_rx[0], n_rx[1], n_rx[2], n_rx[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
