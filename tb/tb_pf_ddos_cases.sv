// tb_pf_ddos_cases: the six DDoS test cases of the PF pipeline, scaled to a
// short simulation. One input carries an aggregate of three streams S1, S2
// and S3 (single-beat frames told apart by their MAC addresses); the
// token buckets are set to a threshold of one packet per T = 20 cycles
// with a bucket of 4 tokens. "Below" means one packet every 25 cycles
// (0.8 x threshold), "above" one every 10 cycles (2 x threshold); S3
// stands for the camera stream and is never filtered.
//   case 1: PF 1 on S1, S1 below          case 2: PF 1 on S1, S1 above
//   case 3: PF 1 and PF 2 on S1, below    case 4: PF 1 and PF 2 on S1, above
//   case 5: PF 1 on S1, PF 2 on S2, both below
//   case 6: PF 1 on S1, PF 2 on S2, both above
// A stream below the threshold must lose nothing; a stream above it must
// be cut to W/T packets (plus at most the bucket of each PF) over a
// W-cycle window; unfiltered streams must lose nothing. The latency of
// every delivered frame (send cycle stamped in the payload) must be the
// same in all six cases: the filters never stall the stream.
module tb_pf_ddos_cases;
  import net_pkg::*;
  import pkt_tb_pkg::*;
  localparam int T = 20, BUCKET = 4, W = 4000, BELOW = 25, ABOVE = 10, S3_P = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        s_valid [2], s_ready [2];
  axis_beat_t  s_beat [2];
  logic        pd_m_valid [2], pd_m_ready [2], pd_s_valid [2], pd_s_ready [2];
  axis_beat_t  pd_m_beat [2], pd_s_beat [2];
  logic        m_valid [4], m_ready [4];
  axis_beat_t  m_beat [4];
  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic        arvalid = 0, arready, rvalid, rready = 1;
  logic [11:0] awaddr = '0, araddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = 4'hF;
  logic [1:0]  bresp, rresp;
  logic [31:0] cnt_learn, cnt_flood, pf_pass [4], pf_drop [4];

  pf_pipeline dut (.*);

  for (genvar p = 0; p < 2; p++) begin : g_loop
    assign pd_s_valid[p] = pd_m_valid[p];
    assign pd_s_beat[p]  = pd_m_beat[p];
    assign pd_m_ready[p] = pd_s_ready[p];
  end
  for (genvar o = 0; o < 4; o++) begin : g_rdy
    assign m_ready[o] = 1'b1;
  end

  localparam longint unsigned DST = 48'h0200_0000_00D0;
  localparam longint unsigned SRC [3] = '{48'h0200_0000_0051, 48'h0200_0000_0052,
                                           48'h0200_0000_0053};

  int checks = 0, failures = 0;
  int cyc = 0;
  int rx [3];
  int lat_min, lat_max;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // count deliveries on output port 1 (unknown destination: flooded)
  always @(posedge clk) if (rst_n && m_valid[1]) begin
    for (int s = 0; s < 3; s++)
      if (m_beat[1].tdata[95:48] == {SRC[s][7:0], SRC[s][15:8], SRC[s][23:16], SRC[s][31:24],
                                     SRC[s][39:32], SRC[s][47:40]}) begin
        int lat;
        rx[s]++;
        lat = cyc - int'(m_beat[1].tdata[191:160]);
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
      end
  end

  task automatic axi_write(logic [11:0] a, logic [31:0] d);
    @(negedge clk);
    awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    #1;
    while (!awready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
  endtask

  task automatic set_pf(int win, int stream);
    logic [11:0] b = 12'(win * 32);
    axi_write(b + 12'h04, 32'(SRC[stream])); axi_write(b + 12'h08, 32'(SRC[stream] >> 32));
    axi_write(b + 12'h0C, 32'(DST));         axi_write(b + 12'h10, 32'(DST >> 32));
    axi_write(b + 12'h14, BUCKET);           axi_write(b + 12'h18, T);
    axi_write(b + 12'h00, 1);
  endtask

  // one case: PF windows 0/1 on the given streams (-1 = off), periods per stream
  task automatic run_case(int c, int pf1, int pf2, int p1, int p2, output int case_lat);
    int sent [3], q [$], exp_lo, exp_hi;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    if (pf1 >= 0) set_pf(0, pf1);
    if (pf2 >= 0) set_pf(1, pf2);
    repeat (10 * T) @(posedge clk);     // buckets fill
    rx = '{0, 0, 0}; sent = '{0, 0, 0};
    lat_min = 1 << 30; lat_max = 0;
    for (int t = 0; t < W; t++) begin
      bytes_t f;
      if (t % p1 == 0) q.push_back(0);
      if (t % p2 == 3) q.push_back(1);
      if (t % S3_P == 5) q.push_back(2);
      @(negedge clk);
      if (q.size() != 0 && s_ready[0]) begin
        int s = q.pop_front();
        f = make_frame(DST, SRC[s], 1, 1, 2, t, 0, 32);
        s_beat[0] = '0;
        for (int i = 0; i < 32; i++) s_beat[0].tdata[i*8 +: 8] = f[i];
        s_beat[0].tdata[191:160] = 32'(cyc);
        s_beat[0].tkeep = '1;
        s_beat[0].tlast = 1;
        s_valid[0] = 1;
        sent[s]++;
      end else s_valid[0] = 0;
      @(posedge clk);
    end
    @(negedge clk);
    s_valid[0] = 0;
    repeat (200) @(posedge clk);
    for (int s = 0; s < 3; s++) begin
      int filters = (pf1 == s) + (pf2 == s);
      int period = (s == 0) ? p1 : (s == 1) ? p2 : S3_P;
      if (filters == 0 || period > T) begin
        check(rx[s] == sent[s], $sformatf("case %0d S%0d: %0d of %0d delivered, want all", c,
                                          s + 1, rx[s], sent[s]));
      end else begin
        exp_lo = W / T - 2;
        exp_hi = W / T + BUCKET * filters + 2;
        check(rx[s] >= exp_lo && rx[s] <= exp_hi,
              $sformatf("case %0d S%0d: %0d delivered of %0d, want %0d..%0d", c, s + 1,
                        rx[s], sent[s], exp_lo, exp_hi));
      end
    end
    $display("case %0d: S1 %0d/%0d S2 %0d/%0d S3 %0d/%0d latency %0d..%0d cycles", c, rx[0],
             sent[0], rx[1], sent[1], rx[2], sent[2], lat_min, lat_max);
    check(lat_min == lat_max, $sformatf("case %0d: latency varies %0d..%0d", c, lat_min, lat_max));
    case_lat = lat_max;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int l [7];
    for (int p = 0; p < 2; p++) begin s_valid[p] = 0; s_beat[p] = '0; end
    run_case(1, 0, -1, BELOW, BELOW, l[1]);
    run_case(2, 0, -1, ABOVE, BELOW, l[2]);
    run_case(3, 0, 0, BELOW, BELOW, l[3]);
    run_case(4, 0, 0, ABOVE, BELOW, l[4]);
    run_case(5, 0, 1, BELOW, BELOW, l[5]);
    run_case(6, 0, 1, ABOVE, ABOVE, l[6]);
    for (int c = 2; c <= 6; c++) check(l[c] == l[1], "latency equal in all cases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
