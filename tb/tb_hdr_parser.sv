// tb_hdr_parser: feeds TCP, UDP, non-IP, single-beat and three-beat frames
// to hdr_parser and compares every parsed field with the values the frames
// were built from; checks that exactly one header is reported per packet,
// one cycle after its second (or only) beat.
module tb_hdr_parser;
  import net_pkg::*;
  import pkt_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic beat_fire = 1'b0, hdr_valid;
  axis_beat_t beat = '0;
  hdr_t hdr;

  hdr_parser dut (.*);

  int checks = 0, failures = 0, n_hdr = 0;
  always @(posedge clk) if (rst_n && hdr_valid) n_hdr++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_check(int kind, int unsigned sip, int unsigned dip, int dport,
                            int flags, int len);
    bytes_t f;
    int nb, n_prev;
    f = make_frame(48'h1122_3344_5566, 48'hA1A2_A3A4_A5A6, kind, sip, dip, dport, flags, len);
    nb = (f.size() + 31) / 32;
    n_prev = n_hdr;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      beat = '0;
      for (int i = 0; i < 32; i++)
        if (b * 32 + i < f.size()) begin
          beat.tdata[i*8 +: 8] = f[b*32 + i];
          beat.tkeep[i] = 1'b1;
        end
      beat.tlast = (b == nb - 1);
      beat_fire = 1'b1;
      @(posedge clk); #1;
      if (b == 1 || nb == 1) begin
        check(hdr_valid, $sformatf("hdr_valid after beat %0d", b));
        check(hdr.eth_dst == 48'h1122_3344_5566 && hdr.eth_src == 48'hA1A2_A3A4_A5A6, "MACs");
        check(hdr.ipv4_valid == (kind != 0), "ipv4_valid");
        check(hdr.tcp_valid == (kind == 2), "tcp_valid");
        if (kind != 0) check(hdr.ip_src == sip && hdr.ip_dst == dip, "IPs");
        if (kind == 2)
          check(hdr.tcp_dport == 16'(dport) && hdr.tcp_flags == 8'(flags), "TCP fields");
      end else check(!hdr_valid, "no header on other beats");
    end
    @(negedge clk);
    beat_fire = 1'b0;
    @(posedge clk); #1;
    check(n_hdr == n_prev + 1, "one header per packet");
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_check(2, 32'h0A000001, 32'h0A000002, 80, 'h02, 64);
    send_check(2, 32'hC0A80001, 32'h08080808, 65535, 'h12, 120);
    send_check(1, 32'h01020304, 32'h05060708, 53, 0, 70);
    send_check(0, 0, 0, 0, 0, 64);
    send_check(2, 32'h0A000001, 32'h0A000002, 81, 'h02, 30);   // 54-byte frame: single beat
    send_check(2, 32'h0A0000FF, 32'h0A0000EE, 4000, 'h02, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
