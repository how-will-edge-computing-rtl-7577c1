// tb_synflood_guard: drives parsed headers and IP-match results into
// synflood_guard: a sequential port scan on one session (dropped once the
// count passes the threshold), a second session interleaved with it, a
// non-sequential SYN restarting the count, non-SYN and unmatched packets
// (never dropped) and the clearing of a session by a table write. A
// software model gives the expected decision for every packet.
module tb_synflood_guard;
  import net_pkg::*;
  localparam int E = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] threshold = 8'd3;
  logic clr_en = 0, hdr_valid = 0, match_hit = 0;
  logic [$clog2(E)-1:0] clr_idx = '0, match_idx = '0;
  hdr_t hdr = '0;
  logic dec_valid, dec_drop, dec_scan;

  synflood_guard #(.ENTRIES(E)) dut (.*);

  int checks = 0, failures = 0;
  int lastp [E], att [E];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic clear(int idx);
    @(negedge clk);
    clr_en = 1; clr_idx = 4'(idx);
    @(negedge clk);
    clr_en = 0;
    lastp[idx] = 0; att[idx] = 0;
  endtask

  task automatic pkt(bit hit, int idx, int dport, int flags);
    bit exp_drop = 0, mon;
    mon = hit && (flags & 'h12) == 'h02;
    if (mon) begin
      att[idx] = (dport == lastp[idx] + 1) ? att[idx] + 1 : 1;
      lastp[idx] = dport;
      exp_drop = att[idx] > int'(threshold);
    end
    @(negedge clk);
    hdr = '0;
    hdr.ipv4_valid = 1; hdr.tcp_valid = 1;
    hdr.tcp_dport = 16'(dport); hdr.tcp_flags = 8'(flags);
    hdr_valid = 1; match_hit = hit; match_idx = 4'(idx);
    @(posedge clk); #1;
    check(dec_valid, "decision valid");
    check(dec_drop == exp_drop, $sformatf("idx %0d port %0d drop %0d want %0d", idx, dport,
                                          dec_drop, exp_drop));
    check(dec_scan == mon, "scan flag");
    @(negedge clk);
    hdr_valid = 0;
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
    clear(2); clear(9);
    for (int p = 81; p < 90; p++) begin
      pkt(1, 2, p, 'h02);
      pkt(1, 9, 1000 + 2 * p, 'h02);   // never sequential
      pkt(0, 2, p + 1, 'h02);          // unmatched
      pkt(1, 2, p + 1, 'h10);          // not a SYN
    end
    pkt(1, 2, 5, 'h02);                // restart
    pkt(1, 2, 6, 'h02);
    threshold = 8'd1;
    pkt(1, 2, 7, 'h02);
    clear(2);
    pkt(1, 2, 1, 'h02);                // after clear: 0 -> 1 is sequential
    pkt(1, 2, 2, 'h02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
