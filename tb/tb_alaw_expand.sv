// tb_alaw_expand: sweeps all 256 A-law codes through both components of
// alaw_expand and compares with a G.711 decoder written here from the
// standard's segment rule, plus four published corner values. Also checks
// the one-cycle latency and that a stalled output holds its sample.
module tb_alaw_expand;
  import ofdm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, in_last = 1'b0;
  logic [7:0] in_i = '0, in_q = '0;
  logic out_valid, out_ready = 1'b1, out_last;
  iq_t  out_data;

  int checks = 0, failures = 0;

  alaw_expand dut (.*);

  function automatic int ref_decode(int code);
    int a, seg, mant, mag;
    a    = code ^ 'h55;
    seg  = (a >> 4) & 7;
    mant = a & 15;
    mag  = (seg == 0) ? mant * 16 + 8 : (mant * 16 + 264) * (1 << (seg - 1));
    return (a & 'h80) ? mag : -mag;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
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
    // Published G.711 A-law values.
    check(ref_decode('hD5) == 8 && ref_decode('h55) == -8, "reference small");
    check(ref_decode('hAA) == 32256 && ref_decode('h2A) == -32256, "reference large");
    for (int c = 0; c < 256; c++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_i = 8'(c);
      in_q = 8'(255 - c);
      in_last = (c == 255);
      @(posedge clk); #1;
      check(out_valid, "out_valid one cycle after input");
      check(int'(out_data.re) == ref_decode(c),
            $sformatf("code %02x re %0d exp %0d", c, out_data.re, ref_decode(c)));
      check(int'(out_data.im) == ref_decode(255 - c),
            $sformatf("code %02x im %0d exp %0d", 255 - c, out_data.im, ref_decode(255 - c)));
      check(out_last == (c == 255), "last follows input");
    end
    // Stall: the output must hold while out_ready is low.
    @(negedge clk);
    in_i = 8'h2A; in_q = 8'hD5; in_valid = 1'b1;
    @(negedge clk);
    out_ready = 1'b0; in_i = 8'hAA; in_q = 8'h55;
    @(posedge clk); #1;
    check(!in_ready && out_data.re == -16'sd32256 && out_data.im == 16'sd8, "stall holds data");
    @(negedge clk);
    out_ready = 1'b1;
    @(posedge clk); #1;
    check(out_data.re == 16'sd32256 && out_data.im == -16'sd8, "data after stall");
    in_valid = 1'b0;
    @(posedge clk); #1;
    check(!out_valid, "drains");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
