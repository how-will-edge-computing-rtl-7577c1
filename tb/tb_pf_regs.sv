// tb_pf_regs: AXI4-Lite master for pf_regs. Checks the reset values, writes
// random values with random byte strobes to every register of every PF
// window (address and data phases sometimes presented several cycles
// apart, write responses sometimes accepted late), and checks both the
// cfg outputs and the read-back data; also checks the read-only drop
// counter and that unmapped addresses read zero and ignore writes.
module tb_pf_regs;
  import net_pkg::*;
  localparam int NPF = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 0;
  logic        arvalid = 0, arready, rvalid, rready = 0;
  logic [11:0] awaddr = '0, araddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = '0;
  logic [1:0]  bresp, rresp;
  tbf_cfg_t    cfg [NPF];
  logic [31:0] drops [NPF];

  pf_regs #(.NUM_PF(NPF)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] model [NPF][8];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic axi_write(logic [11:0] a, logic [31:0] d, logic [3:0] s);
    int gap = $urandom_range(2);
    @(negedge clk);
    awvalid = 1; awaddr = a;
    if (gap == 0) begin wvalid = 1; wdata = d; wstrb = s; end
    repeat (gap) @(negedge clk);
    wvalid = 1; wdata = d; wstrb = s;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    check(bvalid && bresp == 2'b00, "write response");
    repeat ($urandom_range(2)) @(negedge clk);
    bready = 1;
    @(posedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axi_read(logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    arvalid = 1; araddr = a;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(negedge clk);
    repeat ($urandom_range(2)) @(negedge clk);
    check(rvalid && rresp == 2'b00, "read response held");
    d = rdata;
    rready = 1;
    @(posedge clk);
    @(negedge clk);
    rready = 0;
  endtask

  function automatic logic [31:0] mask_of(int r);
    case (r)
      0: return 32'h1;
      2, 4: return 32'hFFFF;
      7: return 32'h0;
      default: return 32'hFFFF_FFFF;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < NPF; i++) drops[i] = 32'h1000 + i;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NPF; i++) begin
      check(!cfg[i].enable && cfg[i].bucket_size == 16 && cfg[i].token_period == 1,
            "reset values");
      model[i] = '{0, 0, 0, 0, 0, 16, 1, 0};
    end
    for (int pass = 0; pass < 3; pass++)
      for (int i = 0; i < NPF; i++)
        for (int r = 0; r < 8; r++) begin
          automatic logic [31:0] v = $urandom();
          automatic logic [3:0]  s = (pass == 0) ? 4'hF : 4'($urandom());
          for (int b = 0; b < 4; b++) if (s[b]) model[i][r][b*8 +: 8] = v[b*8 +: 8];
          model[i][r] &= mask_of(r);
          axi_write(12'(i * 32 + r * 4), v, s);
        end
    for (int i = 0; i < NPF; i++) begin
      check(cfg[i].enable == model[i][0][0], "cfg enable");
      check(cfg[i].src_mac == {model[i][2][15:0], model[i][1]}, "cfg src_mac");
      check(cfg[i].dst_mac == {model[i][4][15:0], model[i][3]}, "cfg dst_mac");
      check(cfg[i].bucket_size == model[i][5] && cfg[i].token_period == model[i][6],
            "cfg bucket/period");
      for (int r = 0; r < 8; r++) begin
        axi_read(12'(i * 32 + r * 4), d);
        if (r == 7) check(d == drops[i], "drop counter read-back");
        else check(d == model[i][r], $sformatf("read PF%0d reg%0d %h want %h", i, r, d,
                                              model[i][r]));
      end
    end
    axi_write(12'h400, 32'hDEAD_BEEF, 4'hF);
    axi_read(12'h400, d);
    check(d == 0, "unmapped reads zero");
    axi_read(12'h004, d);
    check(d == model[0][1], "unmapped write had no effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
