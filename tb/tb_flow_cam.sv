// tb_flow_cam: installs random keys in flow_cam, then looks up installed,
// deleted and absent keys and compares hit, index and data with a
// software copy of the table; checks the same-cycle look-up and that the
// lowest index wins when a key is installed twice.
module tb_flow_cam;
  localparam int E = 32, KW = 24, DW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 0, wr_valid = 0, hit;
  logic [$clog2(E)-1:0] wr_idx = '0, hit_idx;
  logic [KW-1:0] wr_key = '0, lookup_key = '0;
  logic [DW-1:0] wr_data = '0, hit_data;

  flow_cam #(.ENTRIES(E), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  bit          m_valid [E];
  int unsigned m_key [E], m_data [E];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic write(int idx, bit v, int unsigned key, int unsigned data);
    @(negedge clk);
    wr_en = 1; wr_idx = 5'(idx); wr_valid = v; wr_key = KW'(key); wr_data = DW'(data);
    @(negedge clk);
    wr_en = 0;
    m_valid[idx] = v; m_key[idx] = key & 24'hFFFFFF; m_data[idx] = data & 8'hFF;
  endtask

  task automatic lookup(int unsigned key);
    int exp_idx = -1;
    for (int i = 0; i < E; i++) if (exp_idx < 0 && m_valid[i] && m_key[i] == key) exp_idx = i;
    lookup_key = KW'(key);
    #1;
    check(hit == (exp_idx >= 0), $sformatf("hit for %h", key));
    if (exp_idx >= 0) begin
      check(int'(hit_idx) == exp_idx, $sformatf("index %0d want %0d", hit_idx, exp_idx));
      check(int'(hit_data) == m_data[exp_idx], "data");
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
    foreach (m_valid[i]) m_valid[i] = 0;
    lookup(0);
    for (int i = 0; i < E; i++) write(i, 1, $urandom() & 'hFFFFFF, $urandom() & 'hFF);
    for (int i = 0; i < E; i++) lookup(m_key[i]);
    for (int i = 0; i < 50; i++) lookup($urandom() & 'hFFFFFF);
    write(3, 0, m_key[3], 0);
    lookup(m_key[3]);
    write(20, 1, m_key[7], 99);
    lookup(m_key[7]);
    write(7, 0, m_key[7], 0);
    lookup(m_key[20]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
