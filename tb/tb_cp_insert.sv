// tb_cp_insert: sends numbered symbols into cp_insert and checks that each
// burst is the last M samples followed by the whole symbol (N+M samples),
// with out_first / out_last at the ends, under a randomly stalling
// consumer, and that an unstalled burst takes exactly N+M cycles.
module tb_cp_insert;
  import ofdm_pkg::*;

  localparam int N = 32;
  localparam int M = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1, out_first, out_last;
  iq_t  in_data = '0, out_data;

  cp_insert #(.N(N), .M(M)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_symbol(int base, bit stall);
    int got, cycles, idx;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data.re = 16'(base + k);
      in_data.im = 16'(-(base + k));
      #1 check(in_ready, "ready while filling");
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
    got = 0; cycles = 0;
    while (got < N + M) begin
      out_ready = stall ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      cycles++;
      if (out_valid && out_ready) begin
        idx = (got < M) ? N - M + got : got - M;
        check(out_data.re == 16'(base + idx) && out_data.im == 16'(-(base + idx)),
              $sformatf("burst sample %0d: got %0d want %0d", got, out_data.re, base + idx));
        check(out_first == (got == 0), "out_first");
        check(out_last == (got == N + M - 1), "out_last");
        got++;
      end
      @(negedge clk);
    end
    if (!stall) check(cycles == N + M, $sformatf("burst took %0d cycles", cycles));
    out_ready = 1'b1;
    #1 check(!out_valid && in_ready, "idle after burst");
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_symbol(100, 1'b0);
    run_symbol(1000, 1'b1);
    run_symbol(5000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
