// tb_edge5g_top: end-to-end test of edge5g_top at reduced sizes (64-point
// OFDM symbol, 16-entry IP-match table) so it runs in seconds. The
// stimulus, models and mechanism counters are in edge5g_tb_body.svh.
module tb_edge5g_top;
  localparam int N = 64, CP = N * 5 / 64, IPM = 16;
  `include "edge5g_tb_body.svh"

  edge5g_top #(.OFDM_N(N), .OFDM_CP(CP), .IPM_ENTRIES(IPM)) dut (.*);
endmodule
