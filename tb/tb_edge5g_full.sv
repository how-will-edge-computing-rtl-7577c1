// tb_edge5g_full: the same end-to-end test as tb_edge5g_top with edge5g_top
// at its default sizes: 4096-point OFDM symbols with a 320-sample cyclic
// prefix and a 10000-entry IP-match table (the monitored session sits in
// the last entry). Stimulus and checks are in edge5g_tb_body.svh.
module tb_edge5g_full;
  localparam int N = 4096, CP = 320, IPM = 10000;
  `include "edge5g_tb_body.svh"

  edge5g_top dut (.*);
endmodule
