// edge5g_top: the three hardware-acceleration designs for 5G edge nodes,
// side by side. They share only the clock and reset:
//   * ofdm_du_dl          - downlink OFDM of the distributed unit (A-law
//                           expansion, iFFT, cyclic prefix) for the option
//                           7-1 functional split;
//   * p4_synflood_switch  - edge-node switch running the stateful TCP
//                           SYN-flood mitigation program;
//   * pf_pipeline         - processing-function chain (token-bucket DDoS
//                           PFs, image-processing PF slot, MAC learning
//                           switch, output queues) controlled over AXI4-Lite.
// Every port of each design is brought out unchanged under a prefix
// (du_, sw_, pf_); see the three modules for interfaces and timing.
module edge5g_top
  import ofdm_pkg::*;
  import net_pkg::*;
#(
  parameter int unsigned OFDM_N      = 4096,
  parameter int unsigned OFDM_CP     = OFDM_N * 5 / 64,
  parameter int unsigned IPM_ENTRIES = 10000,
  parameter int unsigned FWD_ENTRIES = 64,
  parameter int unsigned PF_IN       = 2,
  parameter int unsigned PF_OUT      = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- DU downlink OFDM ----
  input  logic        du_in_valid,
  output logic        du_in_ready,
  input  logic [7:0]  du_in_i,
  input  logic [7:0]  du_in_q,
  output logic        du_out_valid,
  input  logic        du_out_ready,
  output iq_t         du_out_data,
  output logic        du_out_first,
  output logic        du_out_last,
  output logic        du_fft_busy,
  // ---- SYN-flood switch ----
  input  logic        sw_s_valid,
  output logic        sw_s_ready,
  input  axis_beat_t  sw_s_beat,
  output logic        sw_m_valid,
  input  logic        sw_m_ready,
  output axis_beat_t  sw_m_beat,
  output logic [3:0]  sw_m_tdest,
  input  logic [7:0]  sw_syn_threshold,
  input  logic [3:0]  sw_default_port,
  input  logic        sw_fwd_wr_en,
  input  logic [$clog2(FWD_ENTRIES)-1:0] sw_fwd_wr_idx,
  input  logic        sw_fwd_wr_valid,
  input  logic [31:0] sw_fwd_wr_ip,
  input  logic [3:0]  sw_fwd_wr_port,
  input  logic        sw_ipm_wr_en,
  input  logic [$clog2(IPM_ENTRIES)-1:0] sw_ipm_wr_idx,
  input  logic        sw_ipm_wr_valid,
  input  logic [31:0] sw_ipm_wr_src,
  input  logic [31:0] sw_ipm_wr_dst,
  output logic [31:0] sw_cnt_fwd,
  output logic [31:0] sw_cnt_drop,
  output logic [31:0] sw_cnt_syn,
  // ---- PF pipeline ----
  input  logic        pf_s_valid    [PF_IN],
  output logic        pf_s_ready    [PF_IN],
  input  axis_beat_t  pf_s_beat     [PF_IN],
  output logic        pf_pd_m_valid [PF_IN],
  input  logic        pf_pd_m_ready [PF_IN],
  output axis_beat_t  pf_pd_m_beat  [PF_IN],
  input  logic        pf_pd_s_valid [PF_IN],
  output logic        pf_pd_s_ready [PF_IN],
  input  axis_beat_t  pf_pd_s_beat  [PF_IN],
  output logic        pf_m_valid    [PF_OUT],
  input  logic        pf_m_ready    [PF_OUT],
  output axis_beat_t  pf_m_beat     [PF_OUT],
  input  logic        pf_awvalid,
  output logic        pf_awready,
  input  logic [11:0] pf_awaddr,
  input  logic        pf_wvalid,
  output logic        pf_wready,
  input  logic [31:0] pf_wdata,
  input  logic [3:0]  pf_wstrb,
  output logic        pf_bvalid,
  input  logic        pf_bready,
  output logic [1:0]  pf_bresp,
  input  logic        pf_arvalid,
  output logic        pf_arready,
  input  logic [11:0] pf_araddr,
  output logic        pf_rvalid,
  input  logic        pf_rready,
  output logic [31:0] pf_rdata,
  output logic [1:0]  pf_rresp,
  output logic [31:0] pf_cnt_learn,
  output logic [31:0] pf_cnt_flood,
  output logic [31:0] pf_pass       [2*PF_IN],
  output logic [31:0] pf_drop       [2*PF_IN]
);

  ofdm_du_dl #(.N(OFDM_N), .M(OFDM_CP)) u_du (
    .clk, .rst_n,
    .in_valid(du_in_valid), .in_ready(du_in_ready), .in_i(du_in_i), .in_q(du_in_q),
    .out_valid(du_out_valid), .out_ready(du_out_ready), .out_data(du_out_data),
    .out_first(du_out_first), .out_last(du_out_last), .fft_busy(du_fft_busy)
  );

  p4_synflood_switch #(.IPM_ENTRIES(IPM_ENTRIES), .FWD_ENTRIES(FWD_ENTRIES),
                       .PORTS(4)) u_sw (
    .clk, .rst_n,
    .s_valid(sw_s_valid), .s_ready(sw_s_ready), .s_beat(sw_s_beat),
    .m_valid(sw_m_valid), .m_ready(sw_m_ready), .m_beat(sw_m_beat), .m_tdest(sw_m_tdest),
    .syn_threshold(sw_syn_threshold), .default_port(sw_default_port),
    .fwd_wr_en(sw_fwd_wr_en), .fwd_wr_idx(sw_fwd_wr_idx), .fwd_wr_valid(sw_fwd_wr_valid),
    .fwd_wr_ip(sw_fwd_wr_ip), .fwd_wr_port(sw_fwd_wr_port),
    .ipm_wr_en(sw_ipm_wr_en), .ipm_wr_idx(sw_ipm_wr_idx), .ipm_wr_valid(sw_ipm_wr_valid),
    .ipm_wr_src(sw_ipm_wr_src), .ipm_wr_dst(sw_ipm_wr_dst),
    .cnt_fwd(sw_cnt_fwd), .cnt_drop(sw_cnt_drop), .cnt_syn(sw_cnt_syn)
  );

  pf_pipeline #(.NUM_IN(PF_IN), .NUM_OUT(PF_OUT)) u_pf (
    .clk, .rst_n,
    .s_valid(pf_s_valid), .s_ready(pf_s_ready), .s_beat(pf_s_beat),
    .pd_m_valid(pf_pd_m_valid), .pd_m_ready(pf_pd_m_ready), .pd_m_beat(pf_pd_m_beat),
    .pd_s_valid(pf_pd_s_valid), .pd_s_ready(pf_pd_s_ready), .pd_s_beat(pf_pd_s_beat),
    .m_valid(pf_m_valid), .m_ready(pf_m_ready), .m_beat(pf_m_beat),
    .awvalid(pf_awvalid), .awready(pf_awready), .awaddr(pf_awaddr),
    .wvalid(pf_wvalid), .wready(pf_wready), .wdata(pf_wdata), .wstrb(pf_wstrb),
    .bvalid(pf_bvalid), .bready(pf_bready), .bresp(pf_bresp),
    .arvalid(pf_arvalid), .arready(pf_arready), .araddr(pf_araddr),
    .rvalid(pf_rvalid), .rready(pf_rready), .rdata(pf_rdata), .rresp(pf_rresp),
    .cnt_learn(pf_cnt_learn), .cnt_flood(pf_cnt_flood),
    .pf_pass(pf_pass), .pf_drop(pf_drop)
  );

endmodule
