// p4_synflood_switch: edge-node switch pipeline running the stateful TCP
// SYN-flood mitigation program (parser, match-action, deparser).
//
// Stages, in the order of the program's workflow:
//   1. Parser      - Ethernet, optional IPv4, optional TCP (hdr_parser).
//   2. Forwarding  - the forwarding table (exact match on the IPv4
//                    destination) selects the egress port; a miss, or a
//                    non-IP frame, goes to default_port.
//   3. IP match    - the IP match table (source and destination address,
//                    populated by the security controller) marks the
//                    monitored sessions.
//   4. Control     - synflood_guard counts incremental-port SYNs per
//                    session and drops packets past the threshold.
//   5. Deparser    - headers are not modified, so the stored packet leaves
//                    unchanged, tagged with its egress port, or is
//                    discarded whole.
// Packets wait in a beat FIFO while their header is parsed and looked up;
// the decision (drop, egress port) of each packet enters a small decision
// FIFO two cycles after its second beat, and the output side releases or
// discards the buffered beats of the packet at the head of that FIFO.
//
// Interface: AXI4-Stream in (s_*) and out (m_*) of net_pkg::axis_beat_t,
// m_tdest is a one-hot egress port vector. Table entries are written by the
// control plane through the fwd_wr_* and ipm_wr_* ports; writing an IP match
// entry clears its session registers. cnt_* count packets forwarded,
// dropped and monitored SYNs. Latency: a packet's first beat leaves 4 cycles
// after its second beat was accepted when the output is free; throughput is
// one beat per cycle. Table sizes: 10000 IP match entries as in the hardware
// evaluation; the forwarding table size is this design's choice.
module p4_synflood_switch
  import net_pkg::*;
#(
  parameter int unsigned IPM_ENTRIES = 10000,  // IP match table (sessions)
  parameter int unsigned FWD_ENTRIES = 64,     // forwarding table
  parameter int unsigned FIFO_BEATS  = 64,     // packet buffer, in beats
  parameter int unsigned PORTS       = 4
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // packet stream in
  input  logic                           s_valid,
  output logic                           s_ready,
  input  axis_beat_t                     s_beat,
  // packet stream out
  output logic                           m_valid,
  input  logic                           m_ready,
  output axis_beat_t                     m_beat,
  output logic [PORTS-1:0]               m_tdest,
  // configuration
  input  logic [7:0]                     syn_threshold,
  input  logic [PORTS-1:0]               default_port,
  input  logic                           fwd_wr_en,
  input  logic [$clog2(FWD_ENTRIES)-1:0] fwd_wr_idx,
  input  logic                           fwd_wr_valid,
  input  logic [31:0]                    fwd_wr_ip,
  input  logic [PORTS-1:0]               fwd_wr_port,
  input  logic                           ipm_wr_en,
  input  logic [$clog2(IPM_ENTRIES)-1:0] ipm_wr_idx,
  input  logic                           ipm_wr_valid,
  input  logic [31:0]                    ipm_wr_src,
  input  logic [31:0]                    ipm_wr_dst,
  // statistics
  output logic [31:0]                    cnt_fwd,
  output logic [31:0]                    cnt_drop,
  output logic [31:0]                    cnt_syn
);

  localparam int unsigned DEC_DEPTH = FIFO_BEATS / 2;
  localparam int unsigned BEAT_W    = $bits(axis_beat_t);

  typedef struct packed {
    logic             drop;
    logic [PORTS-1:0] port;
  } decision_t;

  // ---- packet buffer ----------------------------------------------------
  logic       s_fire;
  logic       pkt_ready, pkt_valid, pkt_pop;
  axis_beat_t pkt_beat;
  logic       dec_in_ready, dec_room;
  logic [$clog2(DEC_DEPTH):0]  dec_count;
  logic [$clog2(FIFO_BEATS):0] pkt_count;

  // Room for the decisions of every packet that may still be in flight.
  assign dec_room = (dec_count < ($bits(dec_count))'(DEC_DEPTH - 3));
  assign s_ready  = pkt_ready && dec_room;
  assign s_fire   = s_valid && s_ready;

  sync_fifo #(.W(BEAT_W), .DEPTH(FIFO_BEATS)) u_pkt_fifo (
    .clk, .rst_n,
    .in_valid(s_fire), .in_ready(pkt_ready), .in_data(s_beat),
    .out_valid(pkt_valid), .out_ready(pkt_pop), .out_data(pkt_beat),
    .count(pkt_count)
  );

  // ---- parser -------------------------------------------------------------
  logic hdr_valid;
  hdr_t hdr;

  hdr_parser u_parser (
    .clk, .rst_n, .beat_fire(s_fire), .beat(s_beat), .hdr_valid, .hdr
  );

  // ---- match-action tables ------------------------------------------------
  logic                           fwd_hit;
  logic [$clog2(FWD_ENTRIES)-1:0] fwd_idx;
  logic [PORTS-1:0]               fwd_port;
  logic                           ipm_hit;
  logic [$clog2(IPM_ENTRIES)-1:0] ipm_idx;
  logic                           ipm_data;

  flow_cam #(.ENTRIES(FWD_ENTRIES), .KEY_W(32), .DATA_W(PORTS)) u_fwd_table (
    .clk, .rst_n,
    .wr_en(fwd_wr_en), .wr_idx(fwd_wr_idx), .wr_valid(fwd_wr_valid),
    .wr_key(fwd_wr_ip), .wr_data(fwd_wr_port),
    .lookup_key(hdr.ip_dst), .hit(fwd_hit), .hit_idx(fwd_idx), .hit_data(fwd_port)
  );

  flow_cam #(.ENTRIES(IPM_ENTRIES), .KEY_W(64), .DATA_W(1)) u_ipm_table (
    .clk, .rst_n,
    .wr_en(ipm_wr_en), .wr_idx(ipm_wr_idx), .wr_valid(ipm_wr_valid),
    .wr_key({ipm_wr_src, ipm_wr_dst}), .wr_data(1'b1),
    .lookup_key({hdr.ip_src, hdr.ip_dst}), .hit(ipm_hit), .hit_idx(ipm_idx),
    .hit_data(ipm_data)
  );

  // ---- stateful control -----------------------------------------------------
  logic g_valid, g_drop, g_scan;
  logic [PORTS-1:0] port_q;

  synflood_guard #(.ENTRIES(IPM_ENTRIES)) u_guard (
    .clk, .rst_n,
    .threshold(syn_threshold),
    .clr_en(ipm_wr_en), .clr_idx(ipm_wr_idx),
    .hdr_valid, .hdr,
    .match_hit(ipm_hit && hdr.ipv4_valid && ipm_data), .match_idx(ipm_idx),
    .dec_valid(g_valid), .dec_drop(g_drop), .dec_scan(g_scan)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) port_q <= '0;
    else if (hdr_valid) port_q <= (hdr.ipv4_valid && fwd_hit) ? fwd_port : default_port;
  end

  // ---- decision queue and deparser ----------------------------------------
  decision_t dec_in, dec_head;
  logic      dec_valid, dec_pop;

  assign dec_in = '{drop: g_drop, port: port_q};

  sync_fifo #(.W($bits(decision_t)), .DEPTH(DEC_DEPTH)) u_dec_fifo (
    .clk, .rst_n,
    .in_valid(g_valid), .in_ready(dec_in_ready), .in_data(dec_in),
    .out_valid(dec_valid), .out_ready(dec_pop), .out_data(dec_head),
    .count(dec_count)
  );

  assign m_valid = pkt_valid && dec_valid && !dec_head.drop;
  assign m_beat  = pkt_beat;
  assign m_tdest = dec_head.port;
  assign pkt_pop = pkt_valid && dec_valid && (dec_head.drop || m_ready);
  assign dec_pop = pkt_pop && pkt_beat.tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_fwd  <= '0;
      cnt_drop <= '0;
      cnt_syn  <= '0;
    end else begin
      if (dec_pop && !dec_head.drop) cnt_fwd  <= cnt_fwd + 1'b1;
      if (dec_pop &&  dec_head.drop) cnt_drop <= cnt_drop + 1'b1;
      if (g_valid && g_scan)         cnt_syn  <= cnt_syn + 1'b1;
    end
  end

  // The decision FIFO is sized so that it can never overflow.
  assert property (@(posedge clk) disable iff (!rst_n) g_valid |-> dec_in_ready);
  // AXI4-Stream: an offered beat stays offered until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_valid && !m_ready |=> m_valid && $stable(m_beat));

endmodule
