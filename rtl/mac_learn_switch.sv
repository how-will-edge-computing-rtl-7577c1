// mac_learn_switch: MAC learning switch, the last processing function of
// the pipeline, common to all input streams.
//
// A CAM of MAC_ENTRIES entries maps a MAC address to the port it was last
// seen on. On the first beat of every packet:
//   * learn: the source MAC is looked up; a hit updates the entry's port,
//     a miss writes a new entry at a round-robin replacement pointer;
//   * forward: the destination MAC is looked up; a hit on a port other than
//     the source port selects that port, a hit on the source port filters
//     the packet (dropped), and a miss or a group (broadcast/multicast)
//     address floods the packet to all ports but the source.
// The one-hot port mask leaves with every beat of the packet (m_tdest).
//
// One register stage (latency 1 cycle, one beat per cycle). Both look-ups
// search all entries in parallel in the cycle of the first beat. The CAM
// and the output-port decision follow the reference design; the table size,
// the replacement rule and flooding on a miss are this design's choices.
module mac_learn_switch
  import net_pkg::*;
#(
  parameter int unsigned PORTS       = 4,
  parameter int unsigned MAC_ENTRIES = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     s_valid,
  output logic                     s_ready,
  input  axis_beat_t               s_beat,
  input  logic [$clog2(PORTS)-1:0] s_port,    // port the packet came in on
  output logic                     m_valid,
  input  logic                     m_ready,
  output axis_beat_t               m_beat,
  output logic [PORTS-1:0]         m_tdest,
  output logic [31:0]              cnt_learn, // new entries written
  output logic [31:0]              cnt_flood  // packets flooded
);

  localparam int unsigned EW = $clog2(MAC_ENTRIES);
  localparam int unsigned PW = $clog2(PORTS);

  logic          valid [MAC_ENTRIES];
  logic [47:0]   mac   [MAC_ENTRIES];
  logic [PW-1:0] port  [MAC_ENTRIES];
  logic [EW-1:0] repl;

  logic          s_fire, in_pkt, sop;
  logic [47:0]   dmac, smac;
  logic          d_hit, s_hit;
  logic [EW-1:0] d_idx, s_idx;
  logic [PORTS-1:0] mask, mask_q;

  assign s_ready = !m_valid || m_ready;
  assign s_fire  = s_valid && s_ready;
  assign sop     = !in_pkt;
  assign dmac    = hfield((HDR_BYTES*8)'(s_beat.tdata), ETH_DST, 6);
  assign smac    = hfield((HDR_BYTES*8)'(s_beat.tdata), ETH_SRC, 6);

  always_comb begin
    d_hit = 1'b0; d_idx = '0;
    s_hit = 1'b0; s_idx = '0;
    for (int i = MAC_ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && mac[i] == dmac) begin d_hit = 1'b1; d_idx = EW'(i); end
      if (valid[i] && mac[i] == smac) begin s_hit = 1'b1; s_idx = EW'(i); end
    end
  end

  always_comb begin
    logic [PORTS-1:0] src_bit;
    src_bit = PORTS'(1) << s_port;
    if (d_hit && !dmac[40]) mask = (PORTS'(1) << port[d_idx]) & ~src_bit;
    else                    mask = ~src_bit;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAC_ENTRIES; i++) valid[i] <= 1'b0;
      repl      <= '0;
      in_pkt    <= 1'b0;
      mask_q    <= '0;
      m_valid   <= 1'b0;
      m_beat    <= '0;
      m_tdest   <= '0;
      cnt_learn <= '0;
      cnt_flood <= '0;
    end else begin
      if (s_ready) begin
        logic [PORTS-1:0] mk;
        mk      = sop ? mask : mask_q;
        m_valid <= s_fire && (mk != '0);
        m_beat  <= s_beat;
        m_tdest <= mk;
      end
      if (s_fire) begin
        in_pkt <= !s_beat.tlast;
        if (sop) begin
          mask_q <= mask;
          if (!(d_hit && !dmac[40])) cnt_flood <= cnt_flood + 1;
          if (!smac[40]) begin
            if (s_hit) port[s_idx] <= s_port;
            else begin
              valid[repl] <= 1'b1;
              mac[repl]   <= smac;
              port[repl]  <= s_port;
              repl        <= (repl == EW'(MAC_ENTRIES - 1)) ? '0 : repl + 1'b1;
              cnt_learn   <= cnt_learn + 1;
            end
          end
        end
      end
    end
  end

endmodule
