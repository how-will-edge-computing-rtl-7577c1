// hdr_parser: header parser of the edge-node packet pipelines.
//
// Snoops the beats accepted on a packet stream and extracts, in cascade,
// the Ethernet header, the IPv4 header (only if EtherType is 0x0800 and the
// header has no options, IHL = 5) and the TCP header (only if the IPv4
// protocol is 6). The first two 256-bit beats (64 bytes) hold all of them.
//
// Interface: beat_fire qualifies beat; hdr_valid pulses for one cycle
// with the parsed header hdr, in the cycle after the second beat of a
// packet was accepted, or after its last beat if the packet is a single
// beat. Bytes not yet received read as zero, so a truncated packet yields
// ipv4_valid / tcp_valid = 0. The parser never stalls the stream.
// The Ethernet -> IPv4 -> TCP cascade is the reference program's; the
// fixed two-beat window and the IHL = 5 rule are this design's choices.
module hdr_parser
  import net_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       beat_fire,
  input  axis_beat_t beat,
  output logic       hdr_valid,
  output hdr_t       hdr
);

  logic                     in_packet;     // past the first beat
  logic [AXIS_W-1:0]        first_beat;
  logic [HDR_BYTES*8-1:0]   raw;
  logic                     done;          // header of this packet emitted

  // Header window made of the first beat and the current one.
  always_comb begin
    raw = '0;
    if (!in_packet) raw[AXIS_W-1:0] = beat.tdata & keep_mask(beat.tkeep);
    else            raw = {beat.tdata & keep_mask(beat.tkeep), first_beat};
  end

  function automatic logic [AXIS_W-1:0] keep_mask(logic [AXIS_KEEP-1:0] k);
    logic [AXIS_W-1:0] m;
    for (int i = 0; i < AXIS_KEEP; i++) m[i*8 +: 8] = {8{k[i]}};
    return m;
  endfunction

  function automatic hdr_t parse(logic [HDR_BYTES*8-1:0] h);
    hdr_t p;
    p.eth_dst    = hfield(h, ETH_DST, 6);
    p.eth_src    = hfield(h, ETH_SRC, 6);
    p.eth_type   = 16'(hfield(h, ETH_TYPE, 2));
    p.ipv4_valid = (p.eth_type == ETHERTYPE_IPV4) && (hbyte(h, 14) == 8'h45);
    p.ip_src     = 32'(hfield(h, IP_SRC, 4));
    p.ip_dst     = 32'(hfield(h, IP_DST, 4));
    p.tcp_valid  = p.ipv4_valid && (hbyte(h, IP_PROTO) == IPPROTO_TCP);
    p.tcp_sport  = 16'(hfield(h, TCP_SPORT, 2));
    p.tcp_dport  = 16'(hfield(h, TCP_DPORT, 2));
    p.tcp_flags  = hbyte(h, TCP_FLAGS);
    if (!p.ipv4_valid) begin
      p.ip_src = '0;
      p.ip_dst = '0;
    end
    if (!p.tcp_valid) begin
      p.tcp_sport = '0;
      p.tcp_dport = '0;
      p.tcp_flags = '0;
    end
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_packet  <= 1'b0;
      first_beat <= '0;
      done       <= 1'b0;
      hdr_valid  <= 1'b0;
      hdr        <= '0;
    end else begin
      hdr_valid <= 1'b0;
      if (beat_fire) begin
        if (!done && (in_packet || beat.tlast)) begin
          hdr_valid <= 1'b1;
          hdr       <= parse(raw);
        end
        if (beat.tlast) begin
          in_packet <= 1'b0;
          done      <= 1'b0;
        end else begin
          if (!in_packet) first_beat <= beat.tdata & keep_mask(beat.tkeep);
          in_packet <= 1'b1;
          if (in_packet) done <= 1'b1;
        end
      end
    end
  end

endmodule
