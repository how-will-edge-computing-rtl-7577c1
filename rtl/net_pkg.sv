// net_pkg: the packet stream and header types shared by the edge-node
// designs (the P4 SYN-flood switch and the processing-function pipeline).
// Packets travel as AXI4-Stream beats of AXIS_W bits. Byte 0 of the frame
// (the first byte on the wire) sits in bits [7:0] of the first beat, byte 1
// in bits [15:8], and so on; tkeep marks the valid bytes of the last beat.
package net_pkg;

  localparam int unsigned AXIS_W    = 256;
  localparam int unsigned AXIS_KEEP = AXIS_W / 8;
  localparam int unsigned PORT_W    = 4;    // one-hot port vector, 4 ports

  typedef struct packed {
    logic [AXIS_W-1:0]    tdata;
    logic [AXIS_KEEP-1:0] tkeep;
    logic                 tlast;
  } axis_beat_t;

  // Header offsets of Ethernet II / IPv4 (no options) / TCP, in bytes.
  localparam int unsigned ETH_DST   = 0;
  localparam int unsigned ETH_SRC   = 6;
  localparam int unsigned ETH_TYPE  = 12;
  localparam int unsigned IP_PROTO  = 23;
  localparam int unsigned IP_SRC    = 26;
  localparam int unsigned IP_DST    = 30;
  localparam int unsigned TCP_SPORT = 34;
  localparam int unsigned TCP_DPORT = 36;
  localparam int unsigned TCP_FLAGS = 47;
  localparam int unsigned HDR_BYTES = 64;   // two 256-bit beats

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_TCP    = 8'd6;
  localparam logic [7:0]  TCP_SYN        = 8'h02;
  localparam logic [7:0]  TCP_ACK        = 8'h10;

  typedef struct packed {
    logic [47:0] eth_dst;
    logic [47:0] eth_src;
    logic [15:0] eth_type;
    logic        ipv4_valid;
    logic [31:0] ip_src;
    logic [31:0] ip_dst;
    logic        tcp_valid;
    logic [15:0] tcp_sport;
    logic [15:0] tcp_dport;
    logic [7:0]  tcp_flags;
  } hdr_t;

  // Byte b of a header held little-endian by byte (byte 0 in [7:0]).
  function automatic logic [7:0] hbyte(logic [HDR_BYTES*8-1:0] h, int unsigned b);
    return h[b*8 +: 8];
  endfunction

  // Configuration of one token-bucket DDoS processing function.
  typedef struct packed {
    logic        enable;
    logic [47:0] src_mac;       // stream the PF applies to
    logic [47:0] dst_mac;
    logic [31:0] bucket_size;   // tokens (packets) the bucket holds
    logic [31:0] token_period;  // clock cycles per new token
  } tbf_cfg_t;

  // Big-endian (network order) field of n bytes starting at byte b.
  function automatic logic [47:0] hfield(logic [HDR_BYTES*8-1:0] h, int unsigned b,
                                         int unsigned n);
    logic [47:0] v;
    v = '0;
    for (int unsigned i = 0; i < n; i++) v = {v[39:0], h[(b+i)*8 +: 8]};
    return v;
  endfunction

endpackage
