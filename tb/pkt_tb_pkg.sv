// pkt_tb_pkg: frame builder shared by the packet-pipeline testbenches.
// Builds Ethernet II frames, optionally carrying IPv4 (no options) and a
// TCP header, as byte queues; byte 0 is the first byte on the wire.
package pkt_tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic void put(ref bytes_t f, input longint unsigned v, input int n);
    for (int i = n - 1; i >= 0; i--) f.push_back(8'(v >> (8 * i)));
  endfunction

  // kind: 0 = non-IP frame, 1 = IPv4/UDP, 2 = IPv4/TCP
  function automatic bytes_t make_frame(longint unsigned dmac, longint unsigned smac,
                                        int kind, int unsigned sip, int unsigned dip,
                                        int dport, int flags, int len);
    bytes_t f;
    put(f, dmac, 6);
    put(f, smac, 6);
    put(f, (kind == 0) ? 'h88B5 : 'h0800, 2);
    if (kind != 0) begin
      put(f, 'h45, 1); put(f, 0, 1); put(f, len - 14, 2);
      put(f, 0, 4);
      put(f, 64, 1); put(f, (kind == 2) ? 6 : 17, 1); put(f, 0, 2);
      put(f, sip, 4); put(f, dip, 4);
      put(f, 1234, 2); put(f, dport, 2);
      if (kind == 2) begin
        put(f, 0, 4); put(f, 0, 4);
        put(f, 'h50, 1); put(f, flags, 1); put(f, 'hFFFF, 2); put(f, 0, 4);
      end
    end
    while (f.size() < len) f.push_back(8'(f.size()));
    return f;
  endfunction

endpackage
