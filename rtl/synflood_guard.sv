// synflood_guard: stateful TCP SYN-flood (port-scan) detector.
//
// For every monitored session (an entry of the IP match table) two
// registers are kept: the destination TCP port of the last SYN seen and the
// number of consecutive scan attempts, a scan attempt being a SYN whose
// destination port is the previous one plus one. For each parsed packet:
//   * not a TCP SYN (SYN set, ACK clear), or no IP-match hit -> forward;
//   * otherwise attempts := attempts + 1 if dport == last_port + 1, else 1
//     (the packet starts a new sequence); last_port := dport;
//     the packet is dropped when the new count exceeds `threshold`.
// So with threshold 3 a scan over ports 81, 82, 83, 84, ... lets 81..83 pass
// and drops 84 onwards. The registers keep being updated while dropping, so
// a continuing scan stays blocked; a control-plane write to an entry
// (clr_en) clears its state; the registers are not reset otherwise.
//
// Interface: hdr_valid / hdr from the parser, match_hit / match_idx from
// the IP match table in the same cycle; dec_valid / dec_drop one cycle
// later. One packet per cycle; the read-modify-write of a session's
// registers completes in that cycle, so back-to-back packets of the same
// session see each other's updates. The two registers per entry, the
// incremental-port rule and the threshold follow the reference program;
// the reset-to-1 rule and saturating 8-bit counter are this design's.
module synflood_guard
  import net_pkg::*;
#(
  parameter int unsigned ENTRIES = 10000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [7:0]                 threshold,
  input  logic                       clr_en,
  input  logic [$clog2(ENTRIES)-1:0] clr_idx,
  input  logic                       hdr_valid,
  input  hdr_t                       hdr,
  input  logic                       match_hit,
  input  logic [$clog2(ENTRIES)-1:0] match_idx,
  output logic                       dec_valid,
  output logic                       dec_drop,
  output logic                       dec_scan   // a monitored SYN was seen
);

  logic [15:0] last_port [ENTRIES];
  logic [7:0]  attempts  [ENTRIES];

  logic        is_syn, monitored, sequential;
  logic [7:0]  new_att;

  always_comb begin
    is_syn     = hdr.tcp_valid && hdr.tcp_flags[1] && !hdr.tcp_flags[4];
    monitored  = hdr_valid && is_syn && match_hit;
    sequential = (hdr.tcp_dport == last_port[match_idx] + 16'd1);
    if (!sequential)                      new_att = 8'd1;
    else if (attempts[match_idx] == 8'hFF) new_att = 8'hFF;
    else                                  new_att = attempts[match_idx] + 8'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dec_valid <= 1'b0;
      dec_drop  <= 1'b0;
      dec_scan  <= 1'b0;
    end else begin
      dec_valid <= hdr_valid;
      dec_drop  <= monitored && (new_att > threshold);
      dec_scan  <= monitored;
    end
  end

  // Session registers: a block RAM-like array without reset. An entry
  // is cleared when the control plane installs the session, before it can
  // be matched, so its contents are never read uninitialised.
  always_ff @(posedge clk) begin
    if (monitored) begin
      last_port[match_idx] <= hdr.tcp_dport;
      attempts[match_idx]  <= new_att;
    end
    if (clr_en) begin
      last_port[clr_idx] <= '0;
      attempts[clr_idx]  <= '0;
    end
  end

endmodule
