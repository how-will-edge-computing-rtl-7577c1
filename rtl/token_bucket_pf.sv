// token_bucket_pf: DDoS-mitigation processing function (token bucket).
//
// A non-negative token counter grows by one every token_period clock cycles
// up to bucket_size. Each packet of the configured stream (source and
// destination MAC equal to the configured ones) takes one token; a packet
// that finds the bucket empty is dropped. A stream whose packet rate stays
// below one packet per token_period passes untouched; bursts above it pass
// only until the bucket is empty. Other streams, and all traffic while the
// PF is disabled, pass untouched. The bucket is charged only by matching
// packets and keeps refilling while disabled.
//
// The PF never stalls the stream: it watches the first beat of each packet
// (which holds both MAC addresses), decides in that same cycle, and drops a
// packet by clearing tvalid on all of its beats. It is one register stage
// (latency 1 cycle, one beat per cycle); s_ready follows m_ready.
// Token-bucket rule, per-PF parameters (bucket size, token rate, source and
// destination MAC, enable) and non-stalling operation follow the reference
// design; counting tokens in packets is this design's choice.
module token_bucket_pf
  import net_pkg::*;
#(
  parameter int unsigned USER_W = 2   // side-band carried with the beats
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tbf_cfg_t          cfg,
  input  logic              s_valid,
  output logic              s_ready,
  input  axis_beat_t        s_beat,
  input  logic [USER_W-1:0] s_user,
  output logic              m_valid,
  input  logic              m_ready,
  output axis_beat_t        m_beat,
  output logic [USER_W-1:0] m_user,
  output logic [31:0]       tokens,
  output logic [31:0]       cnt_pass,   // matching packets forwarded
  output logic [31:0]       cnt_drop    // matching packets dropped
);

  logic        s_fire, sop, in_pkt, dropping, match, take, drop_now;
  logic [31:0] tick;
  logic        refill;

  assign s_ready = !m_valid || m_ready;
  assign s_fire  = s_valid && s_ready;
  assign sop     = !in_pkt;

  assign match    = cfg.enable && sop &&
                    (hfield((HDR_BYTES*8)'(s_beat.tdata), ETH_SRC, 6) == cfg.src_mac) &&
                    (hfield((HDR_BYTES*8)'(s_beat.tdata), ETH_DST, 6) == cfg.dst_mac);
  assign take     = s_fire && match && (tokens != 0);
  assign drop_now = sop ? (match && tokens == 0) : dropping;
  assign refill   = (tick + 1 >= cfg.token_period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt   <= 1'b0;
      dropping <= 1'b0;
      tick     <= '0;
      tokens   <= '0;
      m_valid  <= 1'b0;
      m_beat   <= '0;
      m_user   <= '0;
      cnt_pass <= '0;
      cnt_drop <= '0;
    end else begin
      // token generation and consumption
      tick <= refill ? '0 : tick + 1;
      if (refill && !take) begin
        if (tokens < cfg.bucket_size) tokens <= tokens + 1;
      end else if (!refill && take) begin
        tokens <= tokens - 1;
      end else if (tokens > cfg.bucket_size) begin
        tokens <= cfg.bucket_size;     // bucket shrunk by the controller
      end
      // stream
      if (s_ready) begin
        m_valid <= s_fire && !drop_now;
        m_beat  <= s_beat;
        m_user  <= s_user;
      end
      if (s_fire) begin
        in_pkt   <= !s_beat.tlast;
        dropping <= drop_now && !s_beat.tlast;
        if (sop && match && tokens != 0) cnt_pass <= cnt_pass + 1;
        if (sop && match && tokens == 0) cnt_drop <= cnt_drop + 1;
      end
    end
  end

endmodule
