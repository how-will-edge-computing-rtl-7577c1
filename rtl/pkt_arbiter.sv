// pkt_arbiter: merges N packet streams into one, a whole packet at a time.
// Round-robin between the inputs that have a beat waiting; once a packet
// has started, its input keeps the output until the beat with tlast. The
// index of the granted input goes out with every beat (m_src). Zero-latency
// (combinational) path from the granted input to the output.
module pkt_arbiter
  import net_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         s_valid,
  output logic [N-1:0]         s_ready,
  input  axis_beat_t           s_beat [N],
  output logic                 m_valid,
  input  logic                 m_ready,
  output axis_beat_t           m_beat,
  output logic [$clog2(N)-1:0] m_src
);

  localparam int unsigned IW = $clog2(N);

  logic          locked;
  logic [IW-1:0] owner, last, pick;
  logic          any;

  always_comb begin
    pick = last;
    any  = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (!any && s_valid[c]) begin
        pick = IW'(c);
        any  = 1'b1;
      end
    end
  end

  assign m_src   = locked ? owner : pick;
  assign m_valid = locked ? s_valid[owner] : any;
  assign m_beat  = s_beat[m_src];

  always_comb begin
    s_ready = '0;
    if (locked || any) s_ready[m_src] = m_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      owner  <= '0;
      last   <= IW'(N - 1);
    end else if (m_valid && m_ready) begin
      locked <= !m_beat.tlast;
      owner  <= m_src;
      if (m_beat.tlast) last <= m_src;
    end
  end

endmodule
