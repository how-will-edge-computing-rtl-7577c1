// pf_pipeline: processing-function (PF) chain for an edge node, built as a
// hardware pipeline that works on aggregated packet streams.
//
// Each of the NUM_IN input ports feeds its own pipeline:
//   input stream -> DDoS PF 1 -> DDoS PF 2 -> [image-processing PF slot]
// and all pipelines then share a MAC learning switch and per-port output
// queues:
//   -> packet arbiter -> MAC learning switch -> NUM_OUT output queues.
// Every PF is configured, enabled or bypassed by the host through an
// AXI4-Lite register bank (pf_regs); DDoS PF k of input port p is register
// window 2*p + k. The DDoS PFs are token buckets that drop a configured
// stream above a rate without ever stalling the traffic. The image-
// processing PF (pedestrian detection) is not part of this RTL: its slot
// is brought out as a stream pair (pd_m_* leaves the DDoS PFs, pd_s_*
// returns to the switch); wiring pd_m_* straight to pd_s_* is the bypassed
// slot.
//
// Latency: one cycle per DDoS PF, one in the switch, the arbiter is
// combinational, plus the output queue (two cycles for a beat that finds
// its queue empty). Throughput: one beat per cycle per pipeline up to the
// arbiter, one beat per cycle through the shared switch. NUM_IN = 2 and
// NUM_OUT = 4 reflect the four-port board of the reference design with two
// ports receiving; queue depth and table sizes are this design's choices.
module pf_pipeline
  import net_pkg::*;
#(
  parameter int unsigned NUM_IN      = 2,
  parameter int unsigned NUM_OUT     = 4,
  parameter int unsigned QUEUE_BEATS = 64,
  parameter int unsigned MAC_ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // input ports
  input  logic        s_valid   [NUM_IN],
  output logic        s_ready   [NUM_IN],
  input  axis_beat_t  s_beat    [NUM_IN],
  // image-processing PF slot, per input pipeline
  output logic        pd_m_valid [NUM_IN],
  input  logic        pd_m_ready [NUM_IN],
  output axis_beat_t  pd_m_beat  [NUM_IN],
  input  logic        pd_s_valid [NUM_IN],
  output logic        pd_s_ready [NUM_IN],
  input  axis_beat_t  pd_s_beat  [NUM_IN],
  // output ports
  output logic        m_valid   [NUM_OUT],
  input  logic        m_ready   [NUM_OUT],
  output axis_beat_t  m_beat    [NUM_OUT],
  // host control, AXI4-Lite
  input  logic        awvalid,
  output logic        awready,
  input  logic [11:0] awaddr,
  input  logic        wvalid,
  output logic        wready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  output logic        bvalid,
  input  logic        bready,
  output logic [1:0]  bresp,
  input  logic        arvalid,
  output logic        arready,
  input  logic [11:0] araddr,
  output logic        rvalid,
  input  logic        rready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  // statistics
  output logic [31:0] cnt_learn,
  output logic [31:0] cnt_flood,
  output logic [31:0] pf_pass [2*NUM_IN],   // matching packets passed, per PF
  output logic [31:0] pf_drop [2*NUM_IN]    // matching packets dropped, per PF
);

  localparam int unsigned NUM_PF = 2 * NUM_IN;

  tbf_cfg_t    cfg   [NUM_PF];
  logic [31:0] drops [NUM_PF];
  logic [31:0] pass  [NUM_PF];
  logic [31:0] tokens[NUM_PF];

  assign pf_pass = pass;
  assign pf_drop = drops;

  pf_regs #(.NUM_PF(NUM_PF)) u_regs (
    .clk, .rst_n,
    .awvalid, .awready, .awaddr, .wvalid, .wready, .wdata, .wstrb,
    .bvalid, .bready, .bresp, .arvalid, .arready, .araddr,
    .rvalid, .rready, .rdata, .rresp,
    .cfg, .drops
  );

  // ---- per-port DDoS PF pairs ---------------------------------------------
  logic       mid_valid [NUM_IN];
  logic       mid_ready [NUM_IN];
  axis_beat_t mid_beat  [NUM_IN];

  for (genvar p = 0; p < NUM_IN; p++) begin : g_in
    token_bucket_pf #(.USER_W(1)) u_ddos1 (
      .clk, .rst_n, .cfg(cfg[2*p]),
      .s_valid(s_valid[p]), .s_ready(s_ready[p]), .s_beat(s_beat[p]), .s_user(1'b0),
      .m_valid(mid_valid[p]), .m_ready(mid_ready[p]), .m_beat(mid_beat[p]), .m_user(),
      .tokens(tokens[2*p]), .cnt_pass(pass[2*p]), .cnt_drop(drops[2*p])
    );
    token_bucket_pf #(.USER_W(1)) u_ddos2 (
      .clk, .rst_n, .cfg(cfg[2*p+1]),
      .s_valid(mid_valid[p]), .s_ready(mid_ready[p]), .s_beat(mid_beat[p]), .s_user(1'b0),
      .m_valid(pd_m_valid[p]), .m_ready(pd_m_ready[p]), .m_beat(pd_m_beat[p]), .m_user(),
      .tokens(tokens[2*p+1]), .cnt_pass(pass[2*p+1]), .cnt_drop(drops[2*p+1])
    );
  end

  // ---- shared MAC learning switch ---------------------------------------------
  logic [NUM_IN-1:0]         arb_valid, arb_ready;
  logic                      sw_in_valid, sw_in_ready;
  axis_beat_t                sw_in_beat;
  logic [$clog2(NUM_IN)-1:0] sw_in_src;

  for (genvar p = 0; p < NUM_IN; p++) begin : g_arb
    assign arb_valid[p]  = pd_s_valid[p];
    assign pd_s_ready[p] = arb_ready[p];
  end

  pkt_arbiter #(.N(NUM_IN)) u_arb (
    .clk, .rst_n,
    .s_valid(arb_valid), .s_ready(arb_ready), .s_beat(pd_s_beat),
    .m_valid(sw_in_valid), .m_ready(sw_in_ready), .m_beat(sw_in_beat), .m_src(sw_in_src)
  );

  logic               sw_valid, sw_ready;
  axis_beat_t         sw_beat;
  logic [NUM_OUT-1:0] sw_tdest, q_ready;

  mac_learn_switch #(.PORTS(NUM_OUT), .MAC_ENTRIES(MAC_ENTRIES)) u_switch (
    .clk, .rst_n,
    .s_valid(sw_in_valid), .s_ready(sw_in_ready), .s_beat(sw_in_beat),
    .s_port($clog2(NUM_OUT)'(sw_in_src)),
    .m_valid(sw_valid), .m_ready(sw_ready), .m_beat(sw_beat), .m_tdest(sw_tdest),
    .cnt_learn, .cnt_flood
  );

  // A beat leaves the switch when every queue it goes to has room.
  assign sw_ready = &(q_ready | ~sw_tdest);

  // ---- output queues ------------------------------------------------------------
  for (genvar o = 0; o < NUM_OUT; o++) begin : g_out
    logic [$bits(axis_beat_t)-1:0] q_out;
    sync_fifo #(.W($bits(axis_beat_t)), .DEPTH(QUEUE_BEATS)) u_queue (
      .clk, .rst_n,
      .in_valid(sw_valid && sw_ready && sw_tdest[o]), .in_ready(q_ready[o]),
      .in_data(sw_beat),
      .out_valid(m_valid[o]), .out_ready(m_ready[o]), .out_data(q_out), .count()
    );
    assign m_beat[o] = axis_beat_t'(q_out);
  end

endmodule
