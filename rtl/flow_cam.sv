// flow_cam: fully associative match table (content addressable memory).
//
// Flow tables of the edge node are CAMs: a key is compared with every
// stored entry at once and the index of the matching entry is returned, so
// the look-up time does not depend on how many entries are installed. Each
// entry holds a valid bit, a KEY_W-bit key and a DATA_W-bit action datum
// (an egress port, for instance). The control plane writes entry wr_idx.
//
// Look-up is combinational: hit, hit_idx and hit_data follow lookup_key in
// the same cycle; the lowest matching index wins if a key was installed
// twice. Writes take effect at the next clock edge. Entries are cleared by
// reset. The parallel compare is the reference design's; building it from
// flip-flops (rather than block RAM) is this design's choice.
module flow_cam #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned KEY_W   = 32,
  parameter int unsigned DATA_W  = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       wr_valid,  // 0 deletes the entry
  input  logic [KEY_W-1:0]           wr_key,
  input  logic [DATA_W-1:0]          wr_data,
  input  logic [KEY_W-1:0]           lookup_key,
  output logic                       hit,
  output logic [$clog2(ENTRIES)-1:0] hit_idx,
  output logic [DATA_W-1:0]          hit_data
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic              valid [ENTRIES];
  logic [KEY_W-1:0]  keys  [ENTRIES];
  logic [DATA_W-1:0] data  [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) valid[i] <= 1'b0;
    end else if (wr_en) begin
      valid[wr_idx] <= wr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      keys[wr_idx] <= wr_key;
      data[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && keys[i] == lookup_key) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
    hit_data = data[hit_idx];
  end

endmodule
