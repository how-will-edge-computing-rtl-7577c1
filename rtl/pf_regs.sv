// pf_regs: AXI4-Lite register bank through which the host controls the
// processing-function pipeline (over PCIe and a DMA engine that acts as the
// AXI4-Lite master).
//
// Register map, 32-bit words, one 32-byte window per DDoS PF i
// (i = 0 .. NUM_PF-1, window base = i * 0x20):
//   +0x00 CTRL      bit 0 enable                                  RW
//   +0x04 SRC_LO    source MAC bits 31:0                          RW
//   +0x08 SRC_HI    source MAC bits 47:32                         RW
//   +0x0C DST_LO    destination MAC bits 31:0                     RW
//   +0x10 DST_HI    destination MAC bits 47:32                    RW
//   +0x14 BUCKET    bucket size in tokens                         RW
//   +0x18 PERIOD    clock cycles per token                        RW
//   +0x1C DROPS     packets dropped by the PF                     RO
// Unmapped addresses read as zero and ignore writes; every access answers
// OKAY. The parameter set per PF follows the reference design; the
// addresses and reset values are this design's choices (reset: disabled,
// bucket 16, period 1).
//
// Timing: a write completes when both AW and W have been presented (B one
// cycle later); a read returns R one cycle after AR. One access at a time.
module pf_regs
  import net_pkg::*;
#(
  parameter int unsigned NUM_PF = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              awvalid,
  output logic              awready,
  input  logic [11:0]       awaddr,
  input  logic              wvalid,
  output logic              wready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  output logic              bvalid,
  input  logic              bready,
  output logic [1:0]        bresp,
  input  logic              arvalid,
  output logic              arready,
  input  logic [11:0]       araddr,
  output logic              rvalid,
  input  logic              rready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  // register contents
  output tbf_cfg_t          cfg   [NUM_PF],
  input  logic [31:0]       drops [NUM_PF]
);

  logic do_write, do_read;

  assign do_write = awvalid && wvalid && !bvalid;
  assign awready  = do_write;
  assign wready   = do_write;
  assign bresp    = 2'b00;
  assign do_read  = arvalid && !rvalid;
  assign arready  = do_read;
  assign rresp    = 2'b00;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] nw, logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[b*8 +: 8] = strb[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  function automatic logic [31:0] read_word(tbf_cfg_t c, logic [31:0] d, logic [2:0] reg_i);
    unique case (reg_i)
      3'd0: return {31'd0, c.enable};
      3'd1: return c.src_mac[31:0];
      3'd2: return {16'd0, c.src_mac[47:32]};
      3'd3: return c.dst_mac[31:0];
      3'd4: return {16'd0, c.dst_mac[47:32]};
      3'd5: return c.bucket_size;
      3'd6: return c.token_period;
      default: return d;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PF; i++)
        cfg[i] <= '{enable: 1'b0, src_mac: '0, dst_mac: '0, bucket_size: 32'd16,
                    token_period: 32'd1};
      bvalid <= 1'b0;
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (bvalid && bready) bvalid <= 1'b0;
      if (rvalid && rready) rvalid <= 1'b0;
      if (do_write) begin
        bvalid <= 1'b1;
        for (int i = 0; i < NUM_PF; i++) begin
          if (32'(awaddr[11:5]) == i) begin
            unique case (awaddr[4:2])
              3'd0: cfg[i].enable <= wstrb[0] ? wdata[0] : cfg[i].enable;
              3'd1: cfg[i].src_mac[31:0]  <= merge(cfg[i].src_mac[31:0], wdata, wstrb);
              3'd2: cfg[i].src_mac[47:32] <= 16'(merge({16'd0, cfg[i].src_mac[47:32]}, wdata, wstrb));
              3'd3: cfg[i].dst_mac[31:0]  <= merge(cfg[i].dst_mac[31:0], wdata, wstrb);
              3'd4: cfg[i].dst_mac[47:32] <= 16'(merge({16'd0, cfg[i].dst_mac[47:32]}, wdata, wstrb));
              3'd5: cfg[i].bucket_size    <= merge(cfg[i].bucket_size, wdata, wstrb);
              3'd6: cfg[i].token_period   <= merge(cfg[i].token_period, wdata, wstrb);
              default: ;
            endcase
          end
        end
      end
      if (do_read) begin
        rvalid <= 1'b1;
        rdata  <= '0;
        for (int i = 0; i < NUM_PF; i++)
          if (32'(araddr[11:5]) == i) rdata <= read_word(cfg[i], drops[i], araddr[4:2]);
      end
    end
  end

  // AXI: a response stays valid until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata));

endmodule
