// alaw_expand: A-law decompression of one fronthaul I/Q sample per cycle.
//
// On the downlink the DU receives frequency-domain I/Q samples compressed on
// the midhaul and expands them with the A-law (ITU-T G.711) before the iFFT.
// Each component travels as an 8-bit A-law code; this block expands both
// codes of a sample into the 16-bit signed I and Q of an ofdm_pkg::iq_t.
//
// Decoding (G.711): invert the even bits (xor 0x55); bit 7 is the sign
// (1 = positive), bits 6:4 the segment s, bits 3:0 the mantissa m.
// Magnitude = (16*m + 8) for s = 0 and (16*m + 264) << (s-1) for s > 0, which
// spans 8 .. 32256 and so fits the 16-bit sample.
//
// Interface: valid/ready stream in and out, one register stage (latency 1
// cycle, full throughput). The 8-bit code width and the G.711 segment table
// come from the A-law standard; the stream handshake is this design's choice.
module alaw_expand
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_i,      // A-law code of the real part
  input  logic [7:0] in_q,      // A-law code of the imaginary part
  input  logic       in_last,   // last sample of an OFDM symbol
  output logic       out_valid,
  input  logic       out_ready,
  output iq_t        out_data,
  output logic       out_last
);

  function automatic logic signed [15:0] alaw_decode(logic [7:0] code);
    logic [7:0]  a;
    logic [2:0]  seg;
    logic [15:0] mag;
    a   = code ^ 8'h55;
    seg = a[6:4];
    mag = {8'd0, a[3:0], 4'd8};
    if (seg != 3'd0) mag = (mag + 16'd256) << (seg - 3'd1);
    return a[7] ? $signed(mag) : -$signed(mag);
  endfunction

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data.re <= alaw_decode(in_i);
        out_data.im <= alaw_decode(in_q);
        out_last    <= in_last;
      end
    end
  end

endmodule
