// inet_checksum: Internet checksum (RFC 1071) over a byte stream.
//
// Bytes arrive on rx_pktbuf with rx_pktbuf_v, in network order, so even-numbered
// bytes are the high halves of 16-bit words; rx_pktbuf_last marks the final
// byte (an odd final byte is padded with zero). The one's complement sum is
// kept in a 32-bit accumulator and folded at the end. One clock after the last
// byte, csum_v pulses with csum, the complement of the folded sum: 0 when the
// stream already contained a correct checksum field, otherwise the value to
// put in that field. clr restarts the sum.
// The IPv4 header checksum and the UDP checksum each use one instance, as in
// the document's block diagram, which names the rx_pktbuf_v/rx_pktbuf and
// csum/csum_v signals; the internals follow RFC 1071 and are this design's own.
module inet_checksum (
  input  logic        clk,
  input  logic        rst,
  input  logic        clr,
  input  logic        rx_pktbuf_v,
  input  logic [7:0]  rx_pktbuf,
  input  logic        rx_pktbuf_last,
  output logic [15:0] csum,
  output logic        csum_v
);
  logic [31:0] sum, sum_next;
  logic        odd;
  logic [16:0] f1;
  logic [15:0] f2;

  assign sum_next = sum + (odd ? {24'h0, rx_pktbuf} : {16'h0, rx_pktbuf, 8'h00});
  assign f1       = {1'b0, sum_next[15:0]} + {1'b0, sum_next[31:16]};
  assign f2       = f1[15:0] + {15'h0, f1[16]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sum    <= '0;
      odd    <= 1'b0;
      csum   <= '0;
      csum_v <= 1'b0;
    end else begin
      csum_v <= 1'b0;
      if (clr) begin
        sum <= '0;
        odd <= 1'b0;
      end else if (rx_pktbuf_v) begin
        if (rx_pktbuf_last) begin
          csum   <= ~f2;
          csum_v <= 1'b1;
          sum    <= '0;
          odd    <= 1'b0;
        end else begin
          sum <= sum_next;
          odd <= !odd;
        end
      end
    end
  end
endmodule
