// udp_rx: UDP depacketization.
//
// After the IPv4 block accepts a datagram (ip_ok, with header length ip_hlen
// and payload length ip_plen) this block reads the UDP header from rx_pktbuf.
// A datagram to another port, or with a length that does not fit, is dropped
// (udp_drop). If the checksum field is non-zero the pseudo-header (source and
// destination address, protocol 17, UDP length) and the whole segment are
// streamed, one byte per clock, through an Internet checksum module, and a
// datagram whose sum does not verify is dropped. The payload is then put out
// as 64-bit words, one per clock, on netout with netout_valid, first payload
// byte in netout[63:56]; a trailing partial word is discarded.
// The receive buffer is single, and the checksum pass over a long datagram
// outlasts the gap before the next frame starts to overwrite it. So the
// payload words are collected into a staging memory while they stream past
// the checksum, and are put out from there once the sum verifies; the pass
// itself reads at one byte per clock and stays ahead of the receiver's four
// clocks per byte. An ip_ok that comes while a datagram is still being checked
// or put out cannot be served (its bytes will be overwritten) and raises
// udp_drop.
// Timing: with a checksum, the first word follows ip_ok by 12 + UDP length + 3
// clocks; without one, by 2 clocks.
// The document names the block, its checksum partner and the netout/netout_valid
// outputs and defers to RFC 768; the port number, the 64-bit word framing of the
// payload and the drop rules are this design's own.
module udp_rx
  import netpkg::*;
#(
  parameter int unsigned MTU     = ETH_MTU,
  parameter logic [15:0] MY_PORT = DEFAULT_PORT
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [7:0]                rx_pktbuf [MTU],
  input  logic                      ip_ok,
  input  logic [5:0]                ip_hlen,
  input  logic [15:0]               ip_plen,
  output logic                      cs_v,
  output logic [7:0]                cs_byte,
  output logic                      cs_last,
  input  logic [15:0]               csum,
  input  logic                      csum_v,
  output logic [63:0]               netout,
  output logic                      netout_valid,
  output logic                      udp_drop
);
  localparam int unsigned IW = $clog2(MTU + 1);

  function automatic logic [7:0] rd(int unsigned a);
    return (a < MTU) ? rx_pktbuf[a] : 8'h00;
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_WAIT, S_EMIT} state_e;
  state_e      state;
  logic [IW-1:0] off;       // offset of the UDP header in the frame
  logic [15:0]   ulen;      // UDP length, header included
  logic [15:0]   idx;       // checksum stream position, or payload word index
  logic [15:0]   nwords;
  logic          staged;    // words come from the staging memory

  // Staging memory for the payload words of a checksummed datagram.
  localparam int unsigned NW = (MTU - 38) / 8;
  logic [63:0]   stage [NW];
  logic [55:0]   acc;
  localparam int unsigned SW = $clog2(NW);
  logic [15:0]   pb;        // payload byte index during the checksum pass
  logic [15:0]   pw;        // its word index
  assign pb = idx - 16'd20;
  assign pw = pb >> 3;

  // Header fields at the offset given by the IPv4 block.
  logic [IW-1:0] hoff;
  logic [15:0]   h_dport, h_len, h_cks;
  assign hoff    = IW'(14) + IW'(ip_hlen);
  assign h_dport = {rd(32'(hoff) + 2), rd(32'(hoff) + 3)};
  assign h_len   = {rd(32'(hoff) + 4), rd(32'(hoff) + 5)};
  assign h_cks   = {rd(32'(hoff) + 6), rd(32'(hoff) + 7)};

  // Checksum stream: 12 pseudo-header bytes, then the segment.
  always_comb begin
    unique case (idx)
      16'd0, 16'd1, 16'd2, 16'd3, 16'd4, 16'd5, 16'd6, 16'd7:
               cs_byte = rx_pktbuf[26 + 32'(idx)];
      16'd8:   cs_byte = 8'h00;
      16'd9:   cs_byte = 8'd17;
      16'd10:  cs_byte = ulen[15:8];
      16'd11:  cs_byte = ulen[7:0];
      default: cs_byte = rd(32'(off) + 32'(idx) - 12);
    endcase
  end
  assign cs_v    = state == S_SUM;
  assign cs_last = idx == ulen + 16'd11;

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      off          <= '0;
      ulen         <= '0;
      idx          <= '0;
      nwords       <= '0;
      staged       <= 1'b0;
      acc          <= '0;
      netout       <= '0;
      netout_valid <= 1'b0;
      udp_drop     <= 1'b0;
    end else begin
      netout_valid <= 1'b0;
      udp_drop     <= 1'b0;
      if (ip_ok && state != S_IDLE) udp_drop <= 1'b1;
      unique case (state)
        S_IDLE: if (ip_ok) begin
          off    <= hoff;
          ulen   <= h_len;
          staged <= h_cks != 16'h0;
          nwords <= (h_len - 16'd8) >> 3;
          idx    <= '0;
          if (h_dport != MY_PORT || h_len < 16'd8 || h_len > ip_plen) udp_drop <= 1'b1;
          else if (h_cks == 16'h0)                                     state <= S_EMIT;
          else                                                         state <= S_SUM;
        end
        S_SUM: begin
          idx <= idx + 16'd1;
          if (idx >= 16'd20) begin
            acc <= {acc[47:0], cs_byte};
            if (pb[2:0] == 3'd7 && 32'(pw) < NW && pw < nwords)
              stage[pw[SW-1:0]] <= {acc, cs_byte};
          end
          if (cs_last) state <= S_WAIT;
        end
        S_WAIT: if (csum_v) begin
          idx <= '0;
          if (csum == 16'h0) state <= S_EMIT;
          else begin
            udp_drop <= 1'b1;
            state    <= S_IDLE;
          end
        end
        S_EMIT: begin
          if (idx == nwords) state <= S_IDLE;
          else begin
            if (staged && 32'(idx) < NW)
              netout <= stage[idx[SW-1:0]];
            else
              for (int k = 0; k < 8; k++)
                netout[8*(7-k) +: 8] <= rd(32'(off) + 8 + 8*32'(idx) + k);
            netout_valid <= 1'b1;
            idx <= idx + 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
