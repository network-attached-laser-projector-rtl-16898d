// ipv4_rx: IPv4 firewall and header processing.
//
// On a receive doorbell the block checks the frame in rx_pktbuf: EtherType
// 0x0800, version 4, header length of at least 20 bytes, destination address
// equal to ours, protocol 17 (UDP), not a fragment, and a total length that fits
// in the frame. A frame that passes has its header streamed, one byte per
// clock, through an Internet checksum module (cs_v/cs_byte/cs_last out,
// csum/csum_v back); if the checksum verifies, ip_ok pulses with the header
// length ip_hlen and the payload length ip_plen, both in bytes. An IPv4 frame
// that fails any check pulses ip_drop instead; other EtherTypes are ignored.
// Timing: ip_ok or ip_drop follows the doorbell by header length + 2 clocks.
// The document only names this block and its checksum partner and defers to
// RFC 791; which checks the firewall applies is this design's own choice.
module ipv4_rx
  import netpkg::*;
#(
  parameter int unsigned MTU   = ETH_MTU,
  parameter logic [31:0] MY_IP = DEFAULT_IP
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [7:0]                rx_pktbuf [MTU],
  input  logic [$clog2(MTU+1)-1:0]  rx_len,
  input  logic                      doorbell,
  output logic                      cs_v,
  output logic [7:0]                cs_byte,
  output logic                      cs_last,
  input  logic [15:0]               csum,
  input  logic                      csum_v,
  output logic                      ip_ok,
  output logic [5:0]                ip_hlen,
  output logic [15:0]               ip_plen,
  output logic                      ip_drop
);
  localparam int unsigned LW = $clog2(MTU + 1);

  logic [15:0] etype, tot_len, frag;
  logic [31:0] dst;
  logic [5:0]  hlen;
  logic        hdr_ok;

  assign etype   = {rx_pktbuf[12], rx_pktbuf[13]};
  assign hlen    = {rx_pktbuf[14][3:0], 2'b00};
  assign tot_len = {rx_pktbuf[16], rx_pktbuf[17]};
  assign frag    = {rx_pktbuf[20], rx_pktbuf[21]};
  assign dst     = {rx_pktbuf[30], rx_pktbuf[31], rx_pktbuf[32], rx_pktbuf[33]};
  assign hdr_ok  = rx_pktbuf[14][7:4] == 4'd4 && hlen >= 6'd20
                && rx_len >= LW'(34) && dst == MY_IP && rx_pktbuf[23] == 8'd17
                && frag[13:0] == 14'd0 && tot_len >= 16'(hlen)
                && 32'(tot_len) + 32'd14 <= 32'(rx_len);

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_WAIT} state_e;
  state_e     state;
  logic [5:0] idx;

  assign cs_v    = state == S_SUM;
  assign cs_byte = rx_pktbuf[14 + 32'(idx)];
  assign cs_last = idx + 6'd1 == ip_hlen;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      idx     <= '0;
      ip_ok   <= 1'b0;
      ip_drop <= 1'b0;
      ip_hlen <= '0;
      ip_plen <= '0;
    end else begin
      ip_ok   <= 1'b0;
      ip_drop <= 1'b0;
      unique case (state)
        S_IDLE: if (doorbell && etype == ETYPE_IPV4) begin
          if (hdr_ok) begin
            ip_hlen <= hlen;
            ip_plen <= tot_len - 16'(hlen);
            idx     <= '0;
            state   <= S_SUM;
          end else begin
            ip_drop <= 1'b1;
          end
        end
        S_SUM: begin
          idx <= idx + 6'd1;
          if (cs_last) state <= S_WAIT;
        end
        S_WAIT: if (csum_v) begin
          if (csum == 16'h0) ip_ok   <= 1'b1;
          else               ip_drop <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
