// arp_echo: ARP responder (RFC 826) and Ethernet echo service.
//
// On each receive doorbell the block looks at fixed offsets of the received
// frame in rx_pktbuf.
//  * EtherType 0x0806, Ethernet/IPv4 ARP (htype 1, ptype 0x0800, lengths 6/4):
//    the RFC 826 algorithm with a one-entry table. If the sender's protocol
//    address is the one in the table, its hardware address is refreshed
//    (merge). If the target protocol address is ours, the sender is entered in
//    the table unless it was merged, and a request is answered: a 42-byte reply
//    is built in tx_pktbuf and handed to the transmit interface.
//  * The echo EtherType: the frame is copied to tx_pktbuf, one byte per clock,
//    with the destination set to the sender and the source set to our MAC, and
//    sent back unchanged otherwise.
// Anything else is left to the IPv4 path. The table is updated on every ARP
// doorbell. An ARP reply keeps the requester's addresses in registers and waits
// for avail. An echo must be copied before the next frame overwrites
// rx_pktbuf: the copy starts at the doorbell and, at one byte per clock, stays
// ahead of the receiver's four clocks per byte. So an echo is served only if
// the transmitter is free (avail) when its doorbell rings, and dropped
// otherwise. A reply or echo doorbell that comes while one is still pending is
// ignored.
// Timing: an ARP reply is rung one clock after avail; an echo after rx_len
// clocks of copying. arp_event and echo_event pulse with each frame sent.
// ARP behaviour and the echo service follow the document; the echo EtherType
// value, the byte-serial copy and dropping frames while busy are this
// design's own.
module arp_echo
  import netpkg::*;
#(
  parameter int unsigned MTU = ETH_MTU
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [7:0]                rx_pktbuf [MTU],
  input  logic [$clog2(MTU+1)-1:0]  rx_len,
  input  logic                      doorbell,
  // ARP table
  input  logic [47:0]               arp_mha,
  input  logic [31:0]               arp_mpa,
  input  logic [31:0]               arp_tpa,
  input  logic [47:0]               arp_tha,
  input  logic                      arp_valid,
  output logic                      tbl_wr,
  output logic [31:0]               tbl_tpa,
  output logic [47:0]               tbl_tha,
  // transmit interface
  output logic [7:0]                tx_pktbuf [MTU],
  output logic [$clog2(MTU+1)-1:0]  tx_len,
  output logic                      drbl,
  input  logic                      avail,
  output logic                      arp_event,
  output logic                      echo_event
);
  localparam int unsigned LW = $clog2(MTU + 1);

  typedef enum logic [1:0] {S_IDLE, S_ARP, S_ECHO} state_e;
  state_e state;

  logic [15:0] etype, htype, ptype, oper;
  logic [47:0] sha;
  logic [31:0] spa, tpa;
  logic        is_arp, is_echo, merge, for_us;

  assign etype = {rx_pktbuf[12], rx_pktbuf[13]};
  assign htype = {rx_pktbuf[14], rx_pktbuf[15]};
  assign ptype = {rx_pktbuf[16], rx_pktbuf[17]};
  assign oper  = {rx_pktbuf[20], rx_pktbuf[21]};
  assign sha   = {rx_pktbuf[22], rx_pktbuf[23], rx_pktbuf[24],
                  rx_pktbuf[25], rx_pktbuf[26], rx_pktbuf[27]};
  assign spa   = {rx_pktbuf[28], rx_pktbuf[29], rx_pktbuf[30], rx_pktbuf[31]};
  assign tpa   = {rx_pktbuf[38], rx_pktbuf[39], rx_pktbuf[40], rx_pktbuf[41]};

  assign is_arp  = etype == ETYPE_ARP && rx_len >= LW'(42) && htype == 16'd1
                && ptype == ETYPE_IPV4 && rx_pktbuf[18] == 8'd6 && rx_pktbuf[19] == 8'd4;
  assign is_echo = etype == ETYPE_ECHO;
  assign merge   = arp_valid && arp_tpa == spa;
  assign for_us  = tpa == arp_mpa;

  assign tbl_wr  = doorbell && is_arp && (merge || for_us);
  assign tbl_tpa = spa;
  assign tbl_tha = sha;

  logic [47:0]   req_sha;
  logic [31:0]   req_spa;
  logic [LW-1:0] idx, len;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      drbl       <= 1'b0;
      tx_len     <= '0;
      idx        <= '0;
      len        <= '0;
      req_sha    <= '0;
      req_spa    <= '0;
      arp_event  <= 1'b0;
      echo_event <= 1'b0;
    end else begin
      drbl       <= 1'b0;
      arp_event  <= 1'b0;
      echo_event <= 1'b0;
      unique case (state)
        S_IDLE: if (doorbell) begin
          if (is_arp && for_us && oper == 16'd1) begin
            req_sha <= sha;
            req_spa <= spa;
            state   <= S_ARP;
          end else if (is_echo && avail) begin
            len   <= rx_len;
            idx   <= '0;
            state <= S_ECHO;
          end
        end
        S_ARP: if (avail) begin
          for (int i = 0; i < 6; i++) begin
            tx_pktbuf[i]      <= req_sha[8*(5-i) +: 8];
            tx_pktbuf[6 + i]  <= arp_mha[8*(5-i) +: 8];
            tx_pktbuf[22 + i] <= arp_mha[8*(5-i) +: 8];
            tx_pktbuf[32 + i] <= req_sha[8*(5-i) +: 8];
          end
          for (int i = 0; i < 4; i++) begin
            tx_pktbuf[28 + i] <= arp_mpa[8*(3-i) +: 8];
            tx_pktbuf[38 + i] <= req_spa[8*(3-i) +: 8];
          end
          tx_pktbuf[12] <= ETYPE_ARP[15:8];
          tx_pktbuf[13] <= ETYPE_ARP[7:0];
          tx_pktbuf[14] <= 8'h00;
          tx_pktbuf[15] <= 8'h01;
          tx_pktbuf[16] <= ETYPE_IPV4[15:8];
          tx_pktbuf[17] <= ETYPE_IPV4[7:0];
          tx_pktbuf[18] <= 8'd6;
          tx_pktbuf[19] <= 8'd4;
          tx_pktbuf[20] <= 8'h00;
          tx_pktbuf[21] <= 8'h02;
          tx_len    <= LW'(42);
          drbl      <= 1'b1;
          arp_event <= 1'b1;
          state     <= S_IDLE;
        end
        S_ECHO: begin
          if (idx < LW'(6))       tx_pktbuf[idx] <= rx_pktbuf[idx + LW'(6)];
          else if (idx < LW'(12)) tx_pktbuf[idx] <= arp_mha[8*(11 - 32'(idx)) +: 8];
          else                    tx_pktbuf[idx] <= rx_pktbuf[idx];
          idx <= idx + 1'b1;
          if (idx + 1'b1 == len) begin
            tx_len     <= len;
            drbl       <= 1'b1;
            echo_event <= 1'b1;
            state      <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
