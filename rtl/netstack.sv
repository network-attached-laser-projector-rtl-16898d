// netstack: parallel-stack UDP offload engine.
//
// Wires the receive and transmit halves of the Ethernet MAC (each with its own
// CRC32-BZIP2 engine) to the protocol blocks that work side by side on the one
// receive buffer: the ARP responder and echo service, and the IPv4 firewall
// followed by UDP depacketization, each of the last two with its own Internet
// checksum module. Every good frame rings the same doorbell; each protocol
// block decides from the EtherType whether the frame is its own. UDP payload
// to our port leaves as 64-bit words on netout/netout_valid for the display
// controller; ARP replies and echoes go back out through the transmit side.
//
// Interface: RMII on phy_* at 100 Mbps with clk being the 50 MHz RMII reference
// clock; addresses and the UDP port are compile-time parameters. The event
// outputs (rx_doorbell, arp_event, echo_event, ip_drop, udp_drop) pulse once per
// frame for monitoring.
// The partition follows the document's block diagram of the offload engine;
// the signals between the blocks that the diagram does not print are this
// design's own.
module netstack
  import netpkg::*;
#(
  parameter int unsigned MTU     = ETH_MTU,
  parameter logic [47:0] MY_MAC  = DEFAULT_MAC,
  parameter logic [31:0] MY_IP   = DEFAULT_IP,
  parameter logic [15:0] MY_PORT = DEFAULT_PORT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        phy_crs_dv,
  input  logic [1:0]  phy_rxd,
  output logic        phy_txen,
  output logic [1:0]  phy_txd,
  output logic [63:0] netout,
  output logic        netout_valid,
  output logic        rx_doorbell,
  output logic        arp_event,
  output logic        echo_event,
  output logic        ip_drop,
  output logic        udp_drop
);
  localparam int unsigned LW = $clog2(MTU + 1);

  // ---- receive MAC ----
  logic [31:0] rx_crc;
  logic [1:0]  rx_crc_step, rx_crc_din;
  logic        rx_doinit, rx_dosample, rx_axi_v, rx_eof, rx_good;
  logic [1:0]  rx_axi;

  crc32_bzip2 u_rx_crc (
    .clk, .doinit(rx_doinit), .dosample(rx_dosample), .dostep(1'b0),
    .din(rx_crc_din), .crc(rx_crc), .crc_step(rx_crc_step));

  mac_rx u_mac_rx (
    .clk, .rst, .phy_crs_dv, .phy_rxd, .crc(rx_crc), .doinit(rx_doinit),
    .dosample(rx_dosample), .crc_din(rx_crc_din), .rx_axi_v, .rx_axi, .rx_eof, .rx_good);

  logic [7:0]    rx_pktbuf [MTU];
  logic [LW-1:0] rx_len;

  mac_rcv_if #(.MTU(MTU)) u_rcv_if (
    .clk, .rst, .rx_axi_v, .rx_axi, .rx_eof, .rx_good,
    .rx_pktbuf, .rx_len, .doorbell(rx_doorbell));

  // ---- ARP and echo ----
  logic [47:0] arp_mha, arp_tha, tbl_tha;
  logic [31:0] arp_mpa, arp_tpa, tbl_tpa;
  logic        arp_valid, tbl_wr;
  logic [7:0]    tx_pktbuf [MTU];
  logic [LW-1:0] tx_len;
  logic          drbl, avail;

  arp_table #(.MY_MAC(MY_MAC), .MY_IP(MY_IP)) u_arp_table (
    .clk, .rst, .wr_en(tbl_wr), .wr_tpa(tbl_tpa), .wr_tha(tbl_tha),
    .arp_mha, .arp_mpa, .arp_tpa, .arp_tha, .arp_valid);

  arp_echo #(.MTU(MTU)) u_arp_echo (
    .clk, .rst, .rx_pktbuf, .rx_len, .doorbell(rx_doorbell),
    .arp_mha, .arp_mpa, .arp_tpa, .arp_tha, .arp_valid,
    .tbl_wr, .tbl_tpa, .tbl_tha,
    .tx_pktbuf, .tx_len, .drbl, .avail, .arp_event, .echo_event);

  // ---- transmit MAC ----
  logic       tx_axi_v, tx_axi_r;
  logic [1:0] tx_axi;
  logic       tx_doinit, tx_dosample, tx_dostep;
  logic [1:0] tx_axi_din, tx_crc_step;
  logic [31:0] tx_crc;

  mac_tx_if #(.MTU(MTU)) u_tx_if (
    .clk, .rst, .tx_pktbuf, .tx_len, .drbl, .avail, .tx_axi_v, .tx_axi, .tx_axi_r);

  mac_tx u_mac_tx (
    .clk, .rst, .tx_axi_v, .tx_axi, .tx_axi_r, .doinit(tx_doinit),
    .dosample(tx_dosample), .dostep(tx_dostep), .axi_din(tx_axi_din),
    .crc_step(tx_crc_step), .phy_txen, .phy_txd);

  crc32_bzip2 u_tx_crc (
    .clk, .doinit(tx_doinit), .dosample(tx_dosample), .dostep(tx_dostep),
    .din(tx_axi_din), .crc(tx_crc), .crc_step(tx_crc_step));

  // ---- IPv4 and UDP ----
  logic        ip_cs_v, ip_cs_last, ip_csum_v, ip_ok;
  logic [7:0]  ip_cs_byte;
  logic [15:0] ip_csum, ip_plen;
  logic [5:0]  ip_hlen;

  ipv4_rx #(.MTU(MTU), .MY_IP(MY_IP)) u_ipv4 (
    .clk, .rst, .rx_pktbuf, .rx_len, .doorbell(rx_doorbell),
    .cs_v(ip_cs_v), .cs_byte(ip_cs_byte), .cs_last(ip_cs_last),
    .csum(ip_csum), .csum_v(ip_csum_v), .ip_ok, .ip_hlen, .ip_plen, .ip_drop);

  inet_checksum u_ip_csum (
    .clk, .rst, .clr(1'b0), .rx_pktbuf_v(ip_cs_v), .rx_pktbuf(ip_cs_byte),
    .rx_pktbuf_last(ip_cs_last), .csum(ip_csum), .csum_v(ip_csum_v));

  logic        udp_cs_v, udp_cs_last, udp_csum_v;
  logic [7:0]  udp_cs_byte;
  logic [15:0] udp_csum;

  udp_rx #(.MTU(MTU), .MY_PORT(MY_PORT)) u_udp (
    .clk, .rst, .rx_pktbuf, .ip_ok, .ip_hlen, .ip_plen,
    .cs_v(udp_cs_v), .cs_byte(udp_cs_byte), .cs_last(udp_cs_last),
    .csum(udp_csum), .csum_v(udp_csum_v), .netout, .netout_valid, .udp_drop);

  inet_checksum u_udp_csum (
    .clk, .rst, .clr(1'b0), .rx_pktbuf_v(udp_cs_v), .rx_pktbuf(udp_cs_byte),
    .rx_pktbuf_last(udp_cs_last), .csum(udp_csum), .csum_v(udp_csum_v));
endmodule
