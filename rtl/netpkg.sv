// netpkg: types and constants shared by the network offload engine and the
// display controller of the network-attached laser projector.
//
// The 64-bit point record (cmd, x, y, r, g, b) and its command codes 0x01 and
// 0x02 follow the document. Ethernet/ARP/IPv4/UDP field offsets are those of the
// standard headers (RFC 826, 791, 768). The echo EtherType, the UDP port and the
// compile-time MAC/IP addresses are this design's own choices.
package netpkg;

  // Ethernet II frame buffer size in bytes (frame without preamble, with FCS).
  localparam int unsigned ETH_MTU = 1518;

  localparam logic [15:0] ETYPE_IPV4 = 16'h0800;
  localparam logic [15:0] ETYPE_ARP  = 16'h0806;
  // Local experimental EtherType used by the echo service.
  localparam logic [15:0] ETYPE_ECHO = 16'h88B5;

  localparam logic [47:0] DEFAULT_MAC  = 48'h02_00_00_4C_41_53;
  localparam logic [31:0] DEFAULT_IP   = {8'd192, 8'd168, 8'd1, 8'd50};
  localparam logic [15:0] DEFAULT_PORT = 16'd5005;

  // Residue of the non-reflected CRC-32 register after a frame and its FCS.
  localparam logic [31:0] CRC_RESIDUE = 32'hC704_DD7B;

  typedef enum logic [7:0] {
    CMD_DATA = 8'h01,
    CMD_SWAP = 8'h02
  } cmd_e;

  // One laser point, packed in network byte order: cmd in the top byte.
  typedef struct packed {
    logic [7:0]  cmd;
    logic [15:0] x;
    logic [15:0] y;
    logic [7:0]  r;
    logic [7:0]  g;
    logic [7:0]  b;
  } point_t;

endpackage
