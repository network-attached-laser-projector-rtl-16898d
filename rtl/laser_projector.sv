// laser_projector: network-attached RGB laser projector, FPGA top level.
//
// Vector images arrive over Ethernet as UDP datagrams of 64-bit points. The
// network offload engine (netstack) turns them into point words, answers ARP
// and echo frames on its own, and hands the points to the display controller,
// which collects a frame in one framebuffer bank while it draws the previous
// frame from the other, writing x and y to two galvanometer DACs over SPI and
// r, g and b to the laser current sources as PWM.
//
// Interface: one clock, the 50 MHz RMII reference clock, with a synchronous
// active-high reset; RMII to the Ethernet PHY; jd[6:0] to the drive
// electronics: jd[0] SCLK, jd[4] CS (active low), jd[5] MOSI of the x DAC,
// jd[6] MOSI of the y DAC (the two DACs share SCLK and CS), jd[1..3] PWM of
// red, green and blue. The jd pin map follows the document's display
// controller diagram. The monitor outputs pulse once per event.
module laser_projector
  import netpkg::*;
#(
  parameter int unsigned MTU      = ETH_MTU,
  parameter logic [47:0] MY_MAC   = DEFAULT_MAC,
  parameter logic [31:0] MY_IP    = DEFAULT_IP,
  parameter logic [15:0] MY_PORT  = DEFAULT_PORT,
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned SPI_HALF = 2,
  parameter int unsigned POINT_CLKS = 2048
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       phy_crs_dv,
  input  logic [1:0] phy_rxd,
  output logic       phy_txen,
  output logic [1:0] phy_txd,
  output logic [6:0] jd,
  // monitor
  output logic       rx_doorbell,
  output logic       arp_event,
  output logic       echo_event,
  output logic       ip_drop,
  output logic       udp_drop,
  output logic       point_done,
  output logic       swap_event,
  output logic       fb_overflow,
  output logic       bram_select
);
  logic [63:0]        netout;
  logic               netout_valid;
  logic [$clog2(DEPTH):0] frame_len;

  netstack #(.MTU(MTU), .MY_MAC(MY_MAC), .MY_IP(MY_IP), .MY_PORT(MY_PORT)) u_net (
    .clk, .rst, .phy_crs_dv, .phy_rxd, .phy_txen, .phy_txd, .netout, .netout_valid,
    .rx_doorbell, .arp_event, .echo_event, .ip_drop, .udp_drop);

  display_controller #(.DEPTH(DEPTH), .SPI_HALF(SPI_HALF), .POINT_CLKS(POINT_CLKS)) u_disp (
    .clk, .rst, .netout, .netout_valid,
    .sclk(jd[0]), .cs_n(jd[4]), .mosi_x(jd[5]), .mosi_y(jd[6]),
    .pwm_r(jd[1]), .pwm_g(jd[2]), .pwm_b(jd[3]),
    .bram_select, .frame_len, .point_done, .swap_event, .overflow(fb_overflow));
endmodule
