// arp_table: single-entry ARP table.
//
// Holds this station's own hardware and protocol addresses (arp_mha, arp_mpa),
// fixed at compile time by parameters, and one learned mapping, that of the
// gateway: its protocol address arp_tpa and hardware address arp_tha, valid once
// arp_valid is set. A write (wr_en) replaces the learned entry on the next
// clock; reset empties it.
// The single entry and the compile-time own addresses follow the document; the
// valid bit and the write port are this design's own.
module arp_table
  import netpkg::*;
#(
  parameter logic [47:0] MY_MAC = DEFAULT_MAC,
  parameter logic [31:0] MY_IP  = DEFAULT_IP
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [31:0] wr_tpa,
  input  logic [47:0] wr_tha,
  output logic [47:0] arp_mha,
  output logic [31:0] arp_mpa,
  output logic [31:0] arp_tpa,
  output logic [47:0] arp_tha,
  output logic        arp_valid
);
  assign arp_mha = MY_MAC;
  assign arp_mpa = MY_IP;

  always_ff @(posedge clk) begin
    if (rst) begin
      arp_valid <= 1'b0;
      arp_tpa   <= '0;
      arp_tha   <= '0;
    end else if (wr_en) begin
      arp_valid <= 1'b1;
      arp_tpa   <= wr_tpa;
      arp_tha   <= wr_tha;
    end
  end
endmodule
