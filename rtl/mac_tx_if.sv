// mac_tx_if: transmit interface between the protocol blocks and the MAC transmitter.
//
// A sender writes a frame (destination MAC through payload, without FCS) into
// tx_pktbuf, and while avail is high rings drbl for one clock with the frame
// length on tx_len. The interface then presents the frame to the MAC
// transmitter as a stream of dibits, bit 0 of each byte first: tx_axi_v stays
// high from the first to the last dibit and a dibit is taken on each clock with
// tx_axi_r high. avail is low from the doorbell until the last dibit is taken,
// and tx_pktbuf must not change while it is low.
// The tx_pktbuf/drbl/avail and tx_axi_r/v names follow the network stack block
// diagram; the protocol on them is this design's own.
module mac_tx_if
  import netpkg::*;
#(
  parameter int unsigned MTU = ETH_MTU
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic [7:0]                tx_pktbuf [MTU],
  input  logic [$clog2(MTU+1)-1:0]  tx_len,
  input  logic                      drbl,
  output logic                      avail,
  output logic                      tx_axi_v,
  output logic [1:0]                tx_axi,
  input  logic                      tx_axi_r
);
  localparam int unsigned LW = $clog2(MTU + 1);
  logic          busy;
  logic [LW-1:0] idx, len;
  logic [1:0]    phase;
  logic [7:0]    cur;

  assign avail    = !busy;
  assign tx_axi_v = busy;
  assign cur      = tx_pktbuf[idx < LW'(MTU) ? idx : '0];
  assign tx_axi   = cur[2*phase +: 2];

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      idx   <= '0;
      phase <= '0;
      len   <= '0;
    end else if (!busy) begin
      if (drbl && tx_len != '0) begin
        busy  <= 1'b1;
        len   <= (tx_len > LW'(MTU)) ? LW'(MTU) : tx_len;
        idx   <= '0;
        phase <= '0;
      end
    end else if (tx_axi_r) begin
      phase <= phase + 2'd1;
      if (phase == 2'd3) begin
        idx <= idx + 1'b1;
        if (idx + 1'b1 == len) busy <= 1'b0;
      end
    end
  end
endmodule
