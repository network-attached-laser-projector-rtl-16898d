// mac_rcv_if: receive interface between the MAC receiver and the protocol blocks.
//
// Dibits from the MAC receiver (bit 0 first on the wire) are packed into bytes
// and written, in arrival order, into rx_pktbuf, a plain array of byte
// registers that the protocol blocks read at fixed offsets. At the end of a good
// frame the four FCS bytes are dropped from the length (rx_len) and doorbell
// pulses for one clock. A bad FCS, a frame shorter than an Ethernet header plus
// FCS, or one longer than the buffer rings no doorbell (bytes past the end are
// discarded).
//
// Timing: doorbell comes one clock after rx_eof. The buffer is single: the
// blocks behind it must finish reading before the next frame overwrites it,
// which at 2 bits per clock gives them at least the 80 clocks of
// inter-frame gap and preamble plus 4 clocks per byte.
// The byte-array buffer and the doorbell follow the document; the length port,
// the size checks and the single buffer are this design's own.
module mac_rcv_if
  import netpkg::*;
#(
  parameter int unsigned MTU = ETH_MTU
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      rx_axi_v,
  input  logic [1:0]                rx_axi,
  input  logic                      rx_eof,
  input  logic                      rx_good,
  output logic [7:0]                rx_pktbuf [MTU],
  output logic [$clog2(MTU+1)-1:0]  rx_len,
  output logic                      doorbell
);
  localparam int unsigned LW = $clog2(MTU + 1);
  logic [LW-1:0] wptr;
  logic [1:0]    phase;
  logic [5:0]    shreg;
  logic          overflow;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      phase    <= '0;
      overflow <= 1'b0;
      doorbell <= 1'b0;
      rx_len   <= '0;
    end else begin
      doorbell <= 1'b0;
      if (rx_axi_v) begin
        phase <= phase + 2'd1;
        shreg <= {rx_axi, shreg[5:2]};
        if (phase == 2'd3) begin
          if (wptr < LW'(MTU)) begin
            rx_pktbuf[wptr] <= {rx_axi, shreg};
            wptr <= wptr + 1'b1;
          end else begin
            overflow <= 1'b1;
          end
        end
      end
      if (rx_eof) begin
        if (rx_good && !overflow && wptr >= LW'(18)) begin
          rx_len   <= wptr - LW'(4);
          doorbell <= 1'b1;
        end
        wptr     <= '0;
        phase    <= '0;
        overflow <= 1'b0;
      end
    end
  end
endmodule
