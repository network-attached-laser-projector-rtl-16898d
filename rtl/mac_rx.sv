// mac_rx: RMII receive side of the Ethernet MAC (100 Mbps, one dibit per clock).
//
// It waits for carrier (phy_crs_dv) with the preamble dibit 2'b01, skips the
// preamble, and starts the frame after the start-of-frame delimiter, whose last
// dibit is 2'b11. Frame dibits pass through a one-dibit holding register so
// that the end of the frame can be told apart from RMII's end-of-carrier
// signalling: when the PHY loses carrier while it still holds data, it lowers
// CRS_DV on the first dibit of each remaining nibble and raises it on the
// second, and the data stays valid throughout. A held dibit is therefore data
// if CRS_DV was high when it arrived or is high one clock later; CRS_DV low on
// two clocks in a row ends the frame. Each data dibit goes out as rx_axi with
// rx_axi_v and, through crc_din/dosample, into the CRC engine; doinit presets
// the CRC during the preamble. At the end rx_eof pulses with rx_good set if the
// CRC register holds the CRC-32 residue and the frame is a whole number of
// bytes. The FCS itself is still passed on; the receive interface sheds it. A
// preamble broken by another dibit drops the frame.
//
// Timing: rx_axi follows its dibit on phy_rxd by two clocks, and rx_eof comes
// two clocks after the first low CRS_DV that ends the frame.
// The document gives the block and its CRC32-BZIP2 partner and points to the
// RMII interface; the state machine, the holding register and the
// rx_eof/rx_good end-of-frame signals are this design's own.
module mac_rx
  import netpkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        phy_crs_dv,
  input  logic [1:0]  phy_rxd,
  input  logic [31:0] crc,
  output logic        doinit,
  output logic        dosample,
  output logic [1:0]  crc_din,
  output logic        rx_axi_v,
  output logic [1:0]  rx_axi,
  output logic        rx_eof,
  output logic        rx_good
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_DROP} state_e;
  state_e state;
  logic [1:0] phase;   // data dibit count modulo 4
  logic       held;    // a dibit is in the holding register
  logic       held_dv; // CRS_DV when the held dibit arrived
  logic [1:0] held_d;

  assign doinit   = (state == S_PRE);
  assign dosample = (state == S_DATA) && held && (held_dv || phy_crs_dv);
  assign crc_din  = held_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      phase    <= '0;
      held     <= 1'b0;
      held_dv  <= 1'b0;
      held_d   <= '0;
      rx_axi_v <= 1'b0;
      rx_axi   <= '0;
      rx_eof   <= 1'b0;
      rx_good  <= 1'b0;
    end else begin
      rx_axi_v <= 1'b0;
      rx_eof   <= 1'b0;
      unique case (state)
        S_IDLE: if (phy_crs_dv && phy_rxd == 2'b01) state <= S_PRE;
        S_PRE: begin
          phase <= '0;
          held  <= 1'b0;
          if (!phy_crs_dv)            state <= S_IDLE;
          else if (phy_rxd == 2'b11)  state <= S_DATA;
          else if (phy_rxd != 2'b01)  state <= S_DROP;
        end
        S_DATA: begin
          held    <= 1'b1;
          held_dv <= phy_crs_dv;
          held_d  <= phy_rxd;
          if (dosample) begin
            rx_axi_v <= 1'b1;
            rx_axi   <= held_d;
            phase    <= phase + 2'd1;
          end
          if (!phy_crs_dv && !(held && held_dv)) begin
            rx_eof  <= 1'b1;
            rx_good <= (crc == CRC_RESIDUE) && (phase == 2'd0);
            state   <= S_IDLE;
          end
        end
        S_DROP: if (!phy_crs_dv) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
