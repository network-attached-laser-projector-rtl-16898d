// mac_tx: RMII transmit side of the Ethernet MAC (100 Mbps, one dibit per clock).
//
// When the transmit interface raises tx_axi_v the MAC sends 31 preamble dibits
// (2'b01) and the start-of-frame dibit 2'b11, presetting the CRC engine
// meanwhile (doinit). It then takes one frame dibit per clock (tx_axi_r high),
// sending it and feeding it to the CRC engine (dosample on axi_din). When
// tx_axi_v falls it pads with zero dibits up to the 60-byte Ethernet minimum,
// then shifts the 32-bit FCS out of the CRC engine (dostep, crc_step) and keeps
// phy_txen low for the 96-bit inter-frame gap (48 clocks) before it takes
// another frame. phy_txen and phy_txd are registered.
// The block and its CRC32-BZIP2 partner, with the crc_step, dostep, doinit,
// dosample and axi_din signals, follow the document's block diagram; padding and
// the inter-frame gap follow IEEE 802.3; the state machine is this design's own.
module mac_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       tx_axi_v,
  input  logic [1:0] tx_axi,
  output logic       tx_axi_r,
  output logic       doinit,
  output logic       dosample,
  output logic       dostep,
  output logic [1:0] axi_din,
  input  logic [1:0] crc_step,
  output logic       phy_txen,
  output logic [1:0] phy_txd
);
  localparam int unsigned MIN_DIBITS = 60 * 4;
  localparam int unsigned IFG_CLKS   = 48;

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IFG} state_e;
  state_e      state;
  logic [11:0] cnt;     // dibits of frame sent (data and pad)
  logic [5:0]  sub;     // preamble, FCS and gap counter

  // Next dibit to send, chosen combinationally from the state.
  logic       nxt_en;
  logic [1:0] nxt_d;
  logic       data_go;


  assign data_go  = (state == S_DATA) && tx_axi_v;
  assign tx_axi_r = data_go;
  logic       tail, pad_go;
  assign tail     = (state == S_PAD) || (state == S_DATA && !tx_axi_v);
  assign pad_go   = tail && cnt < 12'(MIN_DIBITS);
  assign doinit   = (state == S_PRE);
  assign dosample = data_go || pad_go;
  assign axi_din  = data_go ? tx_axi : 2'b00;
  assign dostep   = (state == S_FCS) || (tail && !pad_go);

  always_comb begin
    nxt_en = 1'b0;
    nxt_d  = 2'b00;
    unique case (state)
      S_PRE:  begin nxt_en = 1'b1; nxt_d = (sub == 6'd31) ? 2'b11 : 2'b01; end
      S_DATA, S_PAD, S_FCS: begin
        nxt_en = 1'b1;
        if (dosample) nxt_d = axi_din;
        else          nxt_d = crc_step;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      sub      <= '0;
      phy_txen <= 1'b0;
      phy_txd  <= '0;
    end else begin
      phy_txen <= nxt_en;
      phy_txd  <= nxt_d;
      unique case (state)
        S_IDLE: if (tx_axi_v) begin state <= S_PRE; sub <= '0; end
        S_PRE: begin
          sub <= sub + 6'd1;
          if (sub == 6'd31) begin state <= S_DATA; cnt <= '0; end
        end
        S_DATA, S_PAD: begin
          if (dosample) cnt <= cnt + 12'd1;
          if (tail) begin
            if (pad_go) state <= S_PAD;
            else begin state <= S_FCS; sub <= 6'd1; end
          end
        end
        S_FCS: begin
          sub <= sub + 6'd1;
          if (sub == 6'd15) begin state <= S_IFG; sub <= '0; end
        end
        S_IFG: begin
          sub <= sub + 6'd1;
          if (sub == 6'(IFG_CLKS - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
