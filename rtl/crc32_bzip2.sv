// crc32_bzip2: Ethernet frame check sequence engine, two bits per clock.
//
// The FCS of IEEE 802.3 is a CRC-32 (polynomial 0x04C11DB7, preset all ones,
// final complement). Computed on the bit stream in wire order with a
// non-reflected shift register it is the CRC-32/BZIP2 register, which is how
// the MAC receiver and transmitter use it. RMII delivers bit 0 of each dibit
// first, so din[0] is shifted in before din[1].
//
// Interface: doinit presets the register to all ones; dosample shifts in the
// dibit on din; dostep shifts the register out two bits at a time, crc_step
// being the complemented top two bits in RMII order ({bit30, bit31} inverted,
// bit 31 first on the wire). crc shows the register itself; after a good
// frame plus its FCS it equals CRC_RESIDUE. All actions take effect on the next
// clock edge; doinit wins over dosample, which wins over dostep.
// The port names come from the network stack block diagram; the priority of
// the controls is this design's choice.
module crc32_bzip2 (
  input  logic        clk,
  input  logic        doinit,
  input  logic        dosample,
  input  logic        dostep,
  input  logic [1:0]  din,
  output logic [31:0] crc,
  output logic [1:0]  crc_step
);
  localparam logic [31:0] POLY = 32'h04C1_1DB7;

  function automatic logic [31:0] shift1(logic [31:0] c, logic b);
    return (c << 1) ^ ((c[31] ^ b) ? POLY : 32'h0);
  endfunction

  always_ff @(posedge clk) begin
    if (doinit)        crc <= 32'hFFFF_FFFF;
    else if (dosample) crc <= shift1(shift1(crc, din[0]), din[1]);
    else if (dostep)   crc <= {crc[29:0], 2'b11};
  end

  assign crc_step = {~crc[30], ~crc[31]};
endmodule
