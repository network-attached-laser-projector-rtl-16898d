// bram_bank: one framebuffer bank, a simple dual-port block RAM.
//
// DEPTH words of W bits, one write port and one read port on the same clock.
// A write (we) stores wdata at waddr on the clock edge; the read port returns
// the word at raddr on rdata one clock later (registered output, as block RAM
// is built). Reading and writing the same address in one clock returns the
// old word. The contents are not reset.
// The 64-bit width follows the document; the depth is this design's choice,
// since the document leaves the size of the banks open.
module bram_bank #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned W     = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
