// spi: write-only SPI master for one 16-bit DAC word (mode 0).
//
// start (with busy low) latches data, pulls cs_n low and shifts the word out on
// mosi, most significant bit first. sclk idles low; each bit is held for 2*HALF
// clocks with sclk rising in its middle, where the DAC samples it. After the
// last bit sclk returns low, cs_n goes high and done pulses for one clock.
// A transfer takes 2*W*HALF + 1 clocks from start to done; with HALF = 2 and a
// 50 MHz clock sclk runs at 12.5 MHz.
// The document chooses SPI (two buses in parallel, no address byte) and a
// 16-bit DAC; the SPI mode, the bit order and the clock rate are this design's
// own, as the DAC part is not named.
module spi #(
  parameter int unsigned W    = 16,
  parameter int unsigned HALF = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] data,
  output logic         busy,
  output logic         done,
  output logic         sclk,
  output logic         cs_n,
  output logic         mosi
);
  logic [W-1:0]               sh;
  logic [$clog2(W)-1:0]       bits;
  logic [$clog2(HALF+1)-1:0]  cnt;

  assign mosi = sh[W-1];
  assign cs_n = !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      sclk <= 1'b0;
      sh   <= '0;
      bits <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          sh   <= data;
          bits <= '0;
          cnt  <= '0;
          sclk <= 1'b0;
        end
      end else if (cnt == ($clog2(HALF+1))'(HALF - 1)) begin
        cnt  <= '0;
        sclk <= !sclk;
        if (sclk) begin
          if (bits == ($clog2(W))'(W - 1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            bits <= bits + 1'b1;
            sh   <= {sh[W-2:0], 1'b0};
          end
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
