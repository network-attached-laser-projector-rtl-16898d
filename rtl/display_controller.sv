// display_controller: double-buffered point framebuffer and laser scan-out.
//
// Points arrive from the network stack as 64-bit words (netpkg::point_t: cmd,
// x, y, r, g, b). A word with cmd 0x01 is stored at the next address of the
// bank being filled (the bank bram_select names); one with cmd 0x02 ends the
// frame: the fill address is saved as the frame length, bram_select toggles,
// and filling restarts at address 0 of the other bank. Other cmd values are
// ignored, as are points past the end of a full bank (counted in overflow).
//
// The scan-out side reads the other bank from address 0 to the saved frame
// length and starts over, so a frame is redrawn until the next swap. For each
// point, x and y go out at the same time on two SPI buses sharing sclk and cs_n
// (mosi_x, mosi_y); when both words have been sent the point's r, g and b
// become the duties of the three PWM outputs. A swap restarts the scan at
// address 0 of the new bank once the point in flight is finished. While no
// frame has been swapped in (or an empty one was), the lasers are off.
// Timing: one point per max(POINT_CLKS, 2*16*SPI_HALF + 3) clocks; the default
// 2048 gives 24.4 k points/s at 50 MHz, a rate galvanometers can follow, and
// eight PWM periods per point. The point's colour is applied when its x and y
// words have been sent and is held for the rest of the point. point_done
// pulses as each point ends.
// The two banks, the save-end-address-and-toggle swap, the packet format and
// the SPI and PWM outputs follow the document; the bank depth, the redraw of a
// frame until the next swap and the point rate are this design's own choices.
// The SPI status outputs of the y bus (busy, sclk, cs_n) are unused because
// both buses run in lockstep and share the x bus's sclk and cs_n.
module display_controller
  import netpkg::*;
#(
  parameter int unsigned DEPTH    = 4096,
  parameter int unsigned SPI_HALF = 2,
  parameter int unsigned POINT_CLKS = 2048
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [63:0]              netout,
  input  logic                     netout_valid,
  output logic                     sclk,
  output logic                     cs_n,
  output logic                     mosi_x,
  output logic                     mosi_y,
  output logic                     pwm_r,
  output logic                     pwm_g,
  output logic                     pwm_b,
  output logic                     bram_select,
  output logic [$clog2(DEPTH):0]   frame_len,
  output logic                     point_done,
  output logic                     swap_event,
  output logic                     overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  point_t        in_pt;
  logic [AW:0]   wr_addr;
  logic [AW-1:0] rd_addr;
  logic [63:0]   rdata0, rdata1;
  logic          we0, we1, wr_ok;

  assign in_pt = point_t'(netout);
  assign wr_ok = netout_valid && in_pt.cmd == CMD_DATA && wr_addr < (AW+1)'(DEPTH);
  assign we0   = wr_ok && !bram_select;
  assign we1   = wr_ok &&  bram_select;

  bram_bank #(.DEPTH(DEPTH), .W(64)) u_bram0 (
    .clk, .we(we0), .waddr(wr_addr[AW-1:0]), .wdata(netout), .raddr(rd_addr), .rdata(rdata0));
  bram_bank #(.DEPTH(DEPTH), .W(64)) u_bram1 (
    .clk, .we(we1), .waddr(wr_addr[AW-1:0]), .wdata(netout), .raddr(rd_addr), .rdata(rdata1));

  // Fill side.
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr     <= '0;
      bram_select <= 1'b0;
      frame_len   <= '0;
      swap_event  <= 1'b0;
      overflow    <= 1'b0;
    end else begin
      swap_event <= 1'b0;
      if (netout_valid && in_pt.cmd == CMD_SWAP) begin
        frame_len   <= wr_addr;
        bram_select <= !bram_select;
        wr_addr     <= '0;
        swap_event  <= 1'b1;
      end else if (wr_ok) begin
        wr_addr <= wr_addr + 1'b1;
      end else if (netout_valid && in_pt.cmd == CMD_DATA) begin
        overflow <= 1'b1;
      end
    end
  end

  // Scan-out side.
  typedef enum logic [1:0] {S_READ, S_LOAD, S_SEND} state_e;
  state_e      state;
  logic        rsel, restart;
  point_t      rd_pt, cur_pt;
  logic        spi_start, done_x, done_y, busy_x, busy_y, sclk_y, cs_y;
  logic        sent_x, sent_y;
  logic [7:0]  duty_r, duty_g, duty_b;
  logic [31:0] hold;   // clocks since the last point ended

  assign rd_pt     = point_t'(rsel ? rdata1 : rdata0);
  assign spi_start = state == S_LOAD;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_READ;
      rd_addr    <= '0;
      rsel       <= 1'b0;
      restart    <= 1'b0;
      cur_pt     <= '0;
      sent_x     <= 1'b0;
      sent_y     <= 1'b0;
      duty_r     <= '0;
      duty_g     <= '0;
      duty_b     <= '0;
      point_done <= 1'b0;
      hold       <= '0;
    end else begin
      point_done <= 1'b0;
      hold       <= hold + 1;
      if (swap_event) restart <= 1'b1;
      unique case (state)
        S_READ: begin
          if (restart || swap_event) begin
            rd_addr <= '0;
            restart <= 1'b0;
          end else if (frame_len == '0) begin
            duty_r <= '0;
            duty_g <= '0;
            duty_b <= '0;
          end else begin
            rsel  <= !bram_select;
            state <= S_LOAD;
          end
        end
        S_LOAD: begin
          cur_pt <= rd_pt;
          sent_x <= 1'b0;
          sent_y <= 1'b0;
          state  <= S_SEND;
        end
        S_SEND: begin
          if (done_x) sent_x <= 1'b1;
          if (done_y) sent_y <= 1'b1;
          if (done_x) begin
            duty_r <= cur_pt.r;
            duty_g <= cur_pt.g;
            duty_b <= cur_pt.b;
          end
          if ((sent_x || done_x) && (sent_y || done_y) && hold >= POINT_CLKS - 1) begin
            point_done <= 1'b1;
            hold       <= '0;
            state      <= S_READ;
            if (restart || swap_event) begin
              rd_addr <= '0;
              restart <= 1'b0;
            end else if ((AW+1)'(rd_addr) + 1'b1 >= frame_len) begin
              rd_addr <= '0;
            end else begin
              rd_addr <= rd_addr + 1'b1;
            end
          end
        end
        default: state <= S_READ;
      endcase
    end
  end

  // The x word is sent from the point read in S_LOAD; spi latches data on start.
  spi #(.W(16), .HALF(SPI_HALF)) u_spi_x (
    .clk, .rst, .start(spi_start), .data(rd_pt.x), .busy(busy_x), .done(done_x),
    .sclk(sclk), .cs_n(cs_n), .mosi(mosi_x));
  spi #(.W(16), .HALF(SPI_HALF)) u_spi_y (
    .clk, .rst, .start(spi_start), .data(rd_pt.y), .busy(busy_y), .done(done_y),
    .sclk(sclk_y), .cs_n(cs_y), .mosi(mosi_y));

  pwm #(.W(8)) u_pwm_r (.clk, .rst, .duty(duty_r), .pwm_out(pwm_r));
  pwm #(.W(8)) u_pwm_g (.clk, .rst, .duty(duty_g), .pwm_out(pwm_g));
  pwm #(.W(8)) u_pwm_b (.clk, .rst, .duty(duty_b), .pwm_out(pwm_b));
endmodule
