// pwm: pulse-width modulator for one laser channel.
//
// A free-running W-bit counter sets the period (2**W clocks, 195 kHz for W = 8
// at 50 MHz). The output is high while the counter is below duty, so duty = 0
// keeps the laser dark and duty = 255 lights it for 255 of 256 clocks. A new
// duty is taken at the start of each period, so no period is cut short.
// The document drives each laser's current source with a PWM signal per
// channel from 8-bit colour values; the counter scheme and the period are this
// design's own.
module pwm #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] duty,
  output logic         pwm_out
);
  logic [W-1:0] cnt, cur, nxt;

  assign nxt = cnt + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      cur     <= '0;
      pwm_out <= 1'b0;
    end else begin
      cnt <= nxt;
      // pwm_out shows the comparison for the count it is registered with.
      if (nxt == '0) begin
        cur     <= duty;
        pwm_out <= duty != '0;
      end else begin
        pwm_out <= nxt < cur;
      end
    end
  end
endmodule
