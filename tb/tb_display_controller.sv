// tb_display_controller: loads frames of points into the double-buffered
// framebuffer and decodes the two SPI buses. Checks: lasers dark and buses
// idle before the first swap; the points of a frame come out in order and the
// frame is redrawn; a swap while drawing switches to the new frame from its
// first point; the point period; the PWM duty of a shown point; points past a
// full bank are dropped and flagged; other cmd values are ignored.
module tb_display_controller;
  import tb_eth_pkg::*;
  localparam int DEPTH = 16;
  localparam int HALF  = 1;
  localparam int PCLKS = 50;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [63:0] netout = 0;
  logic netout_valid = 0;
  logic sclk, cs_n, mosi_x, mosi_y, pwm_r, pwm_g, pwm_b, bram_select, point_done, swap_event, overflow;
  logic [$clog2(DEPTH):0] frame_len;
  int checks = 0, failures = 0;

  display_controller #(.DEPTH(DEPTH), .SPI_HALF(HALF), .POINT_CLKS(PCLKS)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // SPI decoder: both buses use sclk and cs_n of the x bus
  logic [31:0] shown[$];     // {x, y} per transfer
  logic [15:0] sx, sy;
  logic ps = 0, pcs = 1;
  int cyc = 0, last_done = 0, period = 0, transfers = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (!cs_n && sclk && !ps) begin sx = {sx[14:0], mosi_x}; sy = {sy[14:0], mosi_y}; end
    if (cs_n && !pcs) begin shown.push_back({sx, sy}); transfers++; end
    if (point_done) begin period = cyc - last_done; last_done = cyc; end
    ps = sclk; pcs = cs_n;
  end

  task automatic send(logic [63:0] w);
    netout = w; netout_valid = 1; @(negedge clk); netout_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  function automatic logic [63:0] rnd_point(logic [7:0] cmd);
    return point(cmd, 16'($urandom), 16'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
  endfunction

  int hi_r, hi_g, hi_b;
  task automatic measure_pwm;
    hi_r = 0; hi_g = 0; hi_b = 0;
    repeat (256) begin
      @(negedge clk);
      hi_r += pwm_r; hi_g += pwm_g; hi_b += pwm_b;
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [63:0] fa[$], fb[$];
    automatic int k;
    repeat (3) @(negedge clk); rst = 0;
    // before any frame: dark, idle
    repeat (300) @(negedge clk);
    measure_pwm();
    chk(transfers == 0 && hi_r + hi_g + hi_b == 0, "dark before first frame");
    // frame A: 5 points, one junk cmd in between
    for (int i = 0; i < 5; i++) begin
      fa.push_back(rnd_point(8'h01)); send(fa[i]);
      if (i == 2) send(rnd_point(8'h07));
    end
    chk(transfers == 0, "nothing drawn while the first frame fills");
    send(point(8'h02, 16'h0, 16'h0, 8'h0, 8'h0, 8'h0));
    chk(frame_len == 5 && bram_select == 1'b1, "swap saves length and toggles bank");
    shown.delete();
    wait (shown.size() >= 12);
    for (int i = 0; i < 12; i++)
      chk(shown[i] == {fa[i % 5][55:40], fa[i % 5][39:24]}, $sformatf("frame A point %0d", i));
    chk(period == PCLKS, $sformatf("point period %0d", period));
    // frame B arrives while A is drawn
    for (int i = 0; i < 3; i++) begin fb.push_back(rnd_point(8'h01)); send(fb[i]); end
    send(point(8'h02, 16'h0, 16'h0, 8'h0, 8'h0, 8'h0));
    chk(frame_len == 3 && bram_select == 1'b0, "second swap");
    wait (point_done); @(negedge clk);   // point in flight when the swap came
    shown.delete();
    wait (shown.size() >= 7);
    for (int i = 0; i < 7; i++)
      chk(shown[i] == {fb[i % 3][55:40], fb[i % 3][39:24]}, $sformatf("frame B point %0d", i));
    // single-point frame: PWM duties equal its colour
    begin
      automatic logic [63:0] p = point(8'h01, 16'h1234, 16'h5678, 8'd200, 8'd17, 8'd0);
      send(p);
      send(point(8'h02, 16'h0, 16'h0, 8'h0, 8'h0, 8'h0));
      repeat (600) @(negedge clk);
      measure_pwm();
      chk(hi_r == 200 && hi_g == 17 && hi_b == 0, $sformatf("pwm %0d %0d %0d", hi_r, hi_g, hi_b));
      chk(shown[$] == {16'h1234, 16'h5678}, "single point drawn");
    end
    // overflow: DEPTH + 4 points
    chk(!overflow, "no overflow yet");
    for (int i = 0; i < DEPTH + 4; i++) send(rnd_point(8'h01));
    chk(overflow, "overflow flagged");
    send(point(8'h02, 16'h0, 16'h0, 8'h0, 8'h0, 8'h0));
    chk(frame_len == DEPTH, "full bank length");
    // empty frame: dark again
    send(point(8'h02, 16'h0, 16'h0, 8'h0, 8'h0, 8'h0));
    chk(frame_len == 0, "empty frame");
    repeat (300) @(negedge clk);
    k = transfers;
    measure_pwm();
    chk(transfers == k && hi_r + hi_g + hi_b == 0, "dark after empty frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
