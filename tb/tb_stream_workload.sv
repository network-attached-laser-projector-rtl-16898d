// tb_stream_workload: the projector's streaming workload at default sizes.
// A trajectory on a 512x512 grid (the outline of a square and of a circle,
// scaled to the 16-bit DAC range by a shift of 7) is sent one point per UDP
// datagram, each frame padded to the Ethernet minimum, back to back at the
// full 100 Mbit/s line rate (96-bit gap), then the swap command. Checks: every
// datagram accepted and no point lost, the frame length, the receive time per
// point (84 bytes on the wire = 336 clocks), and the first points drawn on the
// SPI pins in order. A second phase fills a whole bank: 4096 points in
// maximum-size datagrams (184 points, 1518-byte frames) sent back to back. It
// checks that the points arrive at the wire rate less framing overhead (1472
// of 1538 bytes, 95.7 Mbit/s of point data), that all are stored without
// overflow, and that the new frame is drawn.
module tb_stream_workload;
  import tb_eth_pkg::*;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_4C_41_53;
  localparam logic [31:0] MY_IP  = {8'd192, 8'd168, 8'd1, 8'd50};
  localparam logic [47:0] H_MAC  = 48'h00_11_22_33_44_55;
  localparam logic [31:0] H_IP   = {8'd192, 8'd168, 8'd1, 8'd1};
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic phy_crs_dv = 0, phy_txen;
  logic [1:0] phy_rxd = 0, phy_txd;
  logic [6:0] jd;
  logic rx_doorbell, arp_event, echo_event, ip_drop, udp_drop, point_done, swap_event, fb_overflow, bram_select;
  int checks = 0, failures = 0;

  laser_projector dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0, bells = 0, words = 0, drops = 0, swaps = 0;
  logic [31:0] shown[$];
  logic [63:0] outw[$];
  logic [15:0] sx, sy;
  logic ps = 0, pcs = 1;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rx_doorbell) bells++;
    if (dut.netout_valid) begin words++; outw.push_back(dut.netout); end
    if (ip_drop || udp_drop) drops++;
    if (swap_event) swaps++;
    if (!jd[4] && jd[0] && !ps) begin sx = {sx[14:0], jd[5]}; sy = {sy[14:0], jd[6]}; end
    if (jd[4] && !pcs) shown.push_back({sx, sy});
    ps = jd[0]; pcs = jd[4];
  end

  task automatic send(bytes_t m);
    automatic bytes_t p = m;
    automatic bytes_t f;
    while (p.size() < 60) p.push_back(8'h00);
    f = with_fcs(p);
    for (int i = 0; i < 31; i++) begin phy_crs_dv = 1; phy_rxd = 2'b01; @(negedge clk); end
    phy_rxd = 2'b11; @(negedge clk);
    foreach (f[i]) for (int k = 0; k < 4; k++) begin phy_rxd = f[i][2*k +: 2]; @(negedge clk); end
    phy_crs_dv = 0; phy_rxd = 0;
    repeat (48) @(negedge clk);
  endtask

  task automatic send_word(logic [63:0] w);
    automatic bytes_t pl;
    put_point(pl, w);
    send(udp_frame(MY_MAC, H_MAC, H_IP, MY_IP, 16'd4000, 16'd5005, pl, 1));
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [63:0] traj[$];
    automatic int t0, t1;
    // square outline, 200 pixels a side, then a circle of radius 100 (integer steps)
    for (int i = 0; i < 200; i += 4) traj.push_back(point(8'h01, 16'((56 + i) << 7), 16'(56 << 7), 8'd255, 8'd0, 8'd0));
    for (int i = 0; i < 200; i += 4) traj.push_back(point(8'h01, 16'(256 << 7), 16'((56 + i) << 7), 8'd255, 8'd0, 8'd0));
    for (int i = 0; i < 200; i += 4) traj.push_back(point(8'h01, 16'((256 - i) << 7), 16'(256 << 7), 8'd255, 8'd0, 8'd0));
    for (int i = 0; i < 200; i += 4) traj.push_back(point(8'h01, 16'(56 << 7), 16'((256 - i) << 7), 8'd255, 8'd0, 8'd0));
    for (int a = 0; a < 360; a += 2) begin
      automatic real r = 3.14159265358979 * a / 180.0;
      automatic int px = 360 + $rtoi(100.0 * $cos(r));
      automatic int py = 380 + $rtoi(100.0 * $sin(r));
      traj.push_back(point(8'h01, 16'(px << 7), 16'(py << 7), 8'd0, 8'd128, 8'd255));
    end
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk); shown.delete();
    t0 = cyc;
    foreach (traj[i]) send_word(traj[i]);
    t1 = cyc;
    send_word(64'h02_0000_0000_000000);
    repeat (100) @(negedge clk);
    $display("%0d points received in %0d clocks, %0d clocks per point", traj.size(), t1 - t0, (t1 - t0) / traj.size());
    chk((t1 - t0) == 336 * traj.size(), "line-rate spacing of minimum frames");
    chk(bells == traj.size() + 1, $sformatf("doorbells %0d", bells));
    chk(drops == 0, "no datagram dropped");
    chk(words == traj.size() + 1, $sformatf("words %0d", words));
    chk(swaps == 1 && dut.frame_len == traj.size(), $sformatf("frame length %0d", dut.frame_len));
    wait (shown.size() >= 40);
    for (int i = 0; i < 40; i++)
      chk(shown[i] == {traj[i][55:40], traj[i][39:24]}, $sformatf("point %0d drawn", i));
    // phase 2: a full bank in maximum-size datagrams
    begin
      automatic logic [63:0] big[$];
      automatic int w0 = words, b0 = bells, s0 = swaps, k0;
      for (int i = 0; i < 4096; i++)
        big.push_back(point(8'h01, 16'($urandom), 16'($urandom), 8'($urandom), 8'($urandom), 8'($urandom)));
      outw.delete();
      t0 = cyc;
      for (int i = 0; i < big.size(); i += 184) begin
        automatic bytes_t pl;
        for (int k = i; k < i + 184 && k < big.size(); k++) put_point(pl, big[k]);
        send(udp_frame(MY_MAC, H_MAC, H_IP, MY_IP, 16'd4000, 16'd5005, pl, 1));
      end
      t1 = cyc;
      $display("%0d points in %0d clocks: %0d Mbit/s of point data", big.size(), t1 - t0,
               (big.size() * 64 * 50) / (t1 - t0));
      // 22 datagrams of 184 points (1538 bytes on the wire) and one of 48 points
      chk((t1 - t0) == 4 * (22 * 1538 + (14 + 20 + 8 + 48 * 8 + 4 + 20)), "full-size datagrams at line rate");
      chk((big.size() * 64 * 50) / (t1 - t0) >= 94, "point data rate");
      // the last datagram's checksum pass (12 + UDP length + 3 clocks) and its words
      repeat (500) @(negedge clk);
      chk(words - w0 == big.size() && bells - b0 == 23 && drops == 0, $sformatf("all points of the bank received: words %0d bells %0d drops %0d", words - w0, bells - b0, drops));
      chk(outw == big, "every word as sent");
      chk(!fb_overflow, "bank full, no overflow");
      shown.delete();
      send_word(64'h02_0000_0000_000000);
      wait (swaps == s0 + 1);
      chk(dut.frame_len == 4096, $sformatf("frame length %0d", dut.frame_len));
      wait (shown.size() >= 13);
      // the point in flight at the swap may finish first
      k0 = (shown[0] == {big[0][55:40], big[0][39:24]}) ? 0 : 1;
      for (int i = 0; i < 12; i++)
        chk(shown[k0 + i] == {big[i][55:40], big[i][39:24]}, $sformatf("big frame point %0d drawn", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
