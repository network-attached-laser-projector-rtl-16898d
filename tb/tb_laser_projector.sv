// tb_laser_projector: end-to-end test of the projector at its default sizes.
// Frames arrive as Ethernet/IPv4/UDP datagrams on the RMII receive pins; the
// testbench decodes the two SPI DAC buses and the PWM pins of jd and checks
// that the points come out in order, redrawn until the next swap. It also
// answers ARP and echo frames on the RMII transmit pins and checks the
// replies. Each mechanism is counted and must occur at least once: ARP reply,
// ARP table update, reply held while the transmitter is busy, echo, FCS
// reject, IPv4 firewall drop, UDP checksum drop, bank swap, frame redraw,
// swap during drawing, framebuffer overflow, laser-off on an empty frame.
module tb_laser_projector;
  import tb_eth_pkg::*;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_4C_41_53;
  localparam logic [31:0] MY_IP  = {8'd192, 8'd168, 8'd1, 8'd50};
  localparam logic [47:0] H_MAC  = 48'h00_11_22_33_44_55;
  localparam logic [31:0] H_IP   = {8'd192, 8'd168, 8'd1, 8'd1};
  localparam int DEPTH = 4096;
  localparam int PER_DGRAM = 180;
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

  // mechanism counters
  int n_arp = 0, n_tbl = 0, n_hold = 0, n_echo = 0, n_fcs = 0, n_ipd = 0, n_udpd = 0;
  int n_swap = 0, n_redraw = 0, n_swap_busy = 0, n_ovf = 0, n_dark = 0;
  int bells = 0, cyc = 0, last_pd = 0, pd_period = 0;
  always @(posedge clk) cyc++;

  // RMII transmit capture
  bytes_t txf[$];
  logic [1:0] txd_q[$];
  // SPI decode on jd
  logic [31:0] shown[$];
  logic [15:0] sx, sy;
  logic ps = 0, pcs = 1;
  always @(negedge clk) begin
    if (rx_doorbell) bells++;
    if (arp_event) n_arp++;
    if (echo_event) n_echo++;
    if (ip_drop) n_ipd++;
    if (udp_drop) n_udpd++;
    if (swap_event) n_swap++;
    if (point_done) begin pd_period = cyc - last_pd; last_pd = cyc; end
    if (dut.u_net.tbl_wr) n_tbl++;
    if (phy_txen) txd_q.push_back(phy_txd);
    else if (txd_q.size() > 0) begin
      automatic bytes_t f;
      for (int i = 32; i + 3 < txd_q.size(); i += 4)
        f.push_back({txd_q[i+3], txd_q[i+2], txd_q[i+1], txd_q[i]});
      txf.push_back(f);
      txd_q.delete();
    end
    if (!jd[4] && jd[0] && !ps) begin sx = {sx[14:0], jd[5]}; sy = {sy[14:0], jd[6]}; end
    if (jd[4] && !pcs) shown.push_back({sx, sy});
    ps = jd[0]; pcs = jd[4];
  end

  task automatic send(bytes_t m, bit corrupt = 0);
    automatic bytes_t f = with_fcs(m);
    if (corrupt) f[20] ^= 8'h80;
    for (int i = 0; i < 31; i++) begin phy_crs_dv = 1; phy_rxd = 2'b01; @(negedge clk); end
    phy_rxd = 2'b11; @(negedge clk);
    foreach (f[i]) for (int k = 0; k < 4; k++) begin phy_rxd = f[i][2*k +: 2]; @(negedge clk); end
    phy_crs_dv = 0; phy_rxd = 0;
    repeat (48) @(negedge clk);
  endtask

  function automatic bytes_t padded(bytes_t m);
    bytes_t p = m;
    while (p.size() < 60) p.push_back(8'h00);
    return with_fcs(p);
  endfunction

  function automatic logic [63:0] rnd_point();
    return point(8'h01, 16'($urandom), 16'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
  endfunction

  // Sends the given words as datagrams of up to PER_DGRAM words each.
  task automatic send_words(logic [63:0] w[$], int cks);
    automatic int i = 0;
    while (i < w.size()) begin
      automatic bytes_t pl;
      for (int k = 0; k < PER_DGRAM && i < w.size(); k++, i++) put_point(pl, w[i]);
      send(udp_frame(MY_MAC, H_MAC, H_IP, MY_IP, 16'd4000, 16'd5005, pl, cks));
    end
  endtask

  // True if s holds the x/y sequence of frame f, starting at its first point.
  function automatic bit seq_ok(logic [31:0] s[$], logic [63:0] f[$], int n);
    for (int i = 0; i < n; i++)
      if (i >= s.size() || s[i] != {f[i % f.size()][55:40], f[i % f.size()][39:24]}) return 0;
    return 1;
  endfunction

  int hi_r, hi_g, hi_b;
  task automatic measure_pwm;
    hi_r = 0; hi_g = 0; hi_b = 0;
    repeat (256) begin
      @(negedge clk);
      hi_r += jd[1]; hi_g += jd[2]; hi_b += jd[3];
    end
  endtask

  localparam logic [63:0] SWAP = 64'h02_0000_0000_000000;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [63:0] f1[$], f2[$], f3[$], w[$];
    automatic bytes_t e;
    automatic int b0, t0;
    repeat (3) @(negedge clk); rst = 0;
    @(negedge clk); shown.delete();

    // dark until a frame is swapped in
    measure_pwm();
    chk(shown.size() == 0 && hi_r + hi_g + hi_b == 0, "dark at start");

    // ARP request for us: reply on the wire, requester learned
    send(arp_frame(16'd1, H_MAC, H_IP, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF));
    repeat (500) @(negedge clk);
    chk(txf.size() == 1 && txf[0] == padded(arp_frame(16'd2, MY_MAC, MY_IP, H_MAC, H_IP, H_MAC)), "ARP reply");
    chk(dut.u_net.u_arp_table.arp_valid && dut.u_net.u_arp_table.arp_tha == H_MAC, "gateway learned");
    txf.delete();

    // echo, then an ARP request while the echo is still being sent
    e = eth_hdr(MY_MAC, H_MAC, 16'h88B5);
    for (int i = 0; i < 200; i++) e.push_back(8'($urandom));
    send(e);
    t0 = n_arp;
    send(arp_frame(16'd1, H_MAC, H_IP, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF));
    if (!dut.u_net.avail && n_arp == t0) n_hold++;
    repeat (2500) @(negedge clk);
    begin
      automatic bytes_t r = e;
      for (int i = 0; i < 6; i++) begin r[i] = H_MAC[8*(5-i) +: 8]; r[6+i] = MY_MAC[8*(5-i) +: 8]; end
      chk(txf.size() == 2, $sformatf("echo and held reply sent, %0d frames", txf.size()));
      if (txf.size() == 2) begin
        chk(txf[0] == padded(r), "echo frame");
        chk(txf[1] == padded(arp_frame(16'd2, MY_MAC, MY_IP, H_MAC, H_IP, H_MAC)), "held ARP reply");
      end
    end

    // corrupted frame: no doorbell
    b0 = bells;
    send(arp_frame(16'd1, H_MAC, H_IP, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF), 1);
    if (bells == b0) n_fcs++;
    chk(bells == b0, "bad FCS rejected");

    // firewall and checksum drops
    begin
      automatic bytes_t pl;
      put_point(pl, rnd_point());
      send(udp_frame(MY_MAC, H_MAC, H_IP, 32'hC0A8_0163, 16'd4000, 16'd5005, pl, 1));
      send(udp_frame(MY_MAC, H_MAC, H_IP, MY_IP, 16'd4000, 16'd5005, pl, 2));
      repeat (100) @(negedge clk);
      chk(n_ipd == 1 && n_udpd == 1 && shown.size() == 0, "foreign IP and bad checksum dropped");
    end

    // frame 1: 20 points in three datagrams, then the swap command
    for (int i = 0; i < 20; i++) f1.push_back(rnd_point());
    w = f1[0:7];   send_words(w, 1);
    w = f1[8:15];  send_words(w, 0);
    b0 = n_swap;
    w = f1[16:19]; w.push_back(SWAP); send_words(w, 1);
    wait (n_swap == b0 + 1);
    chk(dut.frame_len == 20, "frame 1 length");
    shown.delete();
    wait (shown.size() >= 45);
    chk(seq_ok(shown, f1, 45), "frame 1 drawn in order and redrawn");
    chk(pd_period == 2048, $sformatf("point period %0d clocks", pd_period));
    if (seq_ok(shown, f1, 45)) n_redraw++;

    // frame 2 arrives and is swapped in while frame 1 is drawn
    for (int i = 0; i < 7; i++) f2.push_back(rnd_point());
    b0 = n_swap;
    w = f2; w.push_back(SWAP); send_words(w, 1);
    wait (n_swap == b0 + 1); @(negedge clk);
    if (!dut.u_disp.cs_n || dut.u_disp.state != 0) n_swap_busy++;
    wait (point_done); @(negedge clk);
    shown.delete();
    wait (shown.size() >= 10);
    chk(seq_ok(shown, f2, 10), "frame 2 drawn from its first point");

    // single-point frame: PWM duties follow its colour
    w.delete();
    w.push_back(point(8'h01, 16'hABCD, 16'h0123, 8'd128, 8'd255, 8'd3)); w.push_back(SWAP);
    b0 = n_swap;
    send_words(w, 0);
    wait (n_swap == b0 + 1);
    repeat (2 * 2048 + 400) @(negedge clk);
    measure_pwm();
    chk(hi_r == 128 && hi_g == 255 && hi_b == 3, $sformatf("pwm %0d %0d %0d", hi_r, hi_g, hi_b));
    chk(shown[$] == {16'hABCD, 16'h0123}, "single point on the DACs");

    // overflow: more points than a bank holds
    for (int i = 0; i < DEPTH + 8; i++) f3.push_back(rnd_point());
    chk(!fb_overflow, "no overflow yet");
    b0 = n_swap;
    w = f3; w.push_back(SWAP); send_words(w, 0);
    wait (n_swap == b0 + 1); @(negedge clk);
    if (fb_overflow) n_ovf++;
    chk(fb_overflow && dut.frame_len == DEPTH, "full bank kept, excess dropped");
    wait (point_done); @(negedge clk);
    shown.delete();
    wait (shown.size() >= 50);
    chk(seq_ok(shown, f3, 50), "full frame drawn from its first point");

    // empty frame: lasers off
    b0 = n_swap;
    w.delete(); w.push_back(SWAP); send_words(w, 0);
    wait (n_swap == b0 + 1);
    repeat (2 * 2048 + 300) @(negedge clk);
    b0 = shown.size();
    measure_pwm();
    if (shown.size() == b0 && hi_r + hi_g + hi_b == 0) n_dark++;
    chk(n_dark == 1, "dark after empty frame");

    $display("mechanisms: arp=%0d table=%0d hold=%0d echo=%0d fcs=%0d ipdrop=%0d udpdrop=%0d swap=%0d redraw=%0d swap_busy=%0d overflow=%0d dark=%0d",
             n_arp, n_tbl, n_hold, n_echo, n_fcs, n_ipd, n_udpd, n_swap, n_redraw, n_swap_busy, n_ovf, n_dark);
    chk(n_arp > 0, "ARP reply happened");
    chk(n_tbl > 0, "ARP table update happened");
    chk(n_hold > 0, "held reply happened");
    chk(n_echo > 0, "echo happened");
    chk(n_fcs > 0, "FCS reject happened");
    chk(n_ipd > 0, "IPv4 drop happened");
    chk(n_udpd > 0, "UDP drop happened");
    chk(n_swap > 0, "swap happened");
    chk(n_redraw > 0, "redraw happened");
    chk(n_swap_busy > 0, "swap while drawing happened");
    chk(n_ovf > 0, "overflow happened");
    chk(n_dark > 0, "laser off happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
