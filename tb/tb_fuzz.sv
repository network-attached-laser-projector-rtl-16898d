// tb_fuzz: randomised robustness test of the whole projector at default sizes.
// Each round builds a frame (a UDP datagram of points, an ARP request or reply,
// an echo frame or random bytes under a random EtherType), then, half of the
// time, damages it: flips random bytes, mostly in the headers, cuts it short or
// appends bytes. Every frame carries a correct FCS, so the protocol blocks see
// it, and its last bytes may arrive with CRS_DV toggling as at the end of
// carrier. An independent model in this file decides from the final bytes what must
// happen: which point words come out of the UDP block, whether an ARP reply or
// an echo goes out (checked byte for byte, FCS included), and what the one-entry
// ARP table holds afterwards. The RFC 826 table update is modelled as merge
// (sender already in the table) or "for us" (target is our address). Rounds
// are spaced so that a reply always finishes before the next frame arrives.
// Each outcome must occur at least once.
module tb_fuzz;
  import tb_eth_pkg::*;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_4C_41_53;
  localparam logic [31:0] MY_IP  = {8'd192, 8'd168, 8'd1, 8'd50};
  localparam logic [15:0] MY_PORT = 16'd5005;
  localparam int ROUNDS = 500;
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

  logic [63:0] got_w[$];
  bytes_t txf[$];
  logic [1:0] txd_q[$];
  always @(negedge clk) begin
    if (dut.netout_valid) got_w.push_back(dut.netout);
    if (phy_txen) txd_q.push_back(phy_txd);
    else if (txd_q.size() > 0) begin
      automatic bytes_t f;
      for (int i = 32; i + 3 < txd_q.size(); i += 4)
        f.push_back({txd_q[i+3], txd_q[i+2], txd_q[i+1], txd_q[i]});
      txf.push_back(f);
      txd_q.delete();
    end
  end

  task automatic send(bytes_t m);
    automatic bytes_t f = with_fcs(m);
    automatic int toggle = $urandom_range(0, 4);
    for (int i = 0; i < 31; i++) begin phy_crs_dv = 1; phy_rxd = 2'b01; @(negedge clk); end
    phy_rxd = 2'b11; @(negedge clk);
    // the last few bytes may arrive with CRS_DV toggling, as at the end of carrier
    foreach (f[i]) for (int k = 0; k < 4; k++) begin
      phy_crs_dv = (i < f.size() - toggle) || k[0];
      phy_rxd = f[i][2*k +: 2]; @(negedge clk);
    end
    phy_crs_dv = 0; phy_rxd = 0;
    repeat (48) @(negedge clk);
  endtask

  function automatic logic [15:0] be16(bytes_t m, int i);
    return {m[i], m[i+1]};
  endfunction
  function automatic logic [31:0] be32(bytes_t m, int i);
    return {m[i], m[i+1], m[i+2], m[i+3]};
  endfunction
  function automatic logic [47:0] be48(bytes_t m, int i);
    return {m[i], m[i+1], m[i+2], m[i+3], m[i+4], m[i+5]};
  endfunction

  // model of the ARP table
  bit          t_valid = 0;
  logic [31:0] t_pa;
  logic [47:0] t_ha;

  int n_udp_ok = 0, n_ip_rej = 0, n_udp_rej = 0, n_arp_reply = 0, n_arp_learn = 0,
      n_arp_ignored = 0, n_echo = 0, n_other = 0, n_mut = 0;

  // Words the UDP path must put out for frame m; returns 0 if it must drop it.
  function automatic bit udp_model(bytes_t m, ref logic [63:0] w[$], output bit ip_pass);
    int hl, tl, ul, o;
    bytes_t ph;
    ip_pass = 0;
    if (m.size() < 34 || be16(m, 12) != 16'h0800) return 0;
    hl = 4 * m[14][3:0];
    tl = be16(m, 16);
    if (m[14][7:4] != 4 || hl < 20 || be32(m, 30) != MY_IP || m[23] != 8'd17) return 0;
    if (be16(m, 20) & 16'h3FFF) return 0;
    if (tl < hl || tl + 14 > m.size()) return 0;
    for (int i = 0; i < hl; i++) ph.push_back(m[14 + i]);
    if (inet_sum(ph) != 16'h0) return 0;
    ph.delete();
    ip_pass = 1;
    o  = 14 + hl;
    ul = be16(m, o + 4);
    if (be16(m, o + 2) != MY_PORT || ul < 8 || ul > tl - hl) return 0;
    if (be16(m, o + 6) != 16'h0) begin
      for (int i = 26; i < 34; i++) ph.push_back(m[i]);
      ph.push_back(8'h00); ph.push_back(8'd17); put16(ph, 16'(ul));
      for (int i = 0; i < ul; i++) ph.push_back(m[o + i]);
      if (inet_sum(ph) != 16'h0) return 0;
    end
    for (int k = 0; k + 8 <= ul - 8; k += 8)
      w.push_back({m[o+8+k], m[o+9+k], m[o+10+k], m[o+11+k], m[o+12+k], m[o+13+k], m[o+14+k], m[o+15+k]});
    return 1;
  endfunction

  // Frame the transmitter must send for m (empty if none); updates the table model.
  function automatic bytes_t tx_model(bytes_t m);
    bytes_t r;
    if (m.size() >= 42 && be16(m, 12) == 16'h0806 && be16(m, 14) == 16'd1 && be16(m, 16) == 16'h0800
        && m[18] == 8'd6 && m[19] == 8'd4) begin
      automatic logic [47:0] sha = be48(m, 22);
      automatic logic [31:0] spa = be32(m, 28);
      automatic bit merge = t_valid && t_pa == spa;
      automatic bit for_us = be32(m, 38) == MY_IP;
      if (merge || for_us) begin t_valid = 1; t_pa = spa; t_ha = sha; n_arp_learn++; end
      else n_arp_ignored++;
      if (for_us && be16(m, 20) == 16'd1) begin
        r = arp_frame(16'd2, MY_MAC, MY_IP, sha, spa, sha);
        n_arp_reply++;
      end
    end else if (be16(m, 12) == 16'h88B5) begin
      put48(r, be48(m, 6)); put48(r, MY_MAC);
      for (int i = 12; i < m.size(); i++) r.push_back(m[i]);
      n_echo++;
    end
    if (r.size() == 0) return r;
    while (r.size() < 60) r.push_back(8'h00);
    return with_fcs(r);
  endfunction

  function automatic bytes_t rnd_bytes(int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    return q;
  endfunction

  function automatic bytes_t make_frame();
    bytes_t m, pl;
    automatic int kind = $urandom_range(0, 9);
    automatic logic [47:0] hmac = {16'h0011, 32'($urandom_range(0, 3))};
    automatic logic [31:0] hip  = {24'hC0A801, 8'($urandom_range(1, 4))};
    if (kind < 5) begin
      pl = rnd_bytes($urandom_range(0, 60));
      for (int i = 0; i < pl.size(); i += 8) pl[i] = 8'h01;   // keep the display out of the way
      m = udp_frame(MY_MAC, hmac, hip, ($urandom_range(0, 4) == 0) ? hip : MY_IP,
                    16'd4000, ($urandom_range(0, 5) == 0) ? 16'd5006 : MY_PORT, pl, $urandom_range(0, 3));
    end else if (kind < 8) begin
      m = arp_frame(16'($urandom_range(1, 2)), hmac, hip, 48'h0,
                    ($urandom_range(0, 3) == 0) ? hip : MY_IP, 48'hFFFF_FFFF_FFFF);
    end else if (kind == 8) begin
      m = eth_hdr(MY_MAC, hmac, 16'h88B5);
      m = {m, rnd_bytes($urandom_range(0, 120))};
    end else begin
      automatic logic [15:0] et[4] = '{16'h0800, 16'h0806, 16'h88B5, 16'($urandom)};
      m = eth_hdr(MY_MAC, hmac, et[$urandom_range(0, 3)]);
      m = {m, rnd_bytes($urandom_range(0, 120))};
    end
    if ($urandom_range(0, 1)) begin
      n_mut++;
      case ($urandom_range(0, 3))
        0, 1: for (int j = $urandom_range(1, 3); j > 0; j--) begin
          automatic int p = $urandom_range(12, (m.size() < 50 ? m.size() : 50) - 1);
          m[p] ^= 8'(1 << $urandom_range(0, 7));
        end
        2: m = m[0:$urandom_range(13, m.size() - 1)];
        3: m = {m, rnd_bytes($urandom_range(1, 20))};
      endcase
    end
    return m;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (5) @(negedge clk);
    for (int r = 0; r < ROUNDS; r++) begin
      automatic bytes_t m = make_frame();
      automatic logic [63:0] ew[$];
      automatic bit ip_pass, ok;
      automatic bytes_t et;
      automatic int idle = 0;
      got_w.delete(); txf.delete();
      ok = udp_model(m, ew, ip_pass);
      if (ok) n_udp_ok++;
      else if (ip_pass) n_udp_rej++;
      else if (m.size() >= 14 && be16(m, 12) == 16'h0800) n_ip_rej++;
      else n_other++;
      et = tx_model(m);
      send(m);
      while (idle < 400) begin @(negedge clk); idle = phy_txen ? 0 : idle + 1; end
      chk(got_w == ew, $sformatf("round %0d: %0d words out, %0d expected", r, got_w.size(), ew.size()));
      chk(txf.size() == (et.size() != 0), $sformatf("round %0d: %0d frames sent", r, txf.size()));
      if (txf.size() == 1 && et.size() != 0) chk(txf[0] == et, $sformatf("round %0d: reply bytes", r));
      chk(dut.u_net.arp_valid == t_valid && (!t_valid ||
          (dut.u_net.arp_tpa == t_pa && dut.u_net.arp_tha == t_ha)), $sformatf("round %0d: ARP table", r));
    end
    $display("udp ok %0d, ip rejected %0d, udp rejected %0d, arp replies %0d, table writes %0d, arp ignored %0d, echoes %0d, not IPv4 %0d, damaged %0d",
             n_udp_ok, n_ip_rej, n_udp_rej, n_arp_reply, n_arp_learn, n_arp_ignored, n_echo, n_other, n_mut);
    chk(n_udp_ok > 0 && n_ip_rej > 0 && n_udp_rej > 0 && n_arp_reply > 0 && n_arp_learn > 0
        && n_arp_ignored > 0 && n_echo > 0 && n_other > 0, "every outcome occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
