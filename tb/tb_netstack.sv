// tb_netstack: drives RMII frames into the network offload engine and checks
// what comes out: the ARP reply on the transmit RMII (padded, with a correct
// FCS), the echo of an echo frame, the point words of UDP datagrams on netout,
// and the drops for a bad FCS, a foreign IPv4 address and a bad UDP checksum.
module tb_netstack;
  import tb_eth_pkg::*;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_4C_41_53;
  localparam logic [31:0] MY_IP  = 32'hC0A8_0132;
  localparam logic [47:0] H_MAC  = 48'h00_11_22_33_44_55;
  localparam logic [31:0] H_IP   = 32'hC0A8_0101;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic phy_crs_dv = 0, phy_txen;
  logic [1:0] phy_rxd = 0, phy_txd;
  logic [63:0] netout;
  logic netout_valid, rx_doorbell, arp_event, echo_event, ip_drop, udp_drop;
  int checks = 0, failures = 0;

  netstack dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int bells = 0, ipd = 0, udpd = 0;
  logic [63:0] words[$];
  bytes_t txf[$];
  logic [1:0] txd_q[$];
  always @(negedge clk) begin
    if (rx_doorbell) bells++;
    if (ip_drop) ipd++;
    if (udp_drop) udpd++;
    if (netout_valid) words.push_back(netout);
    if (phy_txen) txd_q.push_back(phy_txd);
    else if (txd_q.size() > 0) begin
      automatic bytes_t f;
      for (int i = 32; i + 3 < txd_q.size(); i += 4)
        f.push_back({txd_q[i+3], txd_q[i+2], txd_q[i+1], txd_q[i]});
      txf.push_back(f);
      txd_q.delete();
    end
  end

  task automatic send(bytes_t m, bit corrupt = 0);
    automatic bytes_t f = with_fcs(m);
    if (corrupt) f[f.size() - 1] ^= 8'h01;
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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bytes_t e, p;
    automatic logic [63:0] pts[$];
    automatic int b0;
    repeat (3) @(negedge clk); rst = 0;
    // ARP request -> reply on the wire
    send(arp_frame(16'd1, H_MAC, H_IP, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF));
    repeat (600) @(negedge clk);
    chk(txf.size() == 1, "one frame sent");
    if (txf.size() > 0) chk(txf[0] == padded(arp_frame(16'd2, MY_MAC, MY_IP, H_MAC, H_IP, H_MAC)), "ARP reply on the wire");
    txf.delete();
    // echo
    e = eth_hdr(MY_MAC, H_MAC, 16'h88B5);
    for (int i = 0; i < 100; i++) e.push_back(8'($urandom));
    send(e);
    repeat (1200) @(negedge clk);
    begin
      automatic bytes_t r = e;
      for (int i = 0; i < 6; i++) begin r[i] = H_MAC[8*(5-i) +: 8]; r[6+i] = MY_MAC[8*(5-i) +: 8]; end
      chk(txf.size() == 1 && txf[0] == padded(r), "echo on the wire");
    end
    // bad FCS: no doorbell
    b0 = bells;
    send(arp_frame(16'd1, H_MAC, H_IP, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF), 1);
    chk(bells == b0, "bad FCS rejected");
    // UDP points, with and without checksum
    for (int t = 0; t < 2; t++) begin
      automatic bytes_t pl;
      for (int i = 0; i < 10; i++) begin
        automatic logic [63:0] v = point(8'h01, 16'($urandom), 16'($urandom), 8'($urandom), 8'($urandom), 8'($urandom));
        pts.push_back(v); put_point(pl, v);
      end
      send(udp_frame(MY_MAC, H_MAC, H_IP, MY_IP, 16'd4000, 16'd5005, pl, t));
    end
    repeat (200) @(negedge clk);
    chk(words.size() == 20, $sformatf("20 words, got %0d", words.size()));
    foreach (pts[i]) if (i < words.size()) chk(words[i] == pts[i], $sformatf("point %0d", i));
    // drops
    p.delete(); put_point(p, 64'h01_0001_0002_030405);
    send(udp_frame(MY_MAC, H_MAC, H_IP, 32'hC0A8_0199, 16'd4000, 16'd5005, p, 1));
    send(udp_frame(MY_MAC, H_MAC, H_IP, MY_IP, 16'd4000, 16'd5005, p, 2));
    repeat (100) @(negedge clk);
    chk(ipd == 1 && udpd == 1 && words.size() == 20, "foreign address and bad UDP checksum dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
