// tb_udp_rx: places UDP datagrams in the receive buffer, signals the IPv4
// acceptance and checks the 64-bit payload words on netout (order, count,
// latency) with and without a UDP checksum, and the drops for a bad checksum,
// another port and a length that does not fit. A long checksummed datagram
// is also checked while the next frame overwrites the buffer at line rate from
// 60 clocks after ip_ok: its words must still be exact, and an ip_ok that comes
// during the check must raise udp_drop.
module tb_udp_rx;
  import tb_eth_pkg::*;
  localparam int MTU = 400;
  localparam logic [31:0] MY_IP = 32'hC0A8_0132;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [7:0] rx_pktbuf [MTU];
  logic ip_ok = 0, cs_v, cs_last, csum_v, netout_valid, udp_drop;
  logic [5:0] ip_hlen = 20;
  logic [15:0] ip_plen = 0, csum;
  logic [7:0] cs_byte;
  logic [63:0] netout;
  int checks = 0, failures = 0, drops = 0, first_lat = -1;
  logic [63:0] words[$];

  udp_rx #(.MTU(MTU), .MY_PORT(16'd5005)) dut (.*);
  inet_checksum u_cs (.clk, .rst, .clr(1'b0), .rx_pktbuf_v(cs_v), .rx_pktbuf(cs_byte),
                      .rx_pktbuf_last(cs_last), .csum, .csum_v);

  int cyc = 0, t0 = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (netout_valid) begin
      if (words.size() == 0) first_lat = cyc - t0;
      words.push_back(netout);
    end
    if (udp_drop) drops++;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic deliver(bytes_t f, int extra = 0);
    foreach (rx_pktbuf[i]) rx_pktbuf[i] = (i < f.size()) ? f[i] : 8'($urandom);
    ip_plen = 16'(f.size() - 34 + extra);
    words.delete(); first_lat = -1;
    ip_ok = 1; t0 = cyc; @(negedge clk); ip_ok = 0;
    repeat (300) @(negedge clk);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int d0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 8; t++) begin
      automatic bytes_t p, f;
      automatic logic [63:0] pts[$];
      automatic int n = 1 + $urandom_range(0, 20);
      automatic int mode = t % 2;
      for (int i = 0; i < n; i++) begin
        automatic logic [63:0] v = {32'($urandom), 32'($urandom)};
        pts.push_back(v); put_point(p, v);
      end
      if (t == 3) p.push_back(8'hAB);   // trailing partial word
      f = udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd777, 16'd5005, p, mode);
      d0 = drops;
      deliver(f);
      chk(drops == d0, "no drop");
      chk(words.size() == n, $sformatf("word count %0d vs %0d", words.size(), n));
      foreach (pts[i]) if (i < words.size()) chk(words[i] == pts[i], $sformatf("word %0d", i));
      chk(first_lat == (mode ? 12 + 8 + p.size() + 3 : 2), $sformatf("latency %0d", first_lat));
    end
    begin
      automatic bytes_t p;
      put_point(p, 64'h0102030405060708);
      d0 = drops;
      deliver(udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd777, 16'd5005, p, 2));
      chk(drops == d0 + 1 && words.size() == 0, "bad UDP checksum dropped");
      deliver(udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd777, 16'd5006, p, 1));
      chk(drops == d0 + 2 && words.size() == 0, "other port dropped");
      deliver(udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd777, 16'd5005, p, 0), -1);
      chk(drops == d0 + 3 && words.size() == 0, "length beyond IP payload dropped");
    end
    begin
      automatic bytes_t p, f;
      automatic logic [63:0] pts[$];
      for (int i = 0; i < 40; i++) begin
        automatic logic [63:0] v = {32'($urandom), 32'($urandom)};
        pts.push_back(v); put_point(p, v);
      end
      f = udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd777, 16'd5005, p, 1);
      foreach (rx_pktbuf[i]) rx_pktbuf[i] = (i < f.size()) ? f[i] : 8'($urandom);
      ip_plen = 16'(f.size() - 34);
      words.delete();
      d0 = drops;
      ip_ok = 1; @(negedge clk); ip_ok = 0;
      repeat (59) @(negedge clk);
      for (int i = 0; i < MTU; i++) begin
        rx_pktbuf[i] = 8'($urandom);
        if (i == 10) begin ip_ok = 1; @(negedge clk); ip_ok = 0; repeat (3) @(negedge clk); end
        else repeat (4) @(negedge clk);
      end
      chk(words == pts, $sformatf("words exact while the buffer is overwritten (%0d words)", words.size()));
      chk(drops == d0 + 1, "ip_ok during the check dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
