// tb_ipv4_rx: delivers IPv4 frames to the IPv4 block (with its checksum
// module) and checks that a good UDP datagram to our address passes with the
// right header and payload lengths and latency, and that a bad header
// checksum, another destination, another protocol and a fragment are dropped.
module tb_ipv4_rx;
  import tb_eth_pkg::*;
  localparam int MTU = 128;
  localparam int LW = $clog2(MTU + 1);
  localparam logic [31:0] MY_IP = 32'hC0A8_0132;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [7:0] rx_pktbuf [MTU];
  logic [LW-1:0] rx_len = 0;
  logic doorbell = 0, cs_v, cs_last, csum_v, ip_ok, ip_drop;
  logic [7:0] cs_byte;
  logic [15:0] csum, ip_plen;
  logic [5:0] ip_hlen;
  int checks = 0, failures = 0, oks = 0, drops = 0;

  ipv4_rx #(.MTU(MTU), .MY_IP(MY_IP)) dut (.*);
  inet_checksum u_cs (.clk, .rst, .clr(1'b0), .rx_pktbuf_v(cs_v), .rx_pktbuf(cs_byte),
                      .rx_pktbuf_last(cs_last), .csum, .csum_v);

  int cyc = 0, t0 = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (ip_ok) oks++;
    if (ip_drop) drops++;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic deliver(bytes_t f);
    foreach (rx_pktbuf[i]) rx_pktbuf[i] = (i < f.size()) ? f[i] : 8'($urandom);
    rx_len = LW'(f.size());
    doorbell = 1; t0 = cyc; @(negedge clk); doorbell = 0;
    repeat (30) @(negedge clk);
  endtask

  function automatic bytes_t pl(int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    return q;
  endfunction

  int ok_lat = -1;
  always @(negedge clk) if (ip_ok) ok_lat = cyc - t0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic bytes_t f;
    automatic int o0, d0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 6; t++) begin
      automatic int n = 8 * $urandom_range(0, 8);
      o0 = oks; d0 = drops;
      f = udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd1000, 16'd5005, pl(n), 0);
      deliver(f);
      chk(oks == o0 + 1 && drops == d0, "good datagram accepted");
      chk(ip_hlen == 6'd20 && ip_plen == 16'(8 + n), "lengths");
      chk(ok_lat == 22, $sformatf("latency %0d clocks", ok_lat));
    end
    o0 = oks; d0 = drops;
    deliver(udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd1000, 16'd5005, pl(16), 3));
    chk(oks == o0 && drops == d0 + 1, "bad header checksum dropped");
    deliver(udp_frame(48'h1, 48'h2, 32'hC0A8_0101, 32'hC0A8_0133, 16'd1000, 16'd5005, pl(16), 0));
    chk(oks == o0 && drops == d0 + 2, "other destination dropped");
    f = udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd1000, 16'd5005, pl(16), 0);
    f[23] = 8'd6;
    deliver(f);
    chk(oks == o0 && drops == d0 + 3, "TCP dropped");
    f = udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd1000, 16'd5005, pl(16), 0);
    f[20] = 8'h20;
    deliver(f);
    chk(oks == o0 && drops == d0 + 4, "fragment dropped");
    f = udp_frame(48'h1, 48'h2, 32'hC0A8_0101, MY_IP, 16'd1000, 16'd5005, pl(16), 0);
    f[12] = 8'h86; f[13] = 8'hDD;
    deliver(f);
    chk(oks == o0 && drops == d0 + 4, "non-IPv4 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
