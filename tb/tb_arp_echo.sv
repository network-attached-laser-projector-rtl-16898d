// tb_arp_echo: puts frames into the receive buffer, rings the doorbell and
// checks the ARP table updates (new entry, merge, no learning from frames for
// others), the ARP reply built in the transmit buffer, and the echo frame.
// Also checks that an echo arriving while the transmitter is busy is dropped
// rather than sent late, and that the table is updated while a reply waits.
module tb_arp_echo;
  import tb_eth_pkg::*;
  localparam int MTU = 128;
  localparam logic [47:0] MY_MAC = 48'h02_00_00_4C_41_53;
  localparam logic [31:0] MY_IP  = 32'hC0A8_0132;
  localparam logic [47:0] GW_MAC = 48'h00_11_22_33_44_55;
  localparam logic [31:0] GW_IP  = 32'hC0A8_0101;
  localparam int LW = $clog2(MTU + 1);
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [7:0] rx_pktbuf [MTU], tx_pktbuf [MTU];
  logic [LW-1:0] rx_len = 0, tx_len;
  logic doorbell = 0, avail = 1, drbl, arp_event, echo_event;
  logic arp_valid, tbl_wr;
  logic [47:0] arp_mha, arp_tha, tbl_tha;
  logic [31:0] arp_mpa, arp_tpa, tbl_tpa;
  int checks = 0, failures = 0, drbls = 0;

  arp_table #(.MY_MAC(MY_MAC), .MY_IP(MY_IP)) u_tbl (
    .clk, .rst, .wr_en(tbl_wr), .wr_tpa(tbl_tpa), .wr_tha(tbl_tha),
    .arp_mha, .arp_mpa, .arp_tpa, .arp_tha, .arp_valid);
  arp_echo #(.MTU(MTU)) dut (.*);

  always @(negedge clk) if (drbl) drbls++;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic deliver(bytes_t f);
    foreach (rx_pktbuf[i]) rx_pktbuf[i] = (i < f.size()) ? f[i] : 8'($urandom);
    rx_len = LW'(f.size());
    doorbell = 1; @(negedge clk); doorbell = 0;
  endtask

  task automatic check_tx(bytes_t e, string what);
    chk(tx_len == LW'(e.size()), {what, " length"});
    foreach (e[i]) chk(tx_pktbuf[i] == e[i], $sformatf("%s byte %0d", what, i));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int d0;
    repeat (2) @(negedge clk); rst = 0;
    // request for someone else: no reply, nothing learned
    d0 = drbls;
    deliver(arp_frame(16'd1, GW_MAC, GW_IP, 48'h0, 32'hC0A8_0199, 48'hFFFF_FFFF_FFFF));
    repeat (5) @(negedge clk);
    chk(drbls == d0 && !arp_valid, "request for other host ignored");
    // request for us while the transmitter is busy: wait, then reply
    avail = 0;
    deliver(arp_frame(16'd1, GW_MAC, GW_IP, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF));
    repeat (5) @(negedge clk);
    chk(drbls == d0, "reply waits for avail");
    chk(arp_valid && arp_tpa == GW_IP && arp_tha == GW_MAC, "requester learned");
    avail = 1;
    repeat (3) @(negedge clk);
    chk(drbls == d0 + 1, "reply rung");
    check_tx(arp_frame(16'd2, MY_MAC, MY_IP, GW_MAC, GW_IP, GW_MAC), "arp reply");
    // gateway changes its MAC, announced to another host: merge updates it
    d0 = drbls;
    deliver(arp_frame(16'd2, 48'h00_AA_BB_CC_DD_EE, GW_IP, 48'h0, 32'hC0A8_0177, 48'hFFFF_FFFF_FFFF));
    repeat (5) @(negedge clk);
    chk(arp_tha == 48'h00_AA_BB_CC_DD_EE && drbls == d0, "merge refreshes hardware address");
    // another host asks for us: replaces the single entry, reply to it
    deliver(arp_frame(16'd1, 48'h00_01_02_03_04_05, 32'hC0A8_0109, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF));
    repeat (5) @(negedge clk);
    chk(arp_tpa == 32'hC0A8_0109 && arp_tha == 48'h00_01_02_03_04_05, "new host replaces entry");
    check_tx(arp_frame(16'd2, MY_MAC, MY_IP, 48'h00_01_02_03_04_05, 32'hC0A8_0109, 48'h00_01_02_03_04_05), "second reply");
    // echo frame
    begin
      automatic bytes_t f = eth_hdr(MY_MAC, 48'h00_DE_AD_BE_EF_01, 16'h88B5);
      automatic bytes_t e = eth_hdr(48'h00_DE_AD_BE_EF_01, MY_MAC, 16'h88B5);
      for (int i = 0; i < 60; i++) begin automatic byte unsigned v = 8'($urandom); f.push_back(v); e.push_back(v); end
      d0 = drbls;
      deliver(f);
      repeat (f.size() + 5) @(negedge clk);
      chk(drbls == d0 + 1, "echo rung");
      check_tx(e, "echo");
    end
    // echo while the transmitter is busy: dropped, not sent later from a stale buffer
    begin
      automatic bytes_t f = eth_hdr(MY_MAC, 48'h00_DE_AD_BE_EF_02, 16'h88B5);
      for (int i = 0; i < 40; i++) f.push_back(8'($urandom));
      d0 = drbls;
      avail = 0;
      deliver(f);
      repeat (10) @(negedge clk);
      avail = 1;
      repeat (f.size() + 10) @(negedge clk);
      chk(drbls == d0, "echo dropped while transmitter busy");
    end
    // table merge while a reply is pending: table refreshed, reply to the requester as asked
    d0 = drbls;
    avail = 0;
    deliver(arp_frame(16'd1, 48'h00_01_02_03_04_06, 32'hC0A8_0109, 48'h0, MY_IP, 48'hFFFF_FFFF_FFFF));
    deliver(arp_frame(16'd2, 48'h00_01_02_03_04_07, 32'hC0A8_0109, 48'h0, 32'hC0A8_0177, 48'hFFFF_FFFF_FFFF));
    repeat (3) @(negedge clk);
    chk(arp_tha == 48'h00_01_02_03_04_07 && drbls == d0, "merge while a reply is pending");
    avail = 1;
    repeat (3) @(negedge clk);
    chk(drbls == d0 + 1, "pending reply rung");
    check_tx(arp_frame(16'd2, MY_MAC, MY_IP, 48'h00_01_02_03_04_06, 32'hC0A8_0109, 48'h00_01_02_03_04_06), "pending reply");
    // unknown EtherType: nothing
    d0 = drbls;
    deliver(eth_hdr(MY_MAC, GW_MAC, 16'h86DD));
    repeat (5) @(negedge clk);
    chk(drbls == d0, "other EtherType ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
