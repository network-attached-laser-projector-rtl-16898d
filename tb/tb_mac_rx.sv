// tb_mac_rx: drives RMII frames into the MAC receiver (with its CRC engine)
// and checks the dibit stream after the delimiter, the FCS verdict for good
// and corrupted frames, and that a broken preamble yields nothing. Some frames
// end the way an RMII PHY ends them when carrier drops before its buffer is
// empty: CRS_DV low on the first dibit of each of the last nibbles and high on
// the second. Those frames must come through whole.
module tb_mac_rx;
  import tb_eth_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic phy_crs_dv = 0;
  logic [1:0] phy_rxd = 0;
  logic [31:0] crc;
  logic [1:0] crc_step;
  logic doinit, dosample, rx_axi_v, rx_eof, rx_good;
  logic [1:0] rx_axi, crc_din;
  int checks = 0, failures = 0;

  crc32_bzip2 u_crc (.clk, .doinit, .dosample, .dostep(1'b0), .din(crc_din), .crc, .crc_step);
  mac_rx dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  bytes_t got;
  logic [7:0] acc;
  int ph = 0, eofs = 0;
  bit last_good;
  always @(negedge clk) begin
    if (rx_axi_v) begin
      acc = {rx_axi, acc[7:2]};
      if (ph == 3) got.push_back(acc);
      ph = (ph + 1) % 4;
    end
    if (rx_eof) begin eofs++; last_good = rx_good; end
  end

  // toggle: number of final bytes sent with CRS_DV toggling
  task automatic send(bytes_t f, int pre = 31, bit broken = 0, int toggle = 0);
    @(negedge clk);
    for (int i = 0; i < pre; i++) begin
      phy_crs_dv = 1; phy_rxd = (broken && i == 10) ? 2'b10 : 2'b01; @(negedge clk);
    end
    phy_rxd = 2'b11; @(negedge clk);
    foreach (f[i]) for (int k = 0; k < 4; k++) begin
      phy_crs_dv = (i < f.size() - toggle) || k[0];
      phy_rxd = f[i][2*k +: 2]; @(negedge clk);
    end
    phy_crs_dv = 0; phy_rxd = 0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int t = 0; t < 12; t++) begin
      automatic bytes_t m, f;
      automatic int n = 14 + $urandom_range(0, 100);
      automatic int e0 = eofs;
      for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      f = with_fcs(m);
      if (t % 3 == 2) f[$urandom_range(0, n - 1)] ^= 8'h10;
      got.delete(); ph = 0;
      send(f, (t % 2) ? 31 : 5, 0, (t % 4 == 1) ? 0 : $urandom_range(1, 8));
      chk(eofs == e0 + 1, "one end of frame");
      chk(got.size() == f.size(), $sformatf("length %0d vs %0d", got.size(), f.size()));
      chk(got == f, "frame bytes");
      chk(last_good == (t % 3 != 2), $sformatf("fcs verdict frame %0d", t));
    end
    begin
      automatic bytes_t m = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08, 8'h09, 8'h0a, 8'h0b, 8'h0c, 8'h0d, 8'h0e};
      automatic int e0 = eofs;
      got.delete(); ph = 0;
      send(with_fcs(m), 31, 1);
      chk(eofs == e0 && got.size() == 0, "broken preamble dropped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
