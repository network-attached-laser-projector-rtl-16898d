// tb_mac_tx: feeds frames as dibit streams into the MAC transmitter (with its
// CRC engine) and checks the RMII output: preamble and delimiter, the frame,
// zero padding to 60 bytes, the FCS against a reflected CRC-32 reference, the
// frame length in clocks, and the inter-frame gap between back-to-back frames.
module tb_mac_tx;
  import tb_eth_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic tx_axi_v = 0, tx_axi_r;
  logic [1:0] tx_axi = 0;
  logic doinit, dosample, dostep, phy_txen;
  logic [1:0] axi_din, crc_step, phy_txd;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32_bzip2 u_crc (.clk, .doinit, .dosample, .dostep, .din(axi_din), .crc, .crc_step);
  mac_tx dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // source: a queue of dibits, taken when tx_axi_r is high
  logic [1:0] src[$];
  bit pop = 0;
  always @(negedge clk) begin
    if (pop) void'(src.pop_front());
    tx_axi_v = src.size() > 0;
    tx_axi   = (src.size() > 0) ? src[0] : 2'b00;
    #1 pop = tx_axi_v && tx_axi_r;
  end

  // sink: every dibit sent while phy_txen is high, and the gaps
  logic [1:0] wire_q[$];
  int gap = 0, min_gap = 1000, frames = 0;
  bit prev_en = 0;
  always @(negedge clk) begin
    if (phy_txen) wire_q.push_back(phy_txd);
    if (phy_txen && !prev_en) begin
      if (frames > 0 && gap < min_gap) min_gap = gap;
      frames++;
    end
    gap = phy_txen ? 0 : gap + 1;
    prev_en = phy_txen;
  end

  function automatic bytes_t expect_frame(bytes_t m);
    bytes_t p = m;
    while (p.size() < 60) p.push_back(8'h00);
    return with_fcs(p);
  endfunction

  task automatic check_wire(bytes_t m);
    bytes_t e = expect_frame(m);
    chk(wire_q.size() == 32 + 4 * e.size(), $sformatf("wire length %0d vs %0d", wire_q.size(), 32 + 4 * e.size()));
    for (int i = 0; i < 31; i++) chk(wire_q[i] == 2'b01, "preamble");
    chk(wire_q[31] == 2'b11, "delimiter");
    for (int i = 0; i < e.size(); i++)
      for (int k = 0; k < 4; k++)
        if (32 + 4 * i + k < wire_q.size())
          chk(wire_q[32 + 4 * i + k] == e[i][2*k +: 2], $sformatf("byte %0d dibit %0d", i, k));
  endtask

  function automatic void load(bytes_t m);
    foreach (m[i]) for (int k = 0; k < 4; k++) src.push_back(m[i][2*k +: 2]);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int t = 0; t < 8; t++) begin
      automatic bytes_t m;
      automatic int n = (t < 2) ? 20 + 10 * t : 14 + $urandom_range(0, 120);
      for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      wire_q.delete();
      @(negedge clk);
      load(m);
      wait (src.size() == 0);
      @(negedge clk);
      while (phy_txen) @(negedge clk);
      check_wire(m);
    end
    // two frames back to back: the second must wait for the inter-frame gap
    begin
      automatic bytes_t a, b;
      for (int i = 0; i < 64; i++) begin a.push_back(8'($urandom)); b.push_back(8'($urandom)); end
      wire_q.delete();
      @(negedge clk);
      load(a);
      wait (src.size() == 0);
      load(b);
      wait (src.size() == 0);
      @(negedge clk);
      while (phy_txen) @(negedge clk);
      chk(min_gap >= 48, $sformatf("inter-frame gap %0d", min_gap));
      chk(wire_q.size() == 2 * (32 + 4 * 68), "two frames on the wire");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
