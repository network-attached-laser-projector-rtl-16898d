// tb_mac_tx_if: rings the transmit interface with frames of random length and
// takes dibits with a random ready pattern; checks the dibit order (bit 0 of
// each byte first), that valid stays high until the last dibit, and avail.
module tb_mac_tx_if;
  localparam int MTU = 100;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [7:0] tx_pktbuf [MTU];
  logic [$clog2(MTU+1)-1:0] tx_len = 0;
  logic drbl = 0, avail, tx_axi_v, tx_axi_r = 0;
  logic [1:0] tx_axi;
  int checks = 0, failures = 0;

  mac_tx_if #(.MTU(MTU)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (tx_pktbuf[i]) tx_pktbuf[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    chk(avail && !tx_axi_v, "idle after reset");
    for (int t = 0; t < 10; t++) begin
      automatic int n = 1 + $urandom_range(0, MTU - 1);
      automatic int got = 0;
      foreach (tx_pktbuf[i]) tx_pktbuf[i] = 8'($urandom);
      tx_len = ($clog2(MTU+1))'(n); drbl = 1;
      @(negedge clk); drbl = 0;
      chk(!avail && tx_axi_v, "busy after doorbell");
      while (got < 4 * n) begin
        tx_axi_r = ($urandom_range(0, 2) != 0);
        if (!tx_axi_v) begin chk(0, "valid dropped early"); break; end
        if (tx_axi_r) begin
          chk(tx_axi == tx_pktbuf[got / 4][2*(got % 4) +: 2], $sformatf("dibit %0d", got));
          got++;
        end
        @(negedge clk);
      end
      tx_axi_r = 0;
      chk(avail && !tx_axi_v, "idle after last dibit");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
