// tb_mac_rcv_if: feeds dibit streams with end-of-frame verdicts into the
// receive interface and checks the byte buffer, the FCS-less length and the
// doorbell, including no doorbell for bad, short or oversized frames.
module tb_mac_rcv_if;
  import tb_eth_pkg::*;
  localparam int MTU = 64;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic rx_axi_v = 0, rx_eof = 0, rx_good = 0;
  logic [1:0] rx_axi = 0;
  logic [7:0] rx_pktbuf [MTU];
  logic [$clog2(MTU+1)-1:0] rx_len;
  logic doorbell;
  int checks = 0, failures = 0, bells = 0;

  mac_rcv_if #(.MTU(MTU)) dut (.*);

  always @(negedge clk) if (doorbell) bells++;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(bytes_t f, bit good);
    @(negedge clk);
    foreach (f[i]) for (int k = 0; k < 4; k++) begin
      rx_axi_v = 1; rx_axi = f[i][2*k +: 2]; @(negedge clk);
    end
    rx_axi_v = 0;
    rx_eof = 1; rx_good = good; @(negedge clk);
    rx_eof = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int t = 0; t < 10; t++) begin
      automatic bytes_t f;
      automatic int n = 18 + $urandom_range(0, MTU - 18);
      automatic int b0 = bells;
      automatic bit good = (t % 4 != 3);
      for (int i = 0; i < n; i++) f.push_back(8'($urandom));
      send(f, good);
      chk(bells == b0 + (good ? 1 : 0), $sformatf("doorbell frame %0d n=%0d bells=%0d b0=%0d len=%0d", t, n, bells, b0, rx_len));
      if (good) begin
        chk(rx_len == n - 4, "length without FCS");
        for (int i = 0; i < n; i++) chk(rx_pktbuf[i] == f[i], $sformatf("byte %0d", i));
      end
    end
    begin
      automatic bytes_t f;
      automatic int b0 = bells;
      for (int i = 0; i < 10; i++) f.push_back(8'(i));
      send(f, 1);
      chk(bells == b0, "short frame no doorbell");
      f.delete();
      for (int i = 0; i < MTU + 3; i++) f.push_back(8'(i));
      send(f, 1);
      chk(bells == b0, "oversized frame no doorbell");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
