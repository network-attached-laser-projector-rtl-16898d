// tb_inet_checksum: streams random byte strings of odd and even length and
// checks the result against a word-sum reference, and that a stream holding
// its own checksum sums to zero.
module tb_inet_checksum;
  import tb_eth_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic clr = 0, rx_pktbuf_v = 0, rx_pktbuf_last = 0, csum_v;
  logic [7:0] rx_pktbuf = 0;
  logic [15:0] csum;
  int checks = 0, failures = 0;

  inet_checksum dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(bytes_t d, output logic [15:0] r);
    foreach (d[i]) begin
      rx_pktbuf_v = 1; rx_pktbuf = d[i]; rx_pktbuf_last = (i == d.size() - 1);
      @(negedge clk);
      if (i != d.size() - 1) chk(!csum_v, "no early result");
    end
    rx_pktbuf_v = 0; rx_pktbuf_last = 0;
    chk(csum_v, "result one clock after last byte");
    r = csum;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    begin
      // a sum whose first fold carries again: 0xFFFF + 0x8000 + 0x8000
      automatic bytes_t d = '{8'hFF, 8'hFF, 8'h80, 8'h00, 8'h80, 8'h00};
      automatic logic [15:0] r;
      run(d, r);
      chk(r == 16'hFFFE, $sformatf("double carry %h", r));
    end
    for (int t = 0; t < 30; t++) begin
      automatic bytes_t d;
      automatic int n = 1 + $urandom_range(0, 60);
      automatic logic [15:0] r, r2;
      for (int i = 0; i < n; i++) d.push_back((t < 3) ? 8'hFF : 8'($urandom));
      run(d, r);
      chk(r == inet_sum(d), $sformatf("sum %0d: %h vs %h", t, r, inet_sum(d)));
      if (n % 2 == 0) begin
        d.push_back(r[15:8]); d.push_back(r[7:0]);
        run(d, r2);
        chk(r2 == 16'h0, "stream with its checksum verifies");
      end
      if (t == 10) begin
        // clr in the middle of a stream restarts it
        rx_pktbuf_v = 1; rx_pktbuf = 8'h55; @(negedge clk);
        rx_pktbuf_v = 0; clr = 1; @(negedge clk); clr = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
