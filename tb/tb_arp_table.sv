// tb_arp_table: checks the own addresses, that the entry is empty after reset,
// and that writes replace the single learned entry.
module tb_arp_table;
  localparam logic [47:0] MAC = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] IP  = 32'h0A00_0007;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic wr_en = 0, arp_valid;
  logic [31:0] wr_tpa = 0, arp_mpa, arp_tpa;
  logic [47:0] wr_tha = 0, arp_mha, arp_tha;
  int checks = 0, failures = 0;

  arp_table #(.MY_MAC(MAC), .MY_IP(IP)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    chk(arp_mha == MAC && arp_mpa == IP, "own addresses");
    chk(!arp_valid, "empty after reset");
    for (int t = 0; t < 20; t++) begin
      automatic logic [31:0] p = $urandom;
      automatic logic [47:0] h = {16'($urandom), 32'($urandom)};
      automatic logic [31:0] p0 = arp_tpa;
      automatic logic [47:0] h0 = arp_tha;
      automatic bit we = $urandom_range(0, 1);
      wr_tpa = p; wr_tha = h; wr_en = we;
      @(negedge clk); wr_en = 0;
      if (we) chk(arp_valid && arp_tpa == p && arp_tha == h, "write stored");
      else    chk(arp_tpa == p0 && arp_tha == h0, "no write keeps entry");
    end
    rst = 1; @(negedge clk); rst = 0;
    chk(!arp_valid, "reset empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
