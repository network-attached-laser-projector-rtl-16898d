// tb_bram_bank: writes random words, reads them back one clock later through
// the registered port, and checks read-during-write returns the old word.
module tb_bram_bank;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = !clk;
  logic we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] model [DEPTH];
  int checks = 0, failures = 0;

  bram_bank #(.DEPTH(DEPTH), .W(64)) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 6'(i); wdata = {32'($urandom), 32'($urandom)}; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 300; t++) begin
      automatic logic [5:0] a = 6'($urandom);
      automatic bit w = $urandom_range(0, 1);
      automatic logic [63:0] old = model[a];
      raddr = a; we = w; waddr = a; wdata = {32'($urandom), 32'($urandom)};
      @(negedge clk);
      chk(rdata == old, $sformatf("read %0d", a));
      if (w) model[a] = wdata;
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
