// tb_spi: sends random words through two SPI masters (HALF = 2 and 3),
// decodes mosi on the rising sclk edges while cs_n is low, and checks the
// word, MSB first, the sclk period and the start-to-done time 2*W*HALF + 1.
module tb_spi;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic start = 0;
  logic [15:0] data = 0;
  logic busy2, done2, sclk2, cs2, mosi2, busy3, done3, sclk3, cs3, mosi3;
  spi #(.W(16), .HALF(2)) dut2 (.clk, .rst, .start, .data, .busy(busy2), .done(done2), .sclk(sclk2), .cs_n(cs2), .mosi(mosi2));
  spi #(.W(16), .HALF(3)) dut3 (.clk, .rst, .start, .data, .busy(busy3), .done(done3), .sclk(sclk3), .cs_n(cs3), .mosi(mosi3));

  // receivers: shift in on rising sclk while selected
  logic [15:0] rx2, rx3;
  int n2, n3, cyc = 0, t_start, t_done2, t_done3, rise2_last, per2;
  logic ps2 = 0, ps3 = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (!cs2 && sclk2 && !ps2) begin rx2 = {rx2[14:0], mosi2}; n2++; per2 = cyc - rise2_last; rise2_last = cyc; end
    if (!cs3 && sclk3 && !ps3) begin rx3 = {rx3[14:0], mosi3}; n3++; end
    if (done2) t_done2 = cyc;
    if (done3) t_done3 = cyc;
    ps2 = sclk2; ps3 = sclk3;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    chk(cs2 && cs3 && !sclk2, "idle lines");
    for (int t = 0; t < 20; t++) begin
      automatic logic [15:0] v = (t == 0) ? 16'h8001 : 16'($urandom);
      n2 = 0; n3 = 0;
      data = v; start = 1; t_start = cyc;
      @(negedge clk); start = 0; data = ~v;
      chk(busy2 && busy3 && !cs2 && !cs3, "selected after start");
      wait (!busy3);
      repeat (2) @(negedge clk);
      chk(n2 == 16 && rx2 == v, $sformatf("HALF=2 word %h vs %h", rx2, v));
      chk(n3 == 16 && rx3 == v, $sformatf("HALF=3 word %h vs %h", rx3, v));
      chk(t_done2 - t_start == 65, $sformatf("HALF=2 time %0d", t_done2 - t_start));
      chk(t_done3 - t_start == 97, $sformatf("HALF=3 time %0d", t_done3 - t_start));
      chk(per2 == 4, "sclk period 2*HALF");
      chk(cs2 && cs3 && !sclk2 && !sclk3, "deselected after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
