// tb_pwm: for random duties counts the high clocks of each 256-clock period
// and checks they equal the duty, including 0 and 255, and that a new duty
// applies from the next period on.
module tb_pwm;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [7:0] duty = 0;
  logic pwm_out;
  int checks = 0, failures = 0;

  pwm #(.W(8)) dut (.*);

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
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 30; t++) begin
      automatic logic [7:0] d = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : (t == 2) ? 8'd1 : 8'($urandom);
      automatic int hi = 0, runs = 0;
      automatic logic prev = 0;
      duty = d;
      // let the current period finish, then measure a whole one
      repeat (256) @(negedge clk);
      for (int c = 0; c < 256; c++) begin
        if (pwm_out) hi++;
        if (pwm_out && !prev) runs++;
        prev = pwm_out;
        @(negedge clk);
      end
      chk(hi == d, $sformatf("duty %0d: %0d high clocks", d, hi));
      chk(runs <= 2, "one pulse per period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
