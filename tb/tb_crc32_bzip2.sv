// tb_crc32_bzip2: checks the FCS engine against a byte-wise reflected CRC-32.
// For random messages fed in RMII dibit order it checks the complemented
// register against the bit-reversed reference, the dostep output against the
// FCS bits in wire order, and the residue after message plus FCS.
module tb_crc32_bzip2;
  import tb_eth_pkg::*;
  logic clk = 0;
  always #5 clk = !clk;
  logic doinit = 0, dosample = 0, dostep = 0;
  logic [1:0] din = 0;
  logic [31:0] crc;
  logic [1:0] crc_step;
  int checks = 0, failures = 0;

  crc32_bzip2 dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] rev32(logic [31:0] v);
    automatic logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = v[31-i];
    return r;
  endfunction

  task automatic feed(bytes_t d);
    foreach (d[i])
      for (int k = 0; k < 4; k++) begin
        dosample = 1; din = d[i][2*k +: 2];
        @(posedge clk); #1;
      end
    dosample = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      automatic bytes_t m, f;
      automatic logic [31:0] ref_c;
      automatic int n = (t == 0) ? 9 : 1 + $urandom_range(0, 80);
      if (t == 0) m = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
      else for (int i = 0; i < n; i++) m.push_back(8'($urandom));
      ref_c = crc32_ieee(m);
      if (t == 0) chk(ref_c == 32'hCBF4_3926, "reference check value");
      @(negedge clk); doinit = 1; @(posedge clk); #1; doinit = 0;
      chk(crc == 32'hFFFF_FFFF, "preset");
      feed(m);
      chk(~crc == rev32(ref_c), $sformatf("crc of message %0d", t));
      if (t % 2 == 0) begin
        // shift the FCS out and compare with the wire-order bits
        for (int k = 0; k < 16; k++) begin
          chk(crc_step == {ref_c[2*k+1], ref_c[2*k]}, $sformatf("fcs dibit %0d", k));
          dostep = 1; @(posedge clk); #1;
        end
        dostep = 0;
      end else begin
        f = m;
        for (int i = 0; i < 4; i++) f.push_back(ref_c[8*i +: 8]);
        doinit = 1; @(posedge clk); #1; doinit = 0;
        feed(f);
        chk(crc == 32'hC704_DD7B, "residue");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
