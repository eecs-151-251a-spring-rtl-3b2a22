// tb_regfile: random writes and reads against a model array. Checks that
// reset clears every register, that reads are combinational (new address,
// data in the same cycle), that a write is seen only after the clock edge,
// that x0 stays zero whatever is written to it and that RegWEn=0 writes
// nothing.
module tb_regfile;
  logic        clk = 0, rst, wen;
  logic [4:0]  aa, ab, ad;
  logic [31:0] da, db, dd;
  logic [31:0] m [32];
  int checks = 0, failures = 0, x0_writes = 0, masked = 0;

  regfile dut (.clk, .rst, .addr_a(aa), .data_a(da), .addr_b(ab), .data_b(db),
               .wen, .addr_d(ad), .data_d(dd));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    rst = 1; wen = 0; aa = 0; ab = 0; ad = 0; dd = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    foreach (m[i]) m[i] = 0;
    for (int i = 0; i < 32; i++) begin
      aa = 5'(i); ab = 5'(31 - i); #1;
      chk(da == 0 && db == 0, "reset clears");
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      wen = ($urandom_range(0, 3) != 0);
      ad = (n % 17 == 0) ? 5'd0 : 5'($urandom);
      dd = $urandom;
      aa = 5'($urandom); ab = (n % 5 == 0) ? ad : 5'($urandom);
      #1;
      chk(da == m[aa] && db == m[ab], $sformatf("read before edge n=%0d", n));
      if (wen && ad == 0) x0_writes++;
      if (!wen) masked++;
      @(posedge clk);
      if (wen && ad != 0) m[ad] = dd;
      #1;
      chk(da == m[aa] && db == m[ab], $sformatf("read after edge n=%0d", n));
    end
    chk(x0_writes > 0 && masked > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
