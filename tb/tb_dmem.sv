// tb_dmem: random byte-enabled writes and reads against a model. The read
// data must follow the address in the same cycle, a write must appear only
// after the clock edge and touch only the enabled byte lanes, and we=0 must
// write nothing.
module tb_dmem;
  localparam int unsigned DEPTH = 64;
  logic        clk = 0, we;
  logic [3:0]  be;
  logic [31:0] addr, wd, rd;
  logic [31:0] m [DEPTH];
  int checks = 0, failures = 0;

  dmem #(.DEPTH(DEPTH)) dut (.clk, .addr, .rdata(rd), .we, .be, .wdata(wd));

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
    we = 0; be = 0; wd = 0; addr = 0;
    // start from known contents
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      m[i] = $urandom; we = 1; be = 4'hf; addr = 32'(i * 4); wd = m[i];
    end
    for (int n = 0; n < 5000; n++) begin
      int i;
      @(negedge clk);
      i = $urandom_range(0, DEPTH - 1);
      we = ($urandom_range(0, 2) != 0); be = 4'($urandom); wd = $urandom;
      addr = {24'($urandom), 6'(i), 2'($urandom)};
      #1;
      chk(rd == m[i], $sformatf("read before edge %0d", n));
      @(posedge clk);
      if (we) for (int k = 0; k < 4; k++) if (be[k]) m[i][8*k +: 8] = wd[8*k +: 8];
      #1;
      chk(rd == m[i], $sformatf("read after edge %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
