// tb_imem: fills the instruction memory through its load port, then reads
// every word back by byte address, with the low two address bits and the
// address bits above the memory's size set at random (they are ignored).
module tb_imem;
  localparam int unsigned DEPTH = 256;
  logic        clk = 0, we;
  logic [7:0]  la;
  logic [31:0] ld, addr, rd;
  logic [31:0] m [DEPTH];
  int checks = 0, failures = 0;

  imem #(.DEPTH(DEPTH)) dut (.clk, .addr, .rdata(rd), .load_we(we), .load_addr(la), .load_data(ld));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; la = 0; ld = 0; addr = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      m[i] = $urandom; we = 1; la = 8'(i); ld = m[i];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      int i;
      i = $urandom_range(0, DEPTH - 1);
      addr = {22'($urandom), 8'(i), 2'($urandom)};
      #1;
      checks++;
      if (rd != m[i]) begin failures++; $display("FAIL word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
