// tb_pc_reg: the PC must load RESET_PC on reset and then advance by exactly
// four bytes every clock cycle, one instruction per cycle; PC+4 must follow
// the PC combinationally.
module tb_pc_reg;
  localparam logic [31:0] RST_PC = 32'h0000_1000;
  logic        clk = 0, rst;
  logic [31:0] pc, pc4;
  int checks = 0, failures = 0;

  pc_reg #(.XLEN(32), .RESET_PC(RST_PC)) dut (.clk, .rst, .pc_q(pc), .pc_plus4(pc4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1;
    @(negedge clk); @(negedge clk);
    checks++; if (pc != RST_PC) failures++;
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      checks++;
      if (pc != RST_PC + 32'(4 * n) || pc4 != pc + 4) begin
        failures++;
        $display("FAIL cycle %0d pc=%h", n, pc);
      end
      @(negedge clk);
      if (n == 500) begin
        rst = 1; @(negedge clk); rst = 0;
        checks++; if (pc != RST_PC) failures++;
        break;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
