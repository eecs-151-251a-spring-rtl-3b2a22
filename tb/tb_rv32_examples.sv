// tb_rv32_examples: runs the classic single-cycle examples on the whole
// machine, using their exact machine encodings:
//   add x1,x2,x3 at PC 1000 and add x6,x7,x9 at PC 1004 (register x1 must
//   change only at the rising edge that ends the first add),
//   addi x15,x1,-50   = 111111001110 00001 000 01111 0010011,
//   sw x14,8(x2)      = 0000000 01110 00010 010 01000 0100011,
//   lw x14,8(x2)      = 000000001000 00010 010 01110 0000011.
// A few ADDIs in front set up the source registers, and the reset PC is put
// so that the first add sits at address 1000.
module tb_rv32_examples;
  import rv32_ref_pkg::*;

  localparam logic [31:0] START = 32'd1000 - 32'd20;   // five set-up instructions
  logic        clk = 0, rst, we;
  logic [9:0]  la;
  logic [31:0] ld, pc, inst, da, dw, dr;
  logic [3:0]  be;
  logic        dwe, unsup;
  int checks = 0, failures = 0;

  rv32_top #(.RESET_PC(START)) dut (
    .clk, .rst, .imem_load_we(we), .imem_load_addr(la), .imem_load_data(ld),
    .pc, .inst, .unsupported(unsup),
    .dmem_addr(da), .dmem_wdata(dw), .dmem_be(be), .dmem_we(dwe), .dmem_rdata(dr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] x(int r);
    return (r == 0) ? 32'h0 : dut.u_core.u_dp.u_rf.regs[r];
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] prog [$];

  initial begin
    prog = '{
      enc_i(100, 0, 0, 2, 7'b0010011),     // addi x2,x0,100
      enc_i(23,  0, 0, 3, 7'b0010011),     // addi x3,x0,23
      enc_i(-7,  0, 0, 7, 7'b0010011),     // addi x7,x0,-7
      enc_i(5,   0, 0, 9, 7'b0010011),     // addi x9,x0,5
      enc_i(12'hda5, 0, 0, 14, 7'b0010011),// addi x14,x0,-603 (0xfffffda5)
      32'b0000000_00011_00010_000_00001_0110011,  // add x1,x2,x3   @1000
      32'b0000000_01001_00111_000_00110_0110011,  // add x6,x7,x9   @1004
      32'b111111001110_00001_000_01111_0010011,   // addi x15,x1,-50
      32'b0000000_01110_00010_010_01000_0100011,  // sw x14,8(x2)
      enc_i(0, 0, 0, 14, 7'b0010011),             // addi x14,x0,0
      32'b000000001000_00010_010_01110_0000011    // lw x14,8(x2)
    };
    rst = 1; we = 0; la = 0; ld = 0;
    foreach (prog[i]) begin
      @(negedge clk);
      we = 1; la = 10'((START >> 2) + i); ld = prog[i];
    end
    @(negedge clk); we = 0;
    rst = 0;
    repeat (5) @(negedge clk);
    // cycle of the first add
    chk(pc == 32'd1000 && inst == prog[5], "add x1,x2,x3 at PC 1000");
    chk(x(1) == 0, "x1 not yet written before the edge");
    chk(dut.u_core.u_dp.alu_y == 32'd123, "alu = Reg[2]+Reg[3] within the cycle");
    @(negedge clk);
    chk(pc == 32'd1004 && inst == prog[6], "add x6,x7,x9 at PC 1004");
    chk(x(1) == 32'd123, "x1 = Reg[2]+Reg[3] after the edge");
    @(negedge clk);
    chk(x(6) == 32'hffff_fffe, "x6 = Reg[7]+Reg[9]");
    @(negedge clk);
    chk(x(15) == 32'd73, "addi x15,x1,-50");
    chk(dwe && be == 4'hf && da == 32'd108 && dw == 32'hffff_fda5, "sw drives address 108 and data");
    @(negedge clk);
    chk(dut.u_dmem.mem[27] == 32'hffff_fda5, "DMEM[108] written");
    @(negedge clk);
    chk(!dwe && da == 32'd108 && dr == 32'hffff_fda5, "lw reads DMEM[108]");
    @(negedge clk);
    chk(x(14) == 32'hffff_fda5, "lw x14,8(x2)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
