// tb_imm_gen: checks the I- and S-format immediates, bit by bit, against the
// field layout of the two formats, including the printed examples
// addi x15,x1,-50 and sw x14,8(x2).
module tb_imm_gen;
  import rv32_pkg::*;

  logic [31:0] inst, imm;
  imm_sel_e    sel;
  int checks = 0, failures = 0;

  imm_gen dut (.inst(inst[31:7]), .imm_sel(sel), .imm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] exp, string what);
    #1;
    checks++;
    if (imm !== exp) begin
      failures++;
      $display("FAIL %s inst=%h sel=%0d imm=%h exp=%h", what, inst, sel, imm, exp);
    end
  endtask

  initial begin
    inst = 32'b111111001110_00001_000_01111_0010011; sel = IMM_I;   // addi x15,x1,-50
    chk(-32'sd50, "addi -50");
    inst = 32'b000000001000_00010_010_01110_0000011; sel = IMM_I;   // lw x14,8(x2)
    chk(32'd8, "lw 8");
    inst = 32'b0000000_01110_00010_010_01000_0100011; sel = IMM_S;  // sw x14,8(x2)
    chk(32'd8, "sw 8");
    for (int n = 0; n < 5000; n++) begin
      logic [31:0] e;
      inst = $urandom;
      sel = imm_sel_e'(n[0]);
      for (int i = 0; i < 32; i++) begin
        if (i >= 12)     e[i] = inst[31];
        else if (i >= 5) e[i] = inst[20 + i];
        else             e[i] = (sel == IMM_I) ? inst[20 + i] : inst[7 + i];
      end
      e[11] = inst[31];
      chk(e, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
