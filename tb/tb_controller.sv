// tb_controller: decodes random instructions of every class and compares the
// control word with the classic single-cycle datapath settings, written out here
// as a table: R-type, I-type arithmetic, loads, stores and the opcodes that
// the datapath does not carry.
module tb_controller;
  import rv32_pkg::*;
  logic [31:0] inst;
  ctrl_t       c;
  int checks = 0, failures = 0;

  controller dut (.inst, .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ALU function named by {inst[30], funct3} for R-type.
  function automatic alu_sel_e r_alu(logic [3:0] k);
    case (k)
      4'b0000: return ALU_ADD;  4'b1000: return ALU_SUB;
      4'b0001: return ALU_SLL;  4'b0010: return ALU_SLT;
      4'b0011: return ALU_SLTU; 4'b0100: return ALU_XOR;
      4'b0101: return ALU_SRL;  4'b1101: return ALU_SRA;
      4'b0110: return ALU_OR;   4'b0111: return ALU_AND;
      default: return ALU_ADD;
    endcase
  endfunction

  task automatic chk(ctrl_t e, string what);
    #1;
    checks++;
    if (c !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s inst=%h got=%h exp=%h", what, inst, c, e);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      ctrl_t e;
      logic [2:0] f3;
      inst = $urandom;
      f3 = inst[14:12];
      e = '{imm_sel: IMM_I, reg_wen: 0, b_sel: 0, alu_sel: ALU_ADD, mem_rw: MEM_READ,
            wb_sel: WB_ALU, mem_funct3: f3, unsupported: 1};
      case (n % 5)
        0: begin   // R-type, legal funct7 only
          inst[6:0] = 7'b0110011;
          inst[31:25] = (f3 == 0 || f3 == 5) && inst[30] ? 7'b0100000 : 7'b0;
          e.reg_wen = 1; e.b_sel = 0; e.unsupported = 0;
          e.alu_sel = r_alu({inst[30], f3});
        end
        1: begin   // I-type arithmetic
          inst[6:0] = 7'b0010011;
          if (f3 == 1) inst[31:25] = 0;
          if (f3 == 5) inst[31:25] = inst[30] ? 7'b0100000 : 7'b0;
          e.reg_wen = 1; e.b_sel = 1; e.imm_sel = IMM_I; e.unsupported = 0;
          e.alu_sel = (f3 == 0) ? ALU_ADD : r_alu({f3 == 5 && inst[30], f3});
        end
        2: begin   // loads
          inst[6:0] = 7'b0000011;
          e.reg_wen = 1; e.b_sel = 1; e.imm_sel = IMM_I; e.alu_sel = ALU_ADD;
          e.mem_rw = MEM_READ; e.wb_sel = WB_MEM; e.unsupported = 0;
        end
        3: begin   // stores
          inst[6:0] = 7'b0100011;
          e.reg_wen = 0; e.b_sel = 1; e.imm_sel = IMM_S; e.alu_sel = ALU_ADD;
          e.mem_rw = MEM_WRITE; e.unsupported = 0;
        end
        default: begin
          logic [6:0] ops [7] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111,
                                  7'b1100011, 7'b0001111, 7'b1110011};
          inst[6:0] = ops[n % 7];
        end
      endcase
      // don't-care fields in the expected word follow the RTL's defaults
      chk(e, "decode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
