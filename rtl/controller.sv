// controller: the control logic of the single-cycle datapath. It decodes the
// fetched instruction into ImmSel, RegWEn, BSel, ALUSel, MemRW and WBSel.
//
//   R-type (OP)      RegWEn=1 BSel=0 ALUSel from funct3/funct7 WBSel=ALU
//   I-type (OP-IMM)  RegWEn=1 BSel=1 ImmSel=I ALUSel from funct3 (and
//                    inst[30] for SRAI) WBSel=ALU
//   loads            RegWEn=1 BSel=1 ImmSel=I ALUSel=Add MemRW=Read WBSel=Mem
//   stores           RegWEn=0 BSel=1 ImmSel=S ALUSel=Add MemRW=Write
//
// inst[30] chooses between ADD and SUB and between SRL and SRA. These settings
// follow the classic single-cycle datapath. Every other opcode (branches, jumps, LUI,
// AUIPC, FENCE, SYSTEM) has no path in this datapath: it writes nothing,
// raises `unsupported` and the machine simply moves on to PC+4. Treating
// them as no-ops is this design's choice. Purely combinational.
module controller
  import rv32_pkg::*;
(
  input  logic [31:0] inst,
  output ctrl_t       ctrl
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic       alt;       // inst[30]

  assign opcode = inst[6:0];
  assign funct3 = inst[14:12];
  assign alt    = inst[30];

  function automatic alu_sel_e arith_sel(logic [2:0] f3, logic sub_sra, logic is_reg);
    unique case (f3)
      F3_ADD:  return (is_reg && sub_sra) ? ALU_SUB : ALU_ADD;
      F3_SLL:  return ALU_SLL;
      F3_SLT:  return ALU_SLT;
      F3_SLTU: return ALU_SLTU;
      F3_XOR:  return ALU_XOR;
      F3_SR:   return sub_sra ? ALU_SRA : ALU_SRL;
      F3_OR:   return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    ctrl             = '0;
    ctrl.imm_sel     = IMM_I;
    ctrl.alu_sel     = ALU_ADD;
    ctrl.mem_rw      = MEM_READ;
    ctrl.wb_sel      = WB_ALU;
    ctrl.mem_funct3  = funct3;
    unique case (opcode)
      OP_REG: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b0;
        ctrl.alu_sel = arith_sel(funct3, alt, 1'b1);
      end
      OP_IMM: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.imm_sel = IMM_I;
        ctrl.alu_sel = arith_sel(funct3, alt, 1'b0);
      end
      OP_LOAD: begin
        ctrl.reg_wen = 1'b1;
        ctrl.b_sel   = 1'b1;
        ctrl.imm_sel = IMM_I;
        ctrl.wb_sel  = WB_MEM;
      end
      OP_STORE: begin
        ctrl.b_sel   = 1'b1;
        ctrl.imm_sel = IMM_S;
        ctrl.mem_rw  = MEM_WRITE;
      end
      default: begin
        ctrl.unsupported = 1'b1;
      end
    endcase
  end

endmodule
