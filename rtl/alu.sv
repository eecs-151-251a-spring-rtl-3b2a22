// alu: the 32-bit arithmetic/logic unit of the RV32I datapath.
//
// It computes the ten base integer functions (add, sub, shifts, set-less-than
// signed and unsigned, xor, or, and) on operand a (Reg[rs1]) and operand b
// (Reg[rs2] or the immediate). Shift amounts are b[4:0]. The same unit serves
// register-register and register-immediate instructions and forms the
// effective address of loads and stores with ALU_ADD. Purely combinational.
module alu
  import rv32_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_e    alu_sel,
  output logic [31:0] y
);

  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (alu_sel)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_SLL:  y = a << shamt;
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_XOR:  y = a ^ b;
      ALU_SRL:  y = a >> shamt;
      ALU_SRA:  y = $unsigned($signed(a) >>> shamt);
      ALU_OR:   y = a | b;
      ALU_AND:  y = a & b;
      default:  y = a + b;
    endcase
  end

endmodule
