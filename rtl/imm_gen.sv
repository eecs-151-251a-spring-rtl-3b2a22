// imm_gen: immediate generator for the I and S instruction formats.
//
// Both formats keep imm[11] in inst[31] and imm[10:5] in inst[30:25]; only
// the low five bits move: inst[24:20] for I-type, inst[11:7] for S-type.
// So the block is one 5-bit 2:1 multiplexer plus fixed wiring, and inst[31]
// is copied into imm[31:11] for sign extension. Purely combinational.
module imm_gen
  import rv32_pkg::*;
(
  input  logic [31:7] inst,
  input  imm_sel_e    imm_sel,
  output logic [31:0] imm
);

  logic [4:0] low5;

  always_comb begin
    unique case (imm_sel)
      IMM_I:   low5 = inst[24:20];
      IMM_S:   low5 = inst[11:7];
      default: low5 = inst[24:20];
    endcase
  end

  assign imm = {{21{inst[31]}}, inst[30:25], low5};

endmodule
