// rv32_pkg: types and constants shared by the single-cycle RV32I datapath,
// its controller and their testbenches.
//
// The opcode and funct3/funct7 values are the RV32I base encodings. The
// control-signal names (ImmSel, RegWEn, BSel, ALUSel, MemRW, WBSel) and the
// encodings of the classic single-cycle datapath are kept: ALUSel Add=0 / Sub=1,
// BSel 0 = rs2 / 1 = immediate, WBSel 0 = memory / 1 = ALU. The remaining
// ALUSel codes and the ImmSel and MemRW codes are this design's own choice.
package rv32_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;

  // Major opcodes, inst[6:0].
  typedef enum logic [6:0] {
    OP_LUI    = 7'b0110111,
    OP_AUIPC  = 7'b0010111,
    OP_JAL    = 7'b1101111,
    OP_JALR   = 7'b1100111,
    OP_BRANCH = 7'b1100011,
    OP_LOAD   = 7'b0000011,
    OP_STORE  = 7'b0100011,
    OP_IMM    = 7'b0010011,
    OP_REG    = 7'b0110011,
    OP_FENCE  = 7'b0001111,
    OP_SYSTEM = 7'b1110011
  } opcode_e;

  // funct3 of the arithmetic group (OP and OP-IMM).
  localparam logic [2:0] F3_ADD  = 3'b000;
  localparam logic [2:0] F3_SLL  = 3'b001;
  localparam logic [2:0] F3_SLT  = 3'b010;
  localparam logic [2:0] F3_SLTU = 3'b011;
  localparam logic [2:0] F3_XOR  = 3'b100;
  localparam logic [2:0] F3_SR   = 3'b101;
  localparam logic [2:0] F3_OR   = 3'b110;
  localparam logic [2:0] F3_AND  = 3'b111;

  // funct3 of loads and stores: access size and signedness.
  localparam logic [2:0] F3_B  = 3'b000;
  localparam logic [2:0] F3_H  = 3'b001;
  localparam logic [2:0] F3_W  = 3'b010;
  localparam logic [2:0] F3_BU = 3'b100;
  localparam logic [2:0] F3_HU = 3'b101;

  // ALU function select.
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_SLL  = 4'd2,
    ALU_SLT  = 4'd3,
    ALU_SLTU = 4'd4,
    ALU_XOR  = 4'd5,
    ALU_SRL  = 4'd6,
    ALU_SRA  = 4'd7,
    ALU_OR   = 4'd8,
    ALU_AND  = 4'd9
  } alu_sel_e;

  // Immediate format select: the I and S layouts only.
  typedef enum logic {
    IMM_I = 1'b0,
    IMM_S = 1'b1
  } imm_sel_e;

  typedef enum logic {
    MEM_READ  = 1'b0,
    MEM_WRITE = 1'b1
  } mem_rw_e;

  typedef enum logic {
    WB_MEM = 1'b0,
    WB_ALU = 1'b1
  } wb_sel_e;

  // One instruction's worth of control signals.
  typedef struct packed {
    imm_sel_e   imm_sel;
    logic       reg_wen;      // RegWEn: 1 = write rd
    logic       b_sel;        // BSel: 0 = Reg[rs2], 1 = imm
    alu_sel_e   alu_sel;
    mem_rw_e    mem_rw;
    wb_sel_e    wb_sel;
    logic [2:0] mem_funct3;   // size/sign of a load or store
    logic       unsupported;  // opcode outside this datapath: executed as a no-op
  } ctrl_t;

endpackage
