// datapath: the single-cycle RV32I datapath for register-register,
// register-immediate, load and store instructions.
//
// Left to right: the PC addresses instruction memory; inst[19:15] and
// inst[24:20] read Reg[rs1] and Reg[rs2]; the immediate generator builds the
// I or S immediate; the BSel multiplexer feeds either Reg[rs2] (0) or the
// immediate (1) to the ALU's second input; the ALU result is the data-memory
// address; Reg[rs2] is the store data; the WBSel multiplexer returns either
// the loaded value (0) or the ALU result (1) to the register file at
// inst[11:7]. The PC always advances by four.
//
// Timing: every state element (PC, register file, data memory) is written on
// the rising clock edge and read combinationally, so one instruction runs
// from edge to edge. The load path goes through load_ext (byte/halfword
// extraction and sign/zero extension, which the narrower loads need) and the
// store path through store_align (byte lanes and byte enables, this design's
// way of carrying SB and SH next to SW).
module datapath
  import rv32_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  // instruction fetch
  output logic [31:0] imem_addr,
  input  logic [31:0] inst,
  // control from the controller
  input  ctrl_t       ctrl,
  // data memory
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata
);

  logic [31:0] pc, pc_plus4;
  logic [31:0] rs1_data, rs2_data, imm, alu_b, alu_y, load_data, wb;
  logic [3:0]  be;

  pc_reg #(.XLEN(32), .RESET_PC(RESET_PC)) u_pc (
    .clk, .rst, .pc_q(pc), .pc_plus4
  );

  assign imem_addr = pc;

  regfile #(.NREGS(32), .XLEN(32)) u_rf (
    .clk, .rst,
    .addr_a(inst[19:15]), .data_a(rs1_data),
    .addr_b(inst[24:20]), .data_b(rs2_data),
    .wen(ctrl.reg_wen), .addr_d(inst[11:7]), .data_d(wb)
  );

  imm_gen u_imm (.inst(inst[31:7]), .imm_sel(ctrl.imm_sel), .imm);

  assign alu_b = ctrl.b_sel ? imm : rs2_data;

  alu u_alu (.a(rs1_data), .b(alu_b), .alu_sel(ctrl.alu_sel), .y(alu_y));

  assign dmem_addr = alu_y;

  store_align u_st (
    .funct3(ctrl.mem_funct3), .byte_off(alu_y[1:0]), .data(rs2_data),
    .wdata(dmem_wdata), .byte_en(be)
  );

  assign dmem_we = (ctrl.mem_rw == MEM_WRITE);
  assign dmem_be = dmem_we ? be : 4'b0000;

  load_ext u_ld (
    .funct3(ctrl.mem_funct3), .byte_off(alu_y[1:0]), .word(dmem_rdata),
    .data(load_data)
  );

  assign wb = (ctrl.wb_sel == WB_ALU) ? alu_y : load_data;

endmodule
