// tb_datapath: drives the datapath with instructions and with control words
// set here by hand, as the classic single-cycle datapath sets them for add/sub, the
// I-type arithmetic instructions, loads and stores, with the instruction and
// data memories modelled in the testbench. PC, registers and memory are
// compared with the reference model after every cycle.
module tb_datapath;
  import rv32_pkg::*;
  import rv32_ref_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned RUN   = 600;

  logic        clk = 0, rst;
  logic [31:0] ia, inst, da, dw, dr;
  logic [3:0]  be;
  logic        we;
  ctrl_t       c;
  logic [31:0] dm [DEPTH];
  int checks = 0, failures = 0;
  rv32_ref ref_m;

  datapath dut (.clk, .rst, .imem_addr(ia), .inst, .ctrl(c),
                .dmem_addr(da), .dmem_wdata(dw), .dmem_be(be), .dmem_we(we),
                .dmem_rdata(dr));

  assign dr = dm[(da >> 2) % DEPTH];
  always_ff @(posedge clk)
    if (we) for (int k = 0; k < 4; k++) if (be[k]) dm[(da >> 2) % DEPTH][8*k +: 8] <= dw[8*k +: 8];

  always #5 clk = ~clk;

  initial begin
    repeat (RUN + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The control settings, one instruction class at a time.
  function automatic ctrl_t settings(logic [31:0] i);
    ctrl_t s;
    alu_sel_e ops [8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    s = '{imm_sel: IMM_I, reg_wen: 0, b_sel: 0, alu_sel: ALU_ADD, mem_rw: MEM_READ,
          wb_sel: WB_ALU, mem_funct3: i[14:12], unsupported: 0};
    case (i[6:0])
      7'b0110011: begin
        s.reg_wen = 1; s.alu_sel = ops[i[14:12]];
        if (i[30] && i[14:12] == 0) s.alu_sel = ALU_SUB;
        if (i[30] && i[14:12] == 5) s.alu_sel = ALU_SRA;
      end
      7'b0010011: begin
        s.reg_wen = 1; s.b_sel = 1; s.alu_sel = ops[i[14:12]];
        if (i[30] && i[14:12] == 5) s.alu_sel = ALU_SRA;
      end
      7'b0000011: begin s.reg_wen = 1; s.b_sel = 1; s.wb_sel = WB_MEM; end
      7'b0100011: begin s.b_sel = 1; s.imm_sel = IMM_S; s.mem_rw = MEM_WRITE; end
      default: s.unsupported = 1;
    endcase
    return s;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    ref_m = new(DEPTH);
    foreach (dm[i]) begin dm[i] = $urandom; ref_m.mem[i] = dm[i]; end
    inst = 32'h0000_0013; c = settings(inst);
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int n = 0; n < RUN; n++) begin
      kind_e k;
      k = rand_kind();
      if (k == K_OTHER) k = K_REG;
      inst = rand_inst(k);
      c = settings(inst);
      #1;
      chk(ia == ref_m.pc, $sformatf("cycle %0d pc", n));
      for (int r = 1; r < 32; r++)
        chk(dut.u_rf.regs[r] == ref_m.x[r], $sformatf("cycle %0d x%0d", n, r));
      ref_m.step(inst);
      @(negedge clk);
    end
    #1;
    for (int r = 1; r < 32; r++) chk(dut.u_rf.regs[r] == ref_m.x[r], "final regs");
    foreach (dm[i]) chk(dm[i] == ref_m.mem[i], $sformatf("dmem[%0d]", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
