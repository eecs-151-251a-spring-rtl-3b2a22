// tb_rv32_top: end-to-end test of the single-cycle RV32I machine at its
// default sizes.
//
// A random program that fills the whole instruction memory is loaded through
// the load port while reset is held. It mixes every register-register,
// register-immediate, load and store instruction with opcodes the datapath
// does not carry. After reset the machine runs twice through the memory (the
// PC wraps), and at every falling edge the PC, the fetched instruction and all
// 32 registers are compared with the reference model, which then executes the
// same instruction. At the end every data-memory word is compared. The PC
// check also proves the one-instruction-per-cycle rate: it must be
// RESET_PC + 4*n after n cycles. Each mechanism (each operation, BSel and
// WBSel settings, writes to x0, negative immediates, unsupported opcodes) is
// counted and a failure is counted for any that never occurred.
module tb_rv32_top;
  import rv32_ref_pkg::*;

  localparam int unsigned DEPTH = 1024;   // the top's default memory sizes
  localparam int unsigned RUN   = 2 * DEPTH;

  logic        clk = 0;
  logic        rst;
  logic        load_we;
  logic [$clog2(DEPTH)-1:0] load_addr;
  logic [31:0] load_data;
  logic [31:0] pc, inst;
  logic        unsupported;
  logic [31:0] dm_addr, dm_wdata, dm_rdata;
  logic [3:0]  dm_be;
  logic        dm_we;

  int checks = 0, failures = 0;

  rv32_top dut (
    .clk, .rst,
    .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data),
    .pc, .inst, .unsupported,
    .dmem_addr(dm_addr), .dmem_wdata(dm_wdata), .dmem_be(dm_be), .dmem_we(dm_we),
    .dmem_rdata(dm_rdata)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (RUN + DEPTH + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Mechanism counters.
  int n_r[16], n_i[8], n_ld[8], n_st[8];
  int n_sub, n_sra, n_srai, n_x0, n_unsup, n_negimm, n_bsel0, n_bsel1, n_wbmem, n_wbalu;

  logic [31:0] prog [DEPTH];
  rv32_ref ref_m;

  initial begin
    ref_m = new(DEPTH);
    foreach (prog[i]) prog[i] = rand_inst(rand_kind());
    // a few fixed ones so that rare cases surely appear
    prog[0] = enc_i(-50, 1, 0, 15, 7'b0010011);  // addi x15,x1,-50
    prog[1] = enc_r(0, 3, 2, 0, 0);              // add x0,x2,x3
    prog[2] = 32'h0000_0063;                     // beq (not carried)

    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = i[$clog2(DEPTH)-1:0]; load_data = prog[i];
    end
    @(negedge clk);
    load_we = 0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) ref_m.mem[i] = dut.u_dmem.mem[i];
    ref_m.pc = 0;
    rst = 0;
    #1;

    for (int n = 0; n < RUN; n++) begin
      check(pc == ref_m.pc, $sformatf("cycle %0d pc %h exp %h", n, pc, ref_m.pc));
      check(pc == 32'(4 * n), $sformatf("cycle %0d pc %h not 4*n", n, pc));
      check(inst == prog[ref_m.widx(ref_m.pc) % DEPTH], $sformatf("cycle %0d inst", n));
      for (int r = 0; r < 32; r++) begin
        logic [31:0] v;
        v = (r == 0) ? 32'h0 : dut.u_core.u_dp.u_rf.regs[r];
        check(v == ref_m.x[r], $sformatf("cycle %0d x%0d %h exp %h", n, r, v, ref_m.x[r]));
      end
      begin
        logic [6:0] op;
        logic [2:0] f3;
        op = inst[6:0]; f3 = inst[14:12];
        check(unsupported == !(op inside {7'b0110011, 7'b0010011, 7'b0000011, 7'b0100011}),
              "unsupported flag");
        if (op == 7'b0100011 && f3 inside {3'd0, 3'd1, 3'd2}) begin
          check(dm_we && dm_addr == ref_m.x[inst[19:15]] + 32'(sext12({inst[31:25], inst[11:7]})),
                "store address on the bus");
        end else begin
          check(!dm_we && dm_be == 0, "no write strobe outside stores");
        end
        if (op == 7'b0000011)
          check(dm_addr == ref_m.x[inst[19:15]] + 32'(sext12(inst[31:20])) &&
                dm_rdata == ref_m.mem[ref_m.widx(dm_addr)], "load address and read data on the bus");
        case (op)
          7'b0110011: begin
            n_r[{inst[30], f3}]++; n_bsel0++; n_wbalu++;
            if (f3 == 0 && inst[30]) n_sub++;
            if (f3 == 5 && inst[30]) n_sra++;
          end
          7'b0010011: begin
            n_i[f3]++; n_bsel1++; n_wbalu++;
            if (f3 == 5 && inst[30]) n_srai++;
          end
          7'b0000011: begin n_ld[f3]++; n_bsel1++; n_wbmem++; end
          7'b0100011: begin n_st[f3]++; n_bsel1++; end
          default: n_unsup++;
        endcase
        if (op inside {7'b0110011, 7'b0010011, 7'b0000011} && inst[11:7] == 0) n_x0++;
        if (op inside {7'b0010011, 7'b0000011, 7'b0100011} && inst[31]) n_negimm++;
      end
      ref_m.step(inst);
      @(negedge clk);
      #1;
    end
    for (int i = 0; i < DEPTH; i++)
      check(dut.u_dmem.mem[i] == ref_m.mem[i], $sformatf("dmem[%0d]", i));

    // every mechanism must have happened
    foreach (n_i[f]) check(n_i[f] > 0, $sformatf("no OP-IMM funct3=%0d", f));
    for (int f = 0; f < 8; f++) check(n_r[f] > 0, $sformatf("no OP funct3=%0d", f));
    foreach (n_ld[f]) if (f inside {0, 1, 2, 4, 5}) check(n_ld[f] > 0, $sformatf("no load f3=%0d", f));
    foreach (n_st[f]) if (f inside {0, 1, 2}) check(n_st[f] > 0, $sformatf("no store f3=%0d", f));
    check(n_sub > 0, "no SUB");     check(n_sra > 0, "no SRA");  check(n_srai > 0, "no SRAI");
    check(n_x0 > 0, "no x0 write"); check(n_unsup > 0, "no unsupported opcode");
    check(n_negimm > 0, "no negative immediate");
    check(n_bsel0 > 0 && n_bsel1 > 0, "BSel not both ways");
    check(n_wbmem > 0 && n_wbalu > 0, "WBSel not both ways");
    $display("counts: R=%0d/%0d/%0d/%0d/%0d/%0d/%0d/%0d sub=%0d sra=%0d I=%0d/%0d/%0d/%0d/%0d/%0d/%0d/%0d srai=%0d",
             n_r[0], n_r[1], n_r[2], n_r[3], n_r[4], n_r[5], n_r[6], n_r[7], n_sub, n_sra,
             n_i[0], n_i[1], n_i[2], n_i[3], n_i[4], n_i[5], n_i[6], n_i[7], n_srai);
    $display("counts: LB=%0d LH=%0d LW=%0d LBU=%0d LHU=%0d SB=%0d SH=%0d SW=%0d x0=%0d unsup=%0d negimm=%0d",
             n_ld[0], n_ld[1], n_ld[2], n_ld[4], n_ld[5], n_st[0], n_st[1], n_st[2], n_x0, n_unsup, n_negimm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
