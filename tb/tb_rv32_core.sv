// tb_rv32_core: runs a random program on the processor (datapath plus
// controller) with instruction and data memories modelled here, and compares
// PC, registers and every data-memory bus transaction with the reference
// model, cycle by cycle. Memory sizes are reduced to keep the run short.
module tb_rv32_core;
  import rv32_ref_pkg::*;

  localparam int unsigned DEPTH = 128;
  localparam int unsigned RUN   = 3 * DEPTH;

  logic        clk = 0, rst;
  logic [31:0] ia, id, da, dw, dr;
  logic [3:0]  be;
  logic        we, unsup;
  logic [31:0] prog [DEPTH];
  logic [31:0] dm [DEPTH];
  int checks = 0, failures = 0, n_st = 0, n_ld = 0, n_un = 0;
  rv32_ref ref_m;

  rv32_core dut (.clk, .rst, .imem_addr(ia), .imem_rdata(id),
                 .dmem_addr(da), .dmem_wdata(dw), .dmem_be(be), .dmem_we(we),
                 .dmem_rdata(dr), .unsupported(unsup));

  assign id = prog[(ia >> 2) % DEPTH];
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

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    ref_m = new(DEPTH);
    foreach (prog[i]) prog[i] = rand_inst(rand_kind());
    foreach (dm[i]) begin dm[i] = $urandom; ref_m.mem[i] = dm[i]; end
    rst = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    #1;
    for (int n = 0; n < RUN; n++) begin
      logic [31:0] inst;
      inst = id;
      chk(ia == ref_m.pc, $sformatf("cycle %0d pc", n));
      for (int r = 1; r < 32; r++)
        chk(dut.u_dp.u_rf.regs[r] == ref_m.x[r], $sformatf("cycle %0d x%0d", n, r));
      if (inst[6:0] == 7'b0100011) begin
        n_st++;
        chk(we && be != 0, "store drives the write strobe");
        chk(da == ref_m.x[inst[19:15]] + 32'(sext12({inst[31:25], inst[11:7]})), "store address");
      end else begin
        chk(!we && be == 0, "no write outside stores");
      end
      if (inst[6:0] == 7'b0000011) begin
        n_ld++;
        chk(da == ref_m.x[inst[19:15]] + 32'(sext12(inst[31:20])), "load address");
      end
      if (unsup) n_un++;
      ref_m.step(inst);
      @(negedge clk);
      #1;
    end
    foreach (dm[i]) chk(dm[i] == ref_m.mem[i], $sformatf("dmem[%0d]", i));
    chk(n_st > 0 && n_ld > 0 && n_un > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
