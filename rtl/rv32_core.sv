// rv32_core: the processor, i.e. the datapath and its controller, with the
// instruction and data memories kept outside it.
//
// The controller decodes the instruction coming back from instruction memory
// and drives the datapath's select and enable lines in the same cycle. The
// core fetches from imem_addr and expects the instruction on imem_rdata in
// the same cycle; data memory is read combinationally at dmem_addr and
// written on the next rising edge where dmem_we is high, byte lanes chosen by
// dmem_be. `unsupported` is high while the current instruction is one the
// datapath does not carry (it is then executed as a no-op).
module rv32_core
  import rv32_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,
  output logic        dmem_we,
  input  logic [31:0] dmem_rdata,
  output logic        unsupported
);

  ctrl_t ctrl;

  controller u_ctrl (.inst(imem_rdata), .ctrl);

  datapath #(.RESET_PC(RESET_PC)) u_dp (
    .clk, .rst,
    .imem_addr, .inst(imem_rdata),
    .ctrl,
    .dmem_addr, .dmem_wdata, .dmem_be, .dmem_we, .dmem_rdata
  );

  assign unsupported = ctrl.unsupported;

endmodule
