// rv32_top: the complete one-instruction-per-cycle RV32I machine, the core
// (datapath plus controller) joined to a separate instruction memory and data
// memory.
//
// Hold rst high while loading a program through the load port (one word per
// cycle, word index in imem_load_addr), then release it: the PC starts at
// RESET_PC and every cycle one instruction is fetched, executed and retired,
// its register and memory results written on the next rising edge. pc and
// inst show the instruction of the current cycle, unsupported flags an
// instruction the datapath does not carry (run as a no-op). The data-memory
// bus between core and memory (address, write data, byte enables, write
// strobe, read data) is brought out as well, so that the machine's results
// can be watched from outside.
module rv32_top #(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           imem_load_we,
  input  logic [IAW-1:0] imem_load_addr,
  input  logic [31:0]    imem_load_data,
  output logic [31:0]    pc,
  output logic [31:0]    inst,
  output logic           unsupported,
  output logic [31:0]    dmem_addr,
  output logic [31:0]    dmem_wdata,
  output logic [3:0]     dmem_be,
  output logic           dmem_we,
  output logic [31:0]    dmem_rdata
);

  rv32_core #(.RESET_PC(RESET_PC)) u_core (
    .clk, .rst,
    .imem_addr(pc), .imem_rdata(inst),
    .dmem_addr, .dmem_wdata, .dmem_be, .dmem_we, .dmem_rdata,
    .unsupported
  );

  imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .addr(pc), .rdata(inst),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data)
  );

  dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .addr(dmem_addr), .rdata(dmem_rdata),
    .we(dmem_we), .be(dmem_be), .wdata(dmem_wdata)
  );

endmodule
