// regfile: the RV32I integer register file Reg[0..31], 32 registers of 32 bits.
//
// Two read ports (AddrA/DataA for rs1, AddrB/DataB for rs2) are asynchronous:
// the data follows the address combinationally, within the same cycle. The
// one write port (AddrD/DataD, enabled by RegWEn) is written on the rising
// clock edge. Register x0 always reads as zero and writes to it are dropped.
// A write and a read of the same register in one cycle return the old value;
// the new one is visible from the next cycle, as a single-cycle machine needs.
//
// Clearing every register on reset is this design's choice; it makes the
// state after reset known.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [AW-1:0]   addr_a,
  output logic [XLEN-1:0] data_a,
  input  logic [AW-1:0]   addr_b,
  output logic [XLEN-1:0] data_b,
  input  logic            wen,
  input  logic [AW-1:0]   addr_d,
  input  logic [XLEN-1:0] data_d
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wen && addr_d != '0) begin
      regs[addr_d] <= data_d;
    end
  end

  assign data_a = (addr_a == '0) ? '0 : regs[addr_a];
  assign data_b = (addr_b == '0) ? '0 : regs[addr_b];

endmodule
