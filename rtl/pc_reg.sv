// pc_reg: the program counter of the single-cycle machine and its +4 adder.
//
// The PC holds the byte address of the instruction being executed. Every
// rising clock edge loads PC+4, so one instruction completes per cycle; the
// datapath has no other next-PC source because it carries no branches or
// jumps. A synchronous, active-high reset loads RESET_PC (this design's
// choice; the classic datapath leaves the reset value open).
//
// Timing: pc_q changes only on the rising edge; pc_plus4 is combinational.
module pc_reg #(
  parameter int unsigned       XLEN     = 32,
  parameter logic [XLEN-1:0]   RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst,
  output logic [XLEN-1:0] pc_q,
  output logic [XLEN-1:0] pc_plus4
);

  assign pc_plus4 = pc_q + XLEN'(4);

  always_ff @(posedge clk) begin
    if (rst) pc_q <= RESET_PC;
    else     pc_q <= pc_plus4;
  end

endmodule
