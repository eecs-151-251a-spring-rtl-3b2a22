// dmem: data memory, DEPTH 32-bit words, byte addressed, little-endian.
//
// Read is asynchronous: the word at addr[AW+1:2] appears on rdata in the same
// cycle. Write is synchronous: on the rising edge, every byte lane whose bit
// of be is set takes the matching byte of wdata, provided we (MemRW = Write)
// is high. Address bits above the memory's size wrap around. The contents are
// not reset. DEPTH is this design's choice.
module dmem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] wdata
);

  logic [31:0] mem [DEPTH];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++)
        if (be[i]) mem[idx][8*i +: 8] <= wdata[8*i +: 8];
    end
  end

  assign rdata = mem[idx];

endmodule
