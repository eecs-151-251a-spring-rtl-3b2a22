// imem: instruction memory, DEPTH 32-bit words, byte addressed.
//
// The core only reads it: the word at addr[AW+1:2] appears combinationally on
// rdata (asynchronous read). The two low address bits are ignored and higher
// bits beyond the memory's size wrap around. A separate load port (load_we,
// load_addr as a word index, load_data), written on the rising edge, puts a
// program in before the core runs; it is this design's way of filling an
// otherwise read-only memory. DEPTH is this design's choice.
module imem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   rdata,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
