// load_ext: extracts the loaded byte, halfword or word from the 32-bit word
// read out of data memory, and sign- or zero-extends it to 32 bits before it
// is written back to the register file.
//
// funct3 of the load selects the size and signedness (LB, LH, LW, LBU, LHU).
// The two low address bits pick the byte lane; for a halfword only addr[1]
// is used and for a word neither, so a misaligned access reads the aligned
// unit that contains it (this design's choice; the classic datapath says nothing
// about misalignment). Memory is little-endian: byte 0 is word[7:0].
// Purely combinational.
module load_ext
  import rv32_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [1:0]  byte_off,
  input  logic [31:0] word,
  output logic [31:0] data
);

  logic [7:0]  b;
  logic [15:0] h;

  assign b = word[8*byte_off +: 8];
  assign h = byte_off[1] ? word[31:16] : word[15:0];

  always_comb begin
    unique case (funct3)
      F3_B:    data = {{24{b[7]}}, b};
      F3_H:    data = {{16{h[15]}}, h};
      F3_BU:   data = {24'd0, b};
      F3_HU:   data = {16'd0, h};
      default: data = word;            // F3_W
    endcase
  end

endmodule
