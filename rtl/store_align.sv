// store_align: places store data on the right byte lanes of the data-memory
// word and produces the matching byte write enables.
//
// SW writes all four lanes. SB and SH, which share the S-format datapath with
// SW, replicate the low byte or halfword of Reg[rs2] over the word and enable
// only the addressed lane(s). As for loads, a halfword uses addr[1] and a word
// ignores the low address bits. A funct3 that names no store size enables no
// lane. Purely combinational.
module store_align
  import rv32_pkg::*;
(
  input  logic [2:0]  funct3,
  input  logic [1:0]  byte_off,
  input  logic [31:0] data,
  output logic [31:0] wdata,
  output logic [3:0]  byte_en
);

  always_comb begin
    unique case (funct3)
      F3_B: begin
        wdata   = {4{data[7:0]}};
        byte_en = 4'b0001 << byte_off;
      end
      F3_H: begin
        wdata   = {2{data[15:0]}};
        byte_en = byte_off[1] ? 4'b1100 : 4'b0011;
      end
      F3_W: begin
        wdata   = data;
        byte_en = 4'b1111;
      end
      default: begin
        wdata   = data;
        byte_en = 4'b0000;
      end
    endcase
  end

endmodule
