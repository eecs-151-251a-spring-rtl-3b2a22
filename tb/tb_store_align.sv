// tb_store_align: for SB, SH and SW at every byte offset, merging the
// aligned write data into a random old word under the byte enables must give
// the word the store defines (checked against a byte-by-byte model).
module tb_store_align;
  import rv32_pkg::*;
  logic [2:0]  f3;
  logic [1:0]  off;
  logic [31:0] d, wd;
  logic [3:0]  be;
  int checks = 0, failures = 0;

  store_align dut (.funct3(f3), .byte_off(off), .data(d), .wdata(wd), .byte_en(be));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] old, merged, e;
      logic [3:0]  ebe;
      f3 = 3'(n % 3); off = 2'(n / 3); d = $urandom; old = $urandom;
      e = old;
      case (f3)
        3'd0: begin e[8*off +: 8] = d[7:0]; ebe = 4'b0001 << off; end
        3'd1: begin
          if (off[1]) begin e[31:16] = d[15:0]; ebe = 4'b1100; end
          else begin e[15:0] = d[15:0]; ebe = 4'b0011; end
        end
        default: begin e = d; ebe = 4'b1111; end
      endcase
      #1;
      for (int i = 0; i < 4; i++) merged[8*i +: 8] = be[i] ? wd[8*i +: 8] : old[8*i +: 8];
      checks++;
      if (merged !== e || be !== ebe) begin
        failures++;
        if (failures < 10) $display("FAIL f3=%0d off=%0d be=%b merged=%h exp=%h", f3, off, be, merged, e);
      end
    end
    f3 = 3'b011; off = 0; #1;       // not a store size: nothing written
    checks++; if (be != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
