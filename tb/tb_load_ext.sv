// tb_load_ext: for every load size and byte offset, the result must be the
// addressed byte or halfword, sign- or zero-extended, computed here with
// shifts of the word.
module tb_load_ext;
  import rv32_pkg::*;
  logic [2:0]  f3;
  logic [1:0]  off;
  logic [31:0] w, d;
  int checks = 0, failures = 0;

  load_ext dut (.funct3(f3), .byte_off(off), .word(w), .data(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] f3s [5] = '{3'b000, 3'b001, 3'b010, 3'b100, 3'b101};
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] e, sh;
      f3 = f3s[n % 5]; off = 2'(n / 5); w = (n % 7 == 0) ? 32'h80ff_7f80 : $urandom;
      sh = w >> (8 * off);
      case (f3)
        3'b000: e = {{24{sh[7]}}, sh[7:0]};
        3'b100: e = {24'h0, sh[7:0]};
        3'b001: e = off[1] ? {{16{w[31]}}, w[31:16]} : {{16{w[15]}}, w[15:0]};
        3'b101: e = off[1] ? {16'h0, w[31:16]} : {16'h0, w[15:0]};
        default: e = w;
      endcase
      #1;
      checks++;
      if (d !== e) begin
        failures++;
        if (failures < 10) $display("FAIL f3=%b off=%0d w=%h d=%h exp=%h", f3, off, w, d, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
