// tb_alu: checks every ALU function against values computed here by other
// means (bit loops for shifts, sign-bit logic for the comparisons), on corner
// operands and on random ones.
module tb_alu;
  import rv32_pkg::*;

  logic [31:0] a, b, y;
  alu_sel_e    sel;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_sel(sel), .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] expect_y(alu_sel_e s, logic [31:0] a_, logic [31:0] b_);
    logic [31:0] r;
    int sh;
    logic lt;
    sh = int'(b_[4:0]);
    case (s)
      ALU_ADD:  r = a_ + b_;
      ALU_SUB:  r = a_ + ~b_ + 1;
      ALU_SLL:  begin r = 0; for (int i = 0; i < 32; i++) if (i >= sh) r[i] = a_[i-sh]; end
      ALU_SRL:  begin r = 0; for (int i = 0; i < 32; i++) if (i + sh < 32) r[i] = a_[i+sh]; end
      ALU_SRA:  begin r = 0; for (int i = 0; i < 32; i++) r[i] = (i + sh < 32) ? a_[i+sh] : a_[31]; end
      ALU_SLT:  begin
        lt = (a_[31] != b_[31]) ? a_[31] : (a_[30:0] < b_[30:0]);
        r = {31'd0, lt};
      end
      ALU_SLTU: r = {31'd0, ({1'b0, a_} - {1'b0, b_}) >> 32 != 0};
      ALU_XOR:  r = (a_ | b_) & ~(a_ & b_);
      ALU_OR:   r = ~(~a_ & ~b_);
      ALU_AND:  r = ~(~a_ | ~b_);
      default:  r = 'x;
    endcase
    return r;
  endfunction

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h0000_001f};

  initial begin
    for (int s = 0; s < 10; s++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++) begin
          sel = alu_sel_e'(s); a = corner[i]; b = corner[j];
          #1;
          checks++;
          if (y !== expect_y(sel, a, b)) begin
            failures++;
            $display("FAIL sel=%0d a=%h b=%h y=%h", s, a, b, y);
          end
        end
      for (int n = 0; n < 2000; n++) begin
        sel = alu_sel_e'(s); a = $urandom; b = $urandom;
        if (n % 3 == 0) b = {$urandom_range(0,1) ? a[31:5] : 27'($urandom), 5'($urandom)};
        #1;
        checks++;
        if (y !== expect_y(sel, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d a=%h b=%h y=%h", s, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
