// rv32_ref_pkg: an instruction-level reference model and a random program
// generator for the testbenches of the single-cycle RV32I machine.
//
// rv32_ref executes one instruction per step() on its own copy of the
// registers, the PC and a word-addressed data memory of `depth` words that
// wraps around like the RTL memories. It covers the register-register,
// register-immediate, load and store groups; any other opcode only advances
// the PC. It is written from the instruction definitions, independently of
// the RTL decode, so that the two can be compared.
package rv32_ref_pkg;

  // Instruction classes the generator can emit.
  typedef enum int {
    K_REG, K_IMM, K_SHIFTI, K_LOAD, K_STORE, K_OTHER, K_NUM
  } kind_e;

  function automatic logic [31:0] enc_r(int f7, int rs2, int rs1, int f3, int rd);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'b0110011};
  endfunction

  function automatic logic [31:0] enc_i(int imm, int rs1, int f3, int rd, logic [6:0] op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), op};
  endfunction

  function automatic logic [31:0] enc_s(int imm, int rs2, int rs1, int f3);
    logic [11:0] i12;
    i12 = 12'(imm);
    return {i12[11:5], 5'(rs2), 5'(rs1), 3'(f3), i12[4:0], 7'b0100011};
  endfunction

  function automatic int sext12(logic [11:0] v);
    return int'(signed'(v));
  endfunction

  class rv32_ref;
    logic [31:0] x [32];
    logic [31:0] pc;
    logic [31:0] mem [];
    int unsigned depth;

    function new(int unsigned d);
      depth = d;
      mem = new[d];
      foreach (x[i]) x[i] = 0;
      pc = 0;
    endfunction

    function automatic int unsigned widx(logic [31:0] a);
      return (a >> 2) % depth;
    endfunction

    // Executes inst at the current PC.
    function void step(logic [31:0] inst);
      logic [6:0]  op;
      logic [2:0]  f3;
      logic [4:0]  rd, rs1, rs2;
      logic [31:0] a, b, r, addr, w, immi, imms;
      logic        wr;
      int          sh;
      op = inst[6:0]; f3 = inst[14:12]; rd = inst[11:7];
      rs1 = inst[19:15]; rs2 = inst[24:20];
      a = x[rs1]; b = x[rs2];
      immi = 32'(sext12(inst[31:20]));
      imms = 32'(sext12({inst[31:25], inst[11:7]}));
      wr = 0; r = 0;
      case (op)
        7'b0110011, 7'b0010011: begin
          logic [31:0] o;
          logic        is_reg;
          is_reg = (op == 7'b0110011);
          o = is_reg ? b : immi;
          sh = int'(o[4:0]);
          wr = 1;
          case (f3)
            3'd0: r = (is_reg && inst[30]) ? a - o : a + o;
            3'd1: r = a << sh;
            3'd2: r = (signed'(a) < signed'(o)) ? 1 : 0;
            3'd3: r = (a < o) ? 1 : 0;
            3'd4: r = a ^ o;
            3'd5: begin
              r = a >> sh;
              if (inst[30] && a[31]) for (int k = 0; k < sh; k++) r[31-k] = 1'b1;
            end
            3'd6: r = a | o;
            default: r = a & o;
          endcase
        end
        7'b0000011: begin
          logic [7:0]  by;
          logic [15:0] hw;
          addr = a + immi;
          w = mem[widx(addr)];
          by = w >> (8 * addr[1:0]);
          hw = addr[1] ? w[31:16] : w[15:0];
          wr = 1;
          case (f3)
            3'd0: r = 32'(signed'(by));
            3'd1: r = 32'(signed'(hw));
            3'd4: r = 32'(by);
            3'd5: r = 32'(hw);
            default: r = w;
          endcase
        end
        7'b0100011: begin
          addr = a + imms;
          w = mem[widx(addr)];
          case (f3)
            3'd0: w[8*addr[1:0] +: 8] = b[7:0];
            3'd1: if (addr[1]) w[31:16] = b[15:0]; else w[15:0] = b[15:0];
            3'd2: w = b;
            default: ;
          endcase
          mem[widx(addr)] = w;
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = r;
      pc = pc + 4;
    endfunction
  endclass

  // A random instruction of class k. Base registers for memory accesses are
  // drawn from the whole file, so addresses are arbitrary and wrap.
  function automatic logic [31:0] rand_inst(kind_e k);
    int rd, rs1, rs2, f3, imm;
    rd  = $urandom_range(0, 31);
    rs1 = $urandom_range(0, 31);
    rs2 = $urandom_range(0, 31);
    f3  = $urandom_range(0, 7);
    imm = $urandom_range(0, 4095);
    case (k)
      K_REG: begin
        int f7;
        f7 = ((f3 == 0 || f3 == 5) && $urandom_range(0, 1)) ? 7'b0100000 : 0;
        return enc_r(f7, rs2, rs1, f3, rd);
      end
      K_IMM: begin
        if (f3 == 1 || f3 == 5) f3 = 0;
        return enc_i(imm, rs1, f3, rd, 7'b0010011);
      end
      K_SHIFTI: begin
        int hi;
        f3 = $urandom_range(0, 1) ? 1 : 5;
        hi = (f3 == 5 && $urandom_range(0, 1)) ? 12'h400 : 0;
        return enc_i(hi | $urandom_range(0, 31), rs1, f3, rd, 7'b0010011);
      end
      K_LOAD: begin
        int sel;
        sel = $urandom_range(0, 4);
        f3 = (sel == 3) ? 4 : (sel == 4) ? 5 : sel;
        return enc_i(imm, rs1, f3, rd, 7'b0000011);
      end
      K_STORE: return enc_s(imm, rs2, rs1, $urandom_range(0, 2));
      default: begin
        logic [6:0] ops [7];
        ops = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111,
                7'b1100011, 7'b0001111, 7'b1110011};
        return {$urandom_range(0, 32'h01ff_ffff) & 25'h1ff_ffff, ops[$urandom_range(0, 6)]};
      end
    endcase
  endfunction

  // A class drawn with more weight on the arithmetic groups.
  function automatic kind_e rand_kind();
    int r;
    r = $urandom_range(0, 99);
    if (r < 28) return K_REG;
    if (r < 46) return K_IMM;
    if (r < 56) return K_SHIFTI;
    if (r < 76) return K_LOAD;
    if (r < 94) return K_STORE;
    return K_OTHER;
  endfunction

endpackage
