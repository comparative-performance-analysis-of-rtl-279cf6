// rv_tb_pkg: test-side helpers shared by the processor testbenches.
//
// * An RV32I assembler: one function per instruction, returning the
//   32-bit encoding built from the standard field layout.
// * Test programs: sum of 1..n, n factorial (with a shift-and-add multiply
//   subroutine, as RV32I has no multiplier), a mixed program touching
//   every instruction class and every hazard case, and a straight run of
//   independent instructions for timing checks.  Every program leaves its
//   result in data word 0 and ends in a jump-to-self.
// * A reference instruction-set simulator (iss_run) that executes a
//   program on a 64 KB word memory and reports the instruction count up
//   to and including the first jump-to-self, the registers and the data
//   memory.  It shares no code with the RTL.
package rv_tb_pkg;

  typedef logic [31:0] word_t;
  typedef word_t prog_t[$];

  localparam word_t HALT = 32'h0000_006f;   // jal x0, 0

  // ------------------------------------------------------------ assembler
  function automatic word_t r_t(input int f7, input int rs2, input int rs1, input int f3, input int rd, input int opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic word_t i_t(input int imm, input int rs1, input int f3, input int rd, input int opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(opc)};
  endfunction
  function automatic word_t s_t(input int imm, input int rs2, input int rs1, input int f3);
    logic [11:0] m; m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], 7'b0100011};
  endfunction
  function automatic word_t b_t(input int off, input int rs2, input int rs1, input int f3);
    logic [12:0] m; m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], 7'b1100011};
  endfunction

  function automatic word_t add (int rd, int a, int b); return r_t(0, b, a, 0, rd, 7'h33); endfunction
  function automatic word_t sub (int rd, int a, int b); return r_t(32, b, a, 0, rd, 7'h33); endfunction
  function automatic word_t sll (int rd, int a, int b); return r_t(0, b, a, 1, rd, 7'h33); endfunction
  function automatic word_t slt (int rd, int a, int b); return r_t(0, b, a, 2, rd, 7'h33); endfunction
  function automatic word_t sltu(int rd, int a, int b); return r_t(0, b, a, 3, rd, 7'h33); endfunction
  function automatic word_t xor_(int rd, int a, int b); return r_t(0, b, a, 4, rd, 7'h33); endfunction
  function automatic word_t srl (int rd, int a, int b); return r_t(0, b, a, 5, rd, 7'h33); endfunction
  function automatic word_t sra (int rd, int a, int b); return r_t(32, b, a, 5, rd, 7'h33); endfunction
  function automatic word_t or_ (int rd, int a, int b); return r_t(0, b, a, 6, rd, 7'h33); endfunction
  function automatic word_t and_(int rd, int a, int b); return r_t(0, b, a, 7, rd, 7'h33); endfunction
  function automatic word_t addi (int rd, int a, int imm); return i_t(imm, a, 0, rd, 7'h13); endfunction
  function automatic word_t slti (int rd, int a, int imm); return i_t(imm, a, 2, rd, 7'h13); endfunction
  function automatic word_t sltiu(int rd, int a, int imm); return i_t(imm, a, 3, rd, 7'h13); endfunction
  function automatic word_t xori (int rd, int a, int imm); return i_t(imm, a, 4, rd, 7'h13); endfunction
  function automatic word_t ori  (int rd, int a, int imm); return i_t(imm, a, 6, rd, 7'h13); endfunction
  function automatic word_t andi (int rd, int a, int imm); return i_t(imm, a, 7, rd, 7'h13); endfunction
  function automatic word_t slli (int rd, int a, int sh); return i_t(sh, a, 1, rd, 7'h13); endfunction
  function automatic word_t srli (int rd, int a, int sh); return i_t(sh, a, 5, rd, 7'h13); endfunction
  function automatic word_t srai (int rd, int a, int sh); return i_t(sh + 1024, a, 5, rd, 7'h13); endfunction
  function automatic word_t lb (int rd, int off, int a); return i_t(off, a, 0, rd, 7'h03); endfunction
  function automatic word_t lh (int rd, int off, int a); return i_t(off, a, 1, rd, 7'h03); endfunction
  function automatic word_t lw (int rd, int off, int a); return i_t(off, a, 2, rd, 7'h03); endfunction
  function automatic word_t lbu(int rd, int off, int a); return i_t(off, a, 4, rd, 7'h03); endfunction
  function automatic word_t lhu(int rd, int off, int a); return i_t(off, a, 5, rd, 7'h03); endfunction
  function automatic word_t sb (int src, int off, int a); return s_t(off, src, a, 0); endfunction
  function automatic word_t sh (int src, int off, int a); return s_t(off, src, a, 1); endfunction
  function automatic word_t sw (int src, int off, int a); return s_t(off, src, a, 2); endfunction
  function automatic word_t beq (int a, int b, int off); return b_t(off, b, a, 0); endfunction
  function automatic word_t bne (int a, int b, int off); return b_t(off, b, a, 1); endfunction
  function automatic word_t blt (int a, int b, int off); return b_t(off, b, a, 4); endfunction
  function automatic word_t bge (int a, int b, int off); return b_t(off, b, a, 5); endfunction
  function automatic word_t bltu(int a, int b, int off); return b_t(off, b, a, 6); endfunction
  function automatic word_t bgeu(int a, int b, int off); return b_t(off, b, a, 7); endfunction
  function automatic word_t lui  (int rd, int imm20); return {20'(imm20), 5'(rd), 7'h37}; endfunction
  function automatic word_t auipc(int rd, int imm20); return {20'(imm20), 5'(rd), 7'h17}; endfunction
  function automatic word_t jal(int rd, int off);
    logic [20:0] m; m = 21'(off);
    return {m[20], m[10:1], m[11], m[19:12], 5'(rd), 7'h6f};
  endfunction
  function automatic word_t jalr(int rd, int a, int off); return i_t(off, a, 0, rd, 7'h67); endfunction

  // ------------------------------------------------------------- programs
  // sum of 1..n into word 0
  function automatic prog_t prog_sum(input int n);
    prog_t p;
    p.push_back(addi(1, 0, n));        // 0x00 i = n
    p.push_back(addi(2, 0, 0));        // 0x04 s = 0
    p.push_back(add(2, 2, 1));         // 0x08 loop: s += i
    p.push_back(addi(1, 1, -1));       // 0x0c i--
    p.push_back(bne(1, 0, -8));        // 0x10 branch on the value just computed
    p.push_back(sw(2, 0, 0));          // 0x14 word 0 = s
    p.push_back(HALT);                 // 0x18
    return p;
  endfunction

  // n! into word 0, through a stack frame and a multiply subroutine
  function automatic prog_t prog_fact(input int n);
    prog_t p;
    p.push_back(addi(10, 0, 1));       // 0x00 acc = 1
    p.push_back(addi(11, 0, n));       // 0x04 i = n
    p.push_back(addi(2, 0, 1024));     // 0x08 sp = 0x400
    p.push_back(beq(11, 0, 28));       // 0x0c loop: if i == 0 goto 0x28
    p.push_back(sw(11, 0, 2));         // 0x10 push i
    p.push_back(addi(12, 11, 0));      // 0x14 b = i
    p.push_back(jal(1, 24));           // 0x18 call mul (0x30)
    p.push_back(lw(11, 0, 2));         // 0x1c pop i
    p.push_back(addi(11, 11, -1));     // 0x20 i-- (load-use)
    p.push_back(jal(0, -24));          // 0x24 goto loop (0x0c)
    p.push_back(sw(10, 0, 0));         // 0x28 word 0 = acc
    p.push_back(HALT);                 // 0x2c
    // mul: x10 = x10 * x12, clobbers x12..x14
    p.push_back(addi(13, 0, 0));       // 0x30 r = 0
    p.push_back(andi(14, 12, 1));      // 0x34 mloop: bit = b & 1
    p.push_back(beq(14, 0, 8));        // 0x38 skip add if bit clear
    p.push_back(add(13, 13, 10));      // 0x3c r += a
    p.push_back(slli(10, 10, 1));      // 0x40 a <<= 1
    p.push_back(srli(12, 12, 1));      // 0x44 b >>= 1
    p.push_back(bne(12, 0, -20));      // 0x48 loop while b != 0
    p.push_back(addi(10, 13, 0));      // 0x4c return r
    p.push_back(jalr(0, 1, 0));        // 0x50 return
    return p;
  endfunction

  // every instruction class and hazard case; registers dumped to 0x200
  function automatic prog_t prog_mix();
    prog_t p;
    p.push_back(addi(1, 0, 100));
    p.push_back(addi(2, 0, -7));
    p.push_back(add(3, 1, 2));         // operands from EX/MEM and MEM/WB
    p.push_back(sub(4, 1, 2));
    p.push_back(sw(3, 4, 0));          // store data bypassed
    p.push_back(lw(5, 4, 0));
    p.push_back(addi(6, 5, 1));        // load-use
    p.push_back(sb(2, 9, 0));
    p.push_back(sh(1, 14, 0));
    p.push_back(lb(7, 9, 0));
    p.push_back(lbu(8, 9, 0));
    p.push_back(lh(9, 14, 0));
    p.push_back(lhu(10, 14, 0));
    p.push_back(xor_(11, 7, 1));
    p.push_back(or_(12, 8, 2));
    p.push_back(and_(13, 9, 2));
    p.push_back(slt(14, 2, 1));
    p.push_back(sltu(15, 2, 1));
    p.push_back(slli(16, 1, 3));
    p.push_back(srai(17, 2, 1));
    p.push_back(srli(18, 2, 28));
    p.push_back(lui(19, 20'h12345));
    p.push_back(auipc(20, 1));
    p.push_back(sll(21, 2, 14));
    p.push_back(srl(22, 2, 16));
    p.push_back(sra(23, 2, 14));
    p.push_back(xori(24, 2, 255));
    p.push_back(ori(25, 1, -256));
    p.push_back(slti(26, 2, -3));
    p.push_back(sltiu(27, 1, 99));
    p.push_back(addi(28, 0, 0));
    p.push_back(beq(3, 3, 8));         // taken
    p.push_back(addi(28, 28, 1));      //   skipped
    p.push_back(blt(2, 1, 8));         // taken, signed
    p.push_back(addi(28, 28, 2));      //   skipped
    p.push_back(bltu(2, 1, 8));        // not taken, unsigned
    p.push_back(addi(28, 28, 4));
    p.push_back(bge(2, 1, 8));         // not taken
    p.push_back(addi(28, 28, 8));
    p.push_back(bgeu(2, 1, 8));        // taken
    p.push_back(addi(28, 28, 16));     //   skipped
    p.push_back(addi(29, 28, 5));
    p.push_back(bne(29, 28, 8));       // taken, operand from EX
    p.push_back(addi(28, 28, 32));     //   skipped
    p.push_back(lw(30, 4, 0));
    p.push_back(beq(30, 3, 8));        // taken, operand from a load
    p.push_back(addi(28, 28, 64));     //   skipped
    p.push_back(jal(31, 12));          // call
    p.push_back(addi(28, 28, 128));    // after return
    p.push_back(jal(0, 12));
    p.push_back(addi(28, 28, 256));    // subroutine body
    p.push_back(jalr(0, 31, 0));       // return, rs1 written by the JAL
    p.push_back(addi(0, 0, 77));       // x0 stays zero
    for (int r = 0; r < 32; r++) p.push_back(sw(r, 512 + 4 * r, 0));
    p.push_back(sw(28, 0, 0));
    p.push_back(HALT);
    return p;
  endfunction

  // n independent instructions, then halt
  function automatic prog_t prog_line(input int n);
    prog_t p;
    for (int i = 0; i < n; i++) p.push_back(addi(1 + (i % 31), 0, i));
    p.push_back(HALT);
    return p;
  endfunction

  // ------------------------------------------------------------------ ISS
  typedef struct {
    int unsigned  count;      // instructions up to and including the halt
    word_t        x[32];
    word_t        mem[int];   // touched words, by word index
  } iss_result_t;

  function automatic iss_result_t iss_run(input prog_t p, input int unsigned max_steps,
                                          input int unsigned mem_words);
    iss_result_t res;
    word_t pc, ins, a, b, imm_i, imm_s, imm_b, imm_j, addr, w, nx;
    int unsigned idx;
    int sh;
    for (int r = 0; r < 32; r++) res.x[r] = 0;
    res.count = 0;
    pc = 0;
    for (int unsigned step = 0; step < max_steps; step++) begin
      idx = (pc >> 2) % mem_words;
      ins = (idx < p.size()) ? p[idx] : 32'h0;
      res.count++;
      a = res.x[ins[19:15]];
      b = res.x[ins[24:20]];
      imm_i = {{20{ins[31]}}, ins[31:20]};
      imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
      imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
      nx = pc + 4;
      w = 0;
      case (ins[6:0])
        7'h33: begin
          sh = int'(b[4:0]);
          case ({ins[30], ins[14:12]})
            4'b0000: w = a + b;
            4'b1000: w = a - b;
            4'b0001: w = a << sh;
            4'b0010: w = ($signed(a) < $signed(b)) ? 1 : 0;
            4'b0011: w = (a < b) ? 1 : 0;
            4'b0100: w = a ^ b;
            4'b0101: w = a >> sh;
            4'b1101: w = word_t'($signed(a) >>> sh);
            4'b0110: w = a | b;
            default: w = a & b;
          endcase
          res.x[ins[11:7]] = w;
        end
        7'h13: begin
          sh = int'(ins[24:20]);
          case (ins[14:12])
            3'd0: w = a + imm_i;
            3'd1: w = a << sh;
            3'd2: w = ($signed(a) < $signed(imm_i)) ? 1 : 0;
            3'd3: w = (a < imm_i) ? 1 : 0;
            3'd4: w = a ^ imm_i;
            3'd5: w = ins[30] ? word_t'($signed(a) >>> sh) : a >> sh;
            3'd6: w = a | imm_i;
            default: w = a & imm_i;
          endcase
          res.x[ins[11:7]] = w;
        end
        7'h03: begin
          addr = a + imm_i;
          idx = (addr >> 2) % mem_words;
          w = res.mem.exists(idx) ? res.mem[idx] : 0;
          w = w >> (8 * addr[1:0]);
          case (ins[14:12])
            3'd0: w = {{24{w[7]}}, w[7:0]};
            3'd1: w = {{16{w[15]}}, w[15:0]};
            3'd4: w = {24'b0, w[7:0]};
            3'd5: w = {16'b0, w[15:0]};
            default: w = res.mem.exists(idx) ? res.mem[idx] : 0;
          endcase
          res.x[ins[11:7]] = w;
        end
        7'h23: begin
          addr = a + imm_s;
          idx = (addr >> 2) % mem_words;
          w = res.mem.exists(idx) ? res.mem[idx] : 0;
          case (ins[14:12])
            3'd0: w[8*addr[1:0] +: 8] = b[7:0];
            3'd1: w[16*addr[1] +: 16] = b[15:0];
            default: w = b;
          endcase
          res.mem[idx] = w;
        end
        7'h63: begin
          logic t;
          case (ins[14:12])
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            default: t = (a >= b);
          endcase
          if (t) nx = pc + imm_b;
        end
        7'h6f: begin res.x[ins[11:7]] = pc + 4; nx = pc + imm_j; end
        7'h67: begin res.x[ins[11:7]] = pc + 4; nx = (a + imm_i) & ~32'd1; end
        7'h37: res.x[ins[11:7]] = {ins[31:12], 12'b0};
        7'h17: res.x[ins[11:7]] = pc + {ins[31:12], 12'b0};
        default: ;
      endcase
      res.x[0] = 0;
      if (ins == HALT) break;
      pc = nx;
    end
    return res;
  endfunction

endpackage
