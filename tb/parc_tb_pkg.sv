// parc_tb_pkg: test support for the PARCv1 processors.
//
// - Instruction encoders written from the MIPS32 encodings (literal numbers,
//   independent of the RTL package), plus the two extension encodings
//   (lw.ai: opcode 0x3B; addu.mm: SPECIAL function 0x28).
// - parc_iss: an instruction-level reference model. It executes a memory
//   image until the PC reaches a given halt address and records the final
//   memory, the number of instructions executed, how many of each kind, and
//   the cycle count the FSM processor should take (fetch 3 cycles, then
//   addu/addiu 3, mul 36, lw 4, sw 4, j 2, jal 3, jr 1, bne 3 when not
//   taken and 5 when taken, lw.ai 5, addu.mm 6).
// - gen_program: builds a pseudo-random test program from a seed. Memory
//   map (byte addresses): code from 0, data words at 0x800..0x9FC, register
//   dump at 0xC00..0xC7C. The program ends by storing r1..r31 to the dump
//   area and jumping to itself; that self-jump is the halt address.
package parc_tb_pkg;

  localparam int MEMW     = 1024;
  localparam int DATA_B   = 32'h800;
  localparam int DUMP_B   = 32'hC00;

  // ------------------------------------------------------------ encoders
  function automatic bit [31:0] r_type(int op, int rs, int rt, int rd, int fn);
    return {6'(op), 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'(fn)};
  endfunction
  function automatic bit [31:0] i_type(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic bit [31:0] e_addu (int rd, int rs, int rt); return r_type(0, rs, rt, rd, 'h21); endfunction
  function automatic bit [31:0] e_mul  (int rd, int rs, int rt); return r_type('h1C, rs, rt, rd, 'h02); endfunction
  function automatic bit [31:0] e_addumm(int rd, int rs, int rt); return r_type(0, rs, rt, rd, 'h28); endfunction
  function automatic bit [31:0] e_jr   (int rs);                 return r_type(0, rs, 0, 0, 'h08); endfunction
  function automatic bit [31:0] e_addiu(int rt, int rs, int imm); return i_type('h09, rs, rt, imm); endfunction
  function automatic bit [31:0] e_lw   (int rt, int off, int rs); return i_type('h23, rs, rt, off); endfunction
  function automatic bit [31:0] e_sw   (int rt, int off, int rs); return i_type('h2B, rs, rt, off); endfunction
  function automatic bit [31:0] e_lwai (int rt, int off, int rs); return i_type('h3B, rs, rt, off); endfunction
  function automatic bit [31:0] e_bne  (int rs, int rt, int off); return i_type('h05, rs, rt, off); endfunction
  function automatic bit [31:0] e_j    (int addr); return {6'h02, 26'(addr >> 2)}; endfunction
  function automatic bit [31:0] e_jal  (int addr); return {6'h03, 26'(addr >> 2)}; endfunction

  // ------------------------------------------------------------ reference model
  typedef enum int { K_ADDU, K_ADDIU, K_MUL, K_LW, K_SW, K_J, K_JAL, K_JR,
                     K_BNE_T, K_BNE_N, K_LWAI, K_ADDUMM, K_NUM } kind_e;

  class parc_iss;
    bit [31:0] mem [MEMW];
    bit [31:0] r   [32];
    bit [31:0] pc;
    int        ninst;
    longint    fsm_cycles;
    int        kind_cnt [K_NUM];

    function new();
      foreach (r[i]) r[i] = 0;
      pc = 0; ninst = 0; fsm_cycles = 0;
      foreach (kind_cnt[i]) kind_cnt[i] = 0;
    endfunction

    function bit [31:0] rd_mem(bit [31:0] a); return mem[(a >> 2) % MEMW]; endfunction
    function void wr_mem(bit [31:0] a, bit [31:0] d); mem[(a >> 2) % MEMW] = d; endfunction
    function void wr_reg(int i, bit [31:0] d); if (i != 0) r[i] = d; endfunction

    function void count(kind_e k, int cyc);
      kind_cnt[k]++; fsm_cycles += longint'(3 + cyc);
    endfunction

    function void step();
      bit [31:0] ir, nxt, se;
      int op, rs, rt, rdi, fn;
      ir  = rd_mem(pc);
      op  = int'(ir[31:26]); rs = int'(ir[25:21]); rt = int'(ir[20:16]);
      rdi = int'(ir[15:11]); fn = int'(ir[5:0]);
      se  = {{16{ir[15]}}, ir[15:0]};
      nxt = pc + 4;
      if (op == 0 && fn == 'h21)        begin wr_reg(rdi, r[rs] + r[rt]); count(K_ADDU, 3); end
      else if (op == 0 && fn == 'h08)   begin nxt = r[rs]; count(K_JR, 1); end
      else if (op == 0 && fn == 'h28)   begin
        wr_mem(r[rdi], rd_mem(r[rs]) + rd_mem(r[rt])); count(K_ADDUMM, 6);
      end
      else if (op == 'h1C && fn == 2)   begin wr_reg(rdi, r[rs] * r[rt]); count(K_MUL, 36); end
      else if (op == 'h09)              begin wr_reg(rt, r[rs] + se); count(K_ADDIU, 3); end
      else if (op == 'h23)              begin wr_reg(rt, rd_mem(r[rs] + se)); count(K_LW, 4); end
      else if (op == 'h2B)              begin wr_mem(r[rs] + se, r[rt]); count(K_SW, 4); end
      else if (op == 'h3B)              begin
        bit [31:0] base; base = r[rs];
        wr_reg(rt, rd_mem(base + se)); wr_reg(rs, base + 4); count(K_LWAI, 5);
      end
      else if (op == 'h02)              begin nxt = {nxt[31:28], ir[25:0], 2'b00}; count(K_J, 2); end
      else if (op == 'h03)              begin
        wr_reg(31, pc + 4); nxt = {nxt[31:28], ir[25:0], 2'b00}; count(K_JAL, 3);
      end
      else if (op == 'h05)              begin
        if (r[rs] != r[rt]) begin nxt = pc + 4 + (se << 2); count(K_BNE_T, 5); end
        else count(K_BNE_N, 3);
      end
      else fsm_cycles += 3;
      pc = nxt;
      ninst++;
    endfunction

    // Run until the PC reaches halt_pc (the halt jump itself is not executed).
    function void run(bit [31:0] halt_pc, int max_inst);
      while (pc != halt_pc && ninst < max_inst) step();
    endfunction
  endclass

  // ------------------------------------------------------------ program generator
  // Registers: r1..r15 general, r20 data base, r21 lw.ai pointer,
  // r22..r24 addu.mm pointers, r25 loop counter, r31 link.
  class prog_gen;
    bit [31:0] img [MEMW];
    int        pcw;          // next code word index
    bit [31:0] halt_pc;

    function void emit(bit [31:0] w); img[pcw] = w; pcw++; endfunction

    function int rnd(int n); return int'($urandom % n); endfunction

    // ext: 0 base instructions, 1 also lw.ai, 2 also lw.ai and addu.mm
    function void body(int n, int ext);
      for (int i = 0; i < n; i++) begin
        int k, d, s, t;
        d = 1 + rnd(15); s = (rnd(4) == 0) ? 0 : 1 + rnd(15); t = 1 + rnd(15);
        k = rnd(6 + ext);
        case (k)
          0: emit(e_addu(d, s, t));
          1: emit(e_addiu(d, s, int'($urandom) & 'hFFFF));
          2: emit(e_mul(d, s, t));
          3: emit(e_lw(d, rnd(128) * 4, 20));
          4: emit(e_sw(t, rnd(128) * 4, 20));
          5: emit(e_addiu(d, s, rnd(64) - 32));
          6: emit(e_lwai(d, rnd(16) * 4, 21));
          default: emit(e_addumm(22 + rnd(3), 22 + rnd(3), 22 + rnd(3)));
        endcase
      end
    endfunction

    function void build(int seed, int ext, int nbody);
      int loop_top, sub_addr, jal_at;
      void'($urandom(seed));
      foreach (img[i]) img[i] = 0;
      for (int i = 0; i < 128; i++) img[DATA_B/4 + i] = $urandom;
      pcw = 0;
      emit(e_addiu(20, 0, DATA_B));
      emit(e_addiu(21, 0, DATA_B + 4 * rnd(16)));
      emit(e_addiu(22, 0, DATA_B + 4 * rnd(32)));
      emit(e_addiu(23, 0, DATA_B + 4 * rnd(32)));
      emit(e_addiu(24, 0, DATA_B + 4 * rnd(32)));
      // registers the body never writes start from known values too
      for (int i = 16; i < 32; i++)
        if (!(i inside {[20:24]})) emit(e_addiu(i, 0, int'($urandom) & 'hFFFF));
      for (int i = 1; i <= 15; i++) begin
        if (rnd(2) == 1) emit(e_lw(i, rnd(128) * 4, 20));
        else             emit(e_addiu(i, 0, int'($urandom) & 'hFFFF));
      end
      body(nbody, ext);
      // counted loop: r25 = 3; loop { body; r25 -= 1; bne r25, r0, loop }
      emit(e_addiu(25, 0, 3));
      loop_top = pcw;
      body(4, ext);
      emit(e_addiu(25, 25, -1));
      emit(e_bne(25, 0, loop_top - (pcw + 1)));
      // bne not taken on equal registers
      emit(e_bne(1, 1, 5));
      // call a subroutine with jal, return with jr
      jal_at = pcw;
      sub_addr = (pcw + 3) * 4;
      emit(e_jal(sub_addr));
      emit(e_j((jal_at + 7) * 4));        // after return: jump over the subroutine
      emit(0);                             // never executed
      // subroutine (at sub_addr)
      body(3, ext);
      emit(e_jr(31));
      body(nbody / 2, ext);
      for (int i = 1; i < 32; i++) emit(e_sw(i, DUMP_B + 4 * i - DATA_B, 20));
      halt_pc = pcw * 4;
      emit(e_j(pcw * 4));
    endfunction
  endclass

endpackage
