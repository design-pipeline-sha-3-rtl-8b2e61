// mips_asm_pkg: a small two-pass MIPS assembler for testbenches.
//
// Programs are written as calls (a.addi(1, 0, 5), a.label("loop"),
// a.bne(1, 2, "loop"), ...). Each program-building routine is run twice:
// the first pass records label addresses, the second emits final words.
//
// The assembler schedules for the interlock-free pipeline of sha3_mips:
//   * an instruction that reads a register written by one of the two
//     instructions just before it gets nops inserted ahead of it, so that
//     producer and consumer are at least three instructions apart;
//   * every beq, bne and j is followed by three nops filling its delay slots.
// raw mode (auto_sched = 0) turns both off, for directed pipeline tests.
package mips_asm_pkg;

  class mips_asm;
    logic [31:0] code[$];
    int          labels[string];
    bit          final_pass;
    bit          auto_sched = 1'b1;
    int          dst_hist[2];   // destination of the previous two words

    function new();
      start_pass(1'b0);
    endfunction

    function void start_pass(bit fin);
      final_pass  = fin;
      code.delete();
      dst_hist[0] = 0;
      dst_hist[1] = 0;
    endfunction

    function int pc();
      return code.size();
    endfunction

    function void label(string name);
      if (!final_pass) labels[name] = code.size();
    endfunction

    function int lookup(string name);
      if (!final_pass) return 0;
      if (!labels.exists(name)) $fatal(1, "undefined label %s", name);
      return labels[name];
    endfunction

    function void push(logic [31:0] w, int dst);
      code.push_back(w);
      dst_hist[1] = dst_hist[0];
      dst_hist[0] = dst;
    endfunction

    function bit conflict(int s);
      return s != 0 && (s == dst_hist[0] || s == dst_hist[1]);
    endfunction

    // emit one word; dst is the register it writes (0 for none),
    // s1/s2 the registers it reads (0 for none)
    function void emit(logic [31:0] w, int dst, int s1, int s2);
      if (auto_sched)
        while (conflict(s1) || conflict(s2)) push(32'h0, 0);
      push(w, dst);
    endfunction

    function void nop();
      push(32'h0, 0);
    endfunction

    function void delay_slots();
      if (auto_sched) repeat (3) push(32'h0, 0);
    endfunction

    // ---- encodings ----
    function logic [31:0] r_word(int rs, int rt, int rd, logic [5:0] fn);
      return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h00, fn};
    endfunction

    function logic [31:0] i_word(logic [5:0] op, int rs, int rt, int imm);
      return {op, 5'(rs), 5'(rt), 16'(imm)};
    endfunction

    function void add (int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h20), rd, rs, rt); endfunction
    function void sub (int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h22), rd, rs, rt); endfunction
    function void and_(int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h24), rd, rs, rt); endfunction
    function void or_ (int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h25), rd, rs, rt); endfunction
    function void xor_(int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h26), rd, rs, rt); endfunction
    function void nor_(int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h27), rd, rs, rt); endfunction
    function void slt (int rd, int rs, int rt); emit(r_word(rs, rt, rd, 6'h2A), rd, rs, rt); endfunction
    // rd = rt << rs[4:0], rd = rt >> rs[4:0]
    function void sllv(int rd, int rt, int rs); emit(r_word(rs, rt, rd, 6'h04), rd, rs, rt); endfunction
    function void srlv(int rd, int rt, int rs); emit(r_word(rs, rt, rd, 6'h06), rd, rs, rt); endfunction

    function void addi(int rt, int rs, int imm); emit(i_word(6'h08, rs, rt, imm), rt, rs, 0); endfunction
    function void lw  (int rt, int off, int rs); emit(i_word(6'h23, rs, rt, off), rt, rs, 0); endfunction
    function void sw  (int rt, int off, int rs); emit(i_word(6'h2B, rs, rt, off), 0, rs, rt); endfunction

    function void beq(int rs, int rt, string target);
      int off;
      off = lookup(target) - (pc() + 1);
      if (auto_sched) begin
        // account for nops that emit() may insert ahead of the branch
        while (conflict(rs) || conflict(rt)) push(32'h0, 0);
        off = lookup(target) - (pc() + 1);
      end
      emit(i_word(6'h04, rs, rt, off), 0, rs, rt);
      delay_slots();
    endfunction

    function void bne(int rs, int rt, string target);
      int off;
      off = lookup(target) - (pc() + 1);
      if (auto_sched) begin
        while (conflict(rs) || conflict(rt)) push(32'h0, 0);
        off = lookup(target) - (pc() + 1);
      end
      emit(i_word(6'h05, rs, rt, off), 0, rs, rt);
      delay_slots();
    endfunction

    function void j(string target);
      emit({6'h02, 26'(lookup(target))}, 0, 0, 0);
      delay_slots();
    endfunction
  endclass

endpackage
