// sha3_prog_pkg: the SHA3-256 program for sha3_mips and its data-memory map.
//
// The program zeroes the 1600-bit state, absorbs NBLK padded 136-byte blocks
// (XOR into the first 17 lanes, then Keccak-f[1600]), and squeezes the
// 256-bit digest into DIG, then writes 1 to DONE and spins. Each 64-bit lane
// is a pair of 32-bit words; a lane rotation by n is done with sllv/srlv on
// both halves, swapping the halves first when n >= 32 (the swap is folded
// into the table below by choosing which half is loaded as "high"). The
// term lo >> (32-n) is computed as (lo >> 1) >> (31-n) so that n = 0 needs
// no special case.
//
// Data memory (byte addresses):
//   ST   0x000  state, 25 lanes
//   BT   0x0C8  rho/pi output, 25 lanes
//   CT   0x190  theta column parities C[4],C[0..4],C[0] (7 lanes, wrapped)
//   DT   0x1C8  theta D[0..4]
//   RC   0x1F0  24 round constants
//   RP   0x2B0  per lane: pi destination offset, n, 31-n, high/low half
//               offsets (5 words, n = rho offset mod 32)
//   X12  0x4A4  chi offsets of lanes x+1 and x+2 in a row (5 x 2 words)
//   DIG  0x4CC  digest, 8 words
//   NBLK 0x4EC  number of blocks, DONE 0x4F0
//   MSG  0x500  padded message blocks
package sha3_prog_pkg;
  import mips_asm_pkg::*;
  import sha3_ref_pkg::*;

  localparam int ST   = 'h000;
  localparam int BT   = 'h0C8;
  localparam int CT   = 'h190;
  localparam int DT   = 'h1C8;
  localparam int RC   = 'h1F0;
  localparam int RP   = 'h2B0;
  localparam int X12  = 'h4A4;
  localparam int DIG  = 'h4CC;
  localparam int NBLK = 'h4EC;
  localparam int DONE = 'h4F0;
  localparam int MSG  = 'h500;

  // register roles
  localparam int K1 = 16, K40 = 17, K200 = 18, K136 = 19, RND = 20, K192 = 21,
                 MPTR = 22, NB = 23, K31 = 24;

  function automatic void emit_program(mips_asm a);
    a.addi(K1, 0, 1);    a.addi(K40, 0, 40);  a.addi(K200, 0, 200);
    a.addi(K136, 0, 136); a.addi(K192, 0, 192); a.addi(K31, 0, 31);
    a.lw(NB, NBLK, 0);   a.addi(MPTR, 0, MSG);
    // zero the state
    a.addi(1, 0, 0);
    a.label("zero");
    a.sw(0, ST, 1); a.addi(1, 1, 4); a.bne(1, K200, "zero");
    // absorb
    a.label("absorb");
    a.beq(NB, 0, "squeeze");
    a.addi(1, 0, 0);
    a.label("xor_in");
    a.add(2, MPTR, 1); a.lw(3, ST, 1); a.lw(4, 0, 2); a.xor_(3, 3, 4); a.sw(3, ST, 1);
    a.addi(1, 1, 4); a.bne(1, K136, "xor_in");
    a.add(MPTR, MPTR, K136); a.addi(NB, NB, -1);
    // Keccak-f[1600]
    a.addi(RND, 0, 0);
    a.label("round");
    // theta: column parities
    a.addi(1, 0, 0);
    a.label("theta_c");
    for (int w = 0; w < 8; w += 4) begin
      a.lw(2, ST + w, 1); a.lw(3, ST + 40 + w, 1); a.lw(4, ST + 80 + w, 1);
      a.lw(5, ST + 120 + w, 1); a.lw(6, ST + 160 + w, 1);
      a.xor_(2, 2, 3); a.xor_(4, 4, 5); a.xor_(2, 2, 6); a.xor_(2, 2, 4);
      a.sw(2, CT + 8 + w, 1);
    end
    a.addi(1, 1, 8); a.bne(1, K40, "theta_c");
    a.lw(2, CT + 40, 0); a.lw(3, CT + 44, 0); a.lw(4, CT + 8, 0); a.lw(5, CT + 12, 0);
    a.sw(2, CT, 0); a.sw(3, CT + 4, 0); a.sw(4, CT + 48, 0); a.sw(5, CT + 52, 0);
    // theta: D[x] = C[x-1] ^ rotl(C[x+1], 1)
    a.addi(1, 0, 0);
    a.label("theta_d");
    a.lw(2, CT + 16, 1); a.lw(3, CT + 20, 1); a.lw(4, CT, 1); a.lw(5, CT + 4, 1);
    a.sllv(6, 2, K1); a.srlv(7, 3, K31); a.sllv(8, 3, K1); a.srlv(9, 2, K31);
    a.or_(6, 6, 7); a.or_(8, 8, 9); a.xor_(6, 6, 4); a.xor_(8, 8, 5);
    a.sw(6, DT, 1); a.sw(8, DT + 4, 1);
    a.addi(1, 1, 8); a.bne(1, K40, "theta_d");
    // theta: A[x,y] ^= D[x]
    a.addi(1, 0, 0);
    a.label("theta_y");
    a.addi(2, 0, 0);
    a.label("theta_x");
    a.add(3, 1, 2); a.lw(6, DT, 2); a.lw(7, DT + 4, 2); a.lw(4, ST, 3); a.lw(5, ST + 4, 3);
    a.xor_(4, 4, 6); a.xor_(5, 5, 7); a.sw(4, ST, 3); a.sw(5, ST + 4, 3);
    a.addi(2, 2, 8); a.bne(2, K40, "theta_x");
    a.addi(1, 1, 40); a.bne(1, K200, "theta_y");
    // rho and pi
    a.addi(1, 0, 0); a.addi(2, 0, RP);
    a.label("rho_pi");
    a.lw(3, 0, 2); a.lw(4, 4, 2); a.lw(5, 8, 2); a.lw(6, 12, 2); a.lw(7, 16, 2);
    a.add(6, 6, 1); a.add(7, 7, 1);
    a.lw(6, ST, 6); a.lw(7, ST, 7);
    a.sllv(8, 6, 4);  a.srlv(9, 7, K1);  a.srlv(9, 9, 5);   a.or_(8, 8, 9);
    a.sllv(10, 7, 4); a.srlv(11, 6, K1); a.srlv(11, 11, 5); a.or_(10, 10, 11);
    a.sw(10, BT, 3); a.sw(8, BT + 4, 3);
    a.addi(1, 1, 8); a.addi(2, 2, 20); a.bne(1, K200, "rho_pi");
    // chi
    a.addi(1, 0, 0);
    a.label("chi_y");
    a.addi(2, 0, 0); a.addi(3, 0, X12);
    a.label("chi_x");
    a.lw(4, 0, 3); a.lw(5, 4, 3); a.add(6, 2, 1); a.add(4, 4, 1); a.add(5, 5, 1);
    for (int w = 0; w < 8; w += 4) begin
      a.lw(7, BT + w, 4); a.lw(8, BT + w, 5); a.lw(9, BT + w, 6);
      a.nor_(7, 7, 0); a.and_(7, 7, 8); a.xor_(9, 9, 7); a.sw(9, ST + w, 6);
    end
    a.addi(2, 2, 8); a.addi(3, 3, 8); a.bne(2, K40, "chi_x");
    a.addi(1, 1, 40); a.bne(1, K200, "chi_y");
    // iota
    a.lw(2, ST, 0); a.lw(3, ST + 4, 0); a.lw(4, RC, RND); a.lw(5, RC + 4, RND);
    a.xor_(2, 2, 4); a.xor_(3, 3, 5); a.sw(2, ST, 0); a.sw(3, ST + 4, 0);
    a.addi(RND, RND, 8); a.bne(RND, K192, "round");
    a.j("absorb");
    // squeeze 256 bits
    a.label("squeeze");
    a.addi(1, 0, 0); a.addi(2, 0, 32);
    a.label("sq");
    a.lw(3, ST, 1); a.sw(3, DIG, 1); a.addi(1, 1, 4); a.bne(1, 2, "sq");
    a.addi(3, 0, 1); a.sw(3, DONE, 0);
    a.label("halt");
    a.j("halt");
  endfunction

  function automatic void build_program(output logic [31:0] words[$]);
    mips_asm a = new();
    a.start_pass(1'b0);
    emit_program(a);
    a.start_pass(1'b1);
    emit_program(a);
    words = a.code;
  endfunction

  // constant tables as (byte address, word) pairs
  typedef struct { int addr; logic [31:0] data; } init_t;

  function automatic void build_tables(output init_t t[$]);
    lane_t c;
    int n, x, y;
    t.delete();
    for (int ir = 0; ir < 24; ir++) begin
      c = round_const(ir);
      t.push_back('{RC + 8*ir,     c[31:0]});
      t.push_back('{RC + 8*ir + 4, c[63:32]});
    end
    for (int i = 0; i < 25; i++) begin
      x = i % 5; y = i / 5;
      n = rho_offset(x, y);
      t.push_back('{RP + 20*i,      32'(8 * (y + 5 * ((2*x + 3*y) % 5))) });
      t.push_back('{RP + 20*i + 4,  32'(n % 32)});
      t.push_back('{RP + 20*i + 8,  32'(31 - n % 32)});
      t.push_back('{RP + 20*i + 12, (n >= 32) ? 32'd0 : 32'd4});
      t.push_back('{RP + 20*i + 16, (n >= 32) ? 32'd4 : 32'd0});
    end
    for (int xx = 0; xx < 5; xx++) begin
      t.push_back('{X12 + 8*xx,     32'(8 * ((xx + 1) % 5))});
      t.push_back('{X12 + 8*xx + 4, 32'(8 * ((xx + 2) % 5))});
    end
  endfunction
endpackage
