// tb_sha3_mips: end-to-end test of sha3_mips at its default sizes.
//
// 1. A directed program, assembled without scheduling, checks the
//    interlock-free timing: a register read one or two instructions after
//    its write sees the old value, three after sees the new one, and the
//    three instructions after a taken beq execute while the fourth is
//    skipped.
// 2. The SHA3-256 program is loaded through the instruction-memory port,
//    the round-constant and rho/pi tables and the padded message through
//    the data-memory host port. After reset is released the test waits for
//    the DONE word, reads the digest and compares it with the reference
//    model in sha3_ref_pkg and, for "welcom" and "", with fixed published
//    values. Messages cover 0, 1 and 2 blocks and the single-byte-pad case.
//    The cycle count must be data independent: 2 blocks cost exactly twice
//    the per-block cost measured between the 0- and 1-block runs.
// Each pipeline mechanism (taken/not-taken beq and bne, jump, load, store,
// write-through in the register file, host loads) is counted and must occur.
module tb_sha3_mips;
  import mips_asm_pkg::*;
  import sha3_ref_pkg::*;
  import sha3_prog_pkg::*;

  logic        clk = 1'b0, reset = 1'b1;
  logic        imem_we = 1'b0, host_dmem_we = 1'b0;
  logic [31:0] imem_waddr = '0, imem_wdata = '0;
  logic [31:0] host_dmem_addr = '0, host_dmem_wdata = '0, host_dmem_rdata;
  logic [31:0] pc, pcnext, instr, aluout, dataadr, writedata, readdata;
  logic        memwrite;

  sha3_mips dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_beq_t = 0, n_beq_nt = 0, n_bne_t = 0, n_bne_nt = 0, n_jump = 0;
  int n_load = 0, n_store = 0, n_wthru = 0, n_host = 0;
  always @(posedge clk) if (!reset) begin
    if (dut.ex_mem_q.m.branch) begin
      if (dut.ex_mem_q.zero) n_beq_t++; else n_beq_nt++;
    end
    if (dut.ex_mem_q.m.bne) begin
      if (!dut.ex_mem_q.zero) n_bne_t++; else n_bne_nt++;
    end
    if (dut.ex_mem_q.m.jump)     n_jump++;
    if (dut.ex_mem_q.m.mem_read) n_load++;
    if (memwrite)                n_store++;
    if (dut.mem_wb_q.wb.reg_write && dut.mem_wb_q.wreg != 5'd0 &&
        (dut.mem_wb_q.wreg == dut.if_id_q.instr[25:21] ||
         dut.mem_wb_q.wreg == dut.if_id_q.instr[20:16])) n_wthru++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_program(logic [31:0] words[$]);
    for (int i = 0; i < words.size(); i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = i; imem_wdata = words[i];
    end
    @(negedge clk) imem_we = 1'b0;
  endtask

  task automatic host_write(int addr, logic [31:0] data);
    @(negedge clk);
    host_dmem_we = 1'b1; host_dmem_addr = addr; host_dmem_wdata = data;
    n_host++;
    @(negedge clk) host_dmem_we = 1'b0;
  endtask

  task automatic host_read(int addr, output logic [31:0] data);
    @(negedge clk);
    host_dmem_addr = addr;
    #1 data = host_dmem_rdata;
  endtask

  // run from reset until DONE reads 1; returns cycles from reset release
  task automatic run(output longint cycles);
    logic [31:0] d;
    longint t0;
    host_write(DONE, 32'd0);
    @(negedge clk) reset = 1'b0;
    t0 = cycle;
    host_dmem_addr = DONE;
    do @(negedge clk); while (host_dmem_rdata != 32'd1 && cycle - t0 < 2_000_000);
    cycles = cycle - t0;
    check(host_dmem_rdata == 32'd1, "program reached DONE");
    @(negedge clk) reset = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  // ------------------------------------------------------------------
  task automatic directed_test();
    mips_asm a = new();
    logic [31:0] w[$], v;
    logic [31:0] expect_v[7] = '{32'd1, 32'd1, 32'd6, 32'd7, 32'd8, 32'd9, 32'd0};
    a.auto_sched = 1'b0;
    for (int pass = 0; pass < 2; pass++) begin
      a.start_pass(pass == 1);
      a.addi(1, 0, 5);
      a.addi(2, 1, 1);     // one after: old $1 = 0
      a.addi(3, 1, 1);     // two after: old $1 = 0
      a.addi(4, 1, 1);     // three after: new $1 = 5
      a.beq(0, 0, "L");
      a.addi(5, 0, 7);     // delay slot 1
      a.addi(6, 0, 8);     // delay slot 2
      a.addi(7, 0, 9);     // delay slot 3
      a.addi(8, 0, 10);    // skipped
      a.label("L");
      for (int r = 2; r <= 8; r++) a.sw(r, 'h40 + 4*(r-2), 0);
      a.addi(9, 0, 1); a.nop(); a.nop(); a.sw(9, DONE, 0);
      a.label("H"); a.j("H"); a.nop(); a.nop(); a.nop();
    end
    w = a.code;
    for (int k = 0; k < 7; k++) host_write('h40 + 4*k, 32'hDEAD_0000 + k);
    load_program(w);
    begin
      longint c;
      run(c);
    end
    for (int k = 0; k < 7; k++) begin
      host_read('h40 + 4*k, v);
      check(v == expect_v[k], $sformatf("directed word %0d = %0d, expected %0d", k, v, expect_v[k]));
    end
  endtask

  // ------------------------------------------------------------------
  task automatic hash_test(byte unsigned msg[$], int nblk_override, logic [31:0] fixed[8],
                           bit use_fixed, output longint cycles);
    byte unsigned blk[$];
    logic [31:0] dig[8], ref_dig[8], v;
    int nb;
    pad(msg, blk);
    nb = (nblk_override >= 0) ? nblk_override : blk.size() / RATE_BYTES;
    for (int i = 0; i < blk.size(); i += 4)
      host_write(MSG + i, {blk[i+3], blk[i+2], blk[i+1], blk[i]});
    host_write(NBLK, nb);
    for (int k = 0; k < 8; k++) host_write(DIG + 4*k, 32'hFFFF_FFFF);
    run(cycles);
    for (int k = 0; k < 8; k++) begin
      host_read(DIG + 4*k, v);
      dig[k] = v;
    end
    if (nblk_override < 0) begin
      sha3_256(msg, ref_dig);
      for (int k = 0; k < 8; k++)
        check(dig[k] == ref_dig[k], $sformatf("digest word %0d %h vs model %h", k, dig[k], ref_dig[k]));
      if (use_fixed)
        for (int k = 0; k < 8; k++)
          check(dig[k] == fixed[k], $sformatf("digest word %0d %h vs known %h", k, dig[k], fixed[k]));
    end else begin
      // no block absorbed: digest is the zero state
      for (int k = 0; k < 8; k++) check(dig[k] == 32'd0, "zero-block digest");
    end
  endtask

  // little-endian words of a hex digest string
  function automatic void le_words(string hex, output logic [31:0] w[8]);
    logic [7:0] b;
    for (int k = 0; k < 8; k++) begin
      w[k] = '0;
      for (int j = 0; j < 4; j++) begin
        b = 8'(hex.substr(8*k + 2*j, 8*k + 2*j + 1).atohex());
        w[k][8*j +: 8] = b;
      end
    end
  endfunction

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] prog[$], known[8];
    init_t tbl[$];
    byte unsigned m[$];
    longint c0, c1, c2, c;

    repeat (3) @(negedge clk);
    directed_test();

    build_program(prog);
    $display("SHA3-256 program: %0d words", prog.size());
    check(prog.size() <= 1024, "program fits the instruction memory");
    load_program(prog);
    build_tables(tbl);
    foreach (tbl[i]) host_write(tbl[i].addr, tbl[i].data);
    // spot checks of the generated tables against FIPS 202 values
    check(round_const(0) == 64'h0000000000000001, "RC[0]");
    check(round_const(1) == 64'h0000000000008082, "RC[1]");
    check(round_const(23) == 64'h8000000080008008, "RC[23]");
    check(rho_offset(1, 0) == 1 && rho_offset(2, 0) == 62 && rho_offset(4, 4) == 14, "rho offsets");

    m.delete();
    hash_test(m, 0, known, 1'b0, c0);
    le_words("29c7661aa1eba82a74f677e8c9d4fc2097d061b23065f10dd0198421de25875c", known);
    str_bytes("welcom", m);
    hash_test(m, -1, known, 1'b1, c1);
    $display("welcom: %0d cycles", c1);
    le_words("a7ffc6f8bf1ed76651c14756a061d662f580ff4de43b49fa82d80a4b80f8434a", known);
    m.delete();
    hash_test(m, -1, known, 1'b1, c);
    check(c == c1, "one-block cycle count is data independent");
    m.delete();
    for (int i = 0; i < 135; i++) m.push_back(8'(i * 7 + 3));
    hash_test(m, -1, known, 1'b0, c);
    check(c == c1, "135-byte message is one block");
    m.delete();
    for (int i = 0; i < 200; i++) m.push_back(8'($urandom));
    hash_test(m, -1, known, 1'b0, c2);
    $display("cycles: 0 blocks %0d, 1 block %0d, 2 blocks %0d", c0, c1, c2);
    check(c2 == c0 + 2 * (c1 - c0), "two blocks cost twice one block");

    $display("mechanisms: beq taken %0d not %0d, bne taken %0d not %0d, jump %0d, load %0d, store %0d, write-through %0d, host writes %0d",
             n_beq_t, n_beq_nt, n_bne_t, n_bne_nt, n_jump, n_load, n_store, n_wthru, n_host);
    check(n_beq_t > 0, "beq taken occurred");
    check(n_beq_nt > 0, "beq not taken occurred");
    check(n_bne_t > 0, "bne taken occurred");
    check(n_bne_nt > 0, "bne not taken occurred");
    check(n_jump > 0, "jump occurred");
    check(n_load > 0, "load occurred");
    check(n_store > 0, "store occurred");
    check(n_wthru > 0, "register write-through occurred");
    check(n_host > 0, "host load occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
