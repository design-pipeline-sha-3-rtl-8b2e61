// sha3_ref_pkg: reference model of SHA3-256 and the constant tables the
// MIPS program reads, all computed from the FIPS 202 definitions.
//
//   round constant bit j of round ir = rc(j + 7*ir) placed at bit 2^j - 1,
//     rc() being the LFSR x^8 + x^6 + x^5 + x^4 + 1 from FIPS 202;
//   rho offset of lane (x,y): walk (x,y) = (1,0), (x,y) <- (y, 2x+3y mod 5)
//     for t = 0..23, offset = (t+1)(t+2)/2 mod 64;
//   pi moves lane (x,y) to (y, 2x+3y mod 5).
// Lane (x,y) is the 64-bit word at byte 8*(x+5y) of the state, least
// significant 32-bit half first.
package sha3_ref_pkg;

  typedef logic [63:0] lane_t;
  typedef lane_t       state_t [25];

  localparam int RATE_BYTES = 136;   // SHA3-256: r = 1088, c = 512

  function automatic bit rc_bit(int t);
    logic [8:0] r;
    if (t % 255 == 0) return 1'b1;
    r = 9'h001;
    for (int i = 1; i <= t % 255; i++) begin
      r = {r[7:0], 1'b0};
      r[0] ^= r[8];
      r[4] ^= r[8];
      r[5] ^= r[8];
      r[6] ^= r[8];
    end
    return r[0];
  endfunction

  function automatic lane_t round_const(int ir);
    lane_t c = '0;
    for (int j = 0; j < 7; j++) c[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return c;
  endfunction

  function automatic int rho_offset(int x, int y);
    int cx = 1, cy = 0, nx;
    if (x == 0 && y == 0) return 0;
    for (int t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return ((t + 1) * (t + 2) / 2) % 64;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

  function automatic lane_t rotl(lane_t v, int n);
    if (n % 64 == 0) return v;
    return (v << (n % 64)) | (v >> (64 - n % 64));
  endfunction

  function automatic void keccak_f(ref state_t a);
    lane_t c[5], d[5], b[25];
    for (int ir = 0; ir < 24; ir++) begin
      for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
      for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
      for (int i = 0; i < 25; i++) a[i] ^= d[i%5];
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], rho_offset(x, y));
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++)
          a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
      a[0] ^= round_const(ir);
    end
  endfunction

  // SHA3-256 padding: m || 0x06 || 0* || 0x80 (0x86 if they coincide)
  function automatic void pad(input byte unsigned msg[$], output byte unsigned blk[$]);
    int n;
    blk = msg;
    n = RATE_BYTES - (msg.size() % RATE_BYTES);
    for (int i = 0; i < n; i++) blk.push_back(8'h00);
    blk[msg.size()]    ^= 8'h06;
    blk[blk.size() - 1] ^= 8'h80;
  endfunction

  // digest as 8 little-endian words (word k = bytes 4k..4k+3)
  function automatic void sha3_256(input byte unsigned msg[$], output logic [31:0] dig[8]);
    byte unsigned blk[$];
    state_t a;
    lane_t v;
    pad(msg, blk);
    foreach (a[i]) a[i] = '0;
    for (int b = 0; b < blk.size() / RATE_BYTES; b++) begin
      for (int l = 0; l < RATE_BYTES / 8; l++) begin
        v = '0;
        for (int k = 0; k < 8; k++) v[8*k +: 8] = blk[b*RATE_BYTES + 8*l + k];
        a[l] ^= v;
      end
      keccak_f(a);
    end
    for (int k = 0; k < 8; k++) dig[k] = a[k/2][32*(k%2) +: 32];
  endfunction

  function automatic void str_bytes(input string s, output byte unsigned q[$]);
    q.delete();
    for (int i = 0; i < s.len(); i++) q.push_back(s[i]);
  endfunction

endpackage
