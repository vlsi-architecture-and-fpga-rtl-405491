// ice_ref_pkg: behavioural reference model of the ICE cipher for the testbenches.
//
// Written the way a software implementation works, independently of the RTL: GF(2^8)
// products by shift-and-reduce (no Montgomery arithmetic), the key schedule one bit at a
// time with complemented re-insertion, and the cipher as the two-rounds-per-iteration loop
// of the ICE specification. Its tables are transcribed separately from the RTL package.
package ice_ref_pkg;

  typedef struct packed {
    logic [19:0] perm;
    logic [19:0] k0;
    logic [19:0] k1;
  } ref_subkey_t;

  typedef ref_subkey_t ref_sched_t [16];

  function automatic int ref_xor(int s, int row);
    int t [16] = '{'h83, 'h85, 'h9b, 'hcd, 'hcc, 'ha7, 'had, 'h41,
                   'h4b, 'h2e, 'hd4, 'h33, 'hea, 'hcb, 'h2e, 'h04};
    return t[s*4 + row];
  endfunction

  function automatic int ref_mod(int s, int row);
    int t [16] = '{333, 313, 505, 369, 379, 375, 319, 391,
                   361, 445, 451, 397, 397, 425, 395, 505};
    return t[s*4 + row];
  endfunction

  // Product of a and b in GF(2)[x] reduced modulo the degree-8 polynomial m.
  function automatic int gf_mul(int a, int b, int m);
    int res = 0;
    while (b != 0) begin
      if ((b & 1) != 0) res ^= a;
      a = a << 1;
      b = b >> 1;
      if (a >= 256) a ^= m;
    end
    return res;
  endfunction

  function automatic int gf_exp7(int b, int m);
    int x;
    if (b == 0) return 0;
    x = gf_mul(b, b, m);       // b^2
    x = gf_mul(b, x, m);       // b^3
    x = gf_mul(x, x, m);       // b^6
    return gf_mul(b, x, m);    // b^7
  endfunction

  // Raw 8-bit output of S-box s (0..3) for the 10-bit input x.
  function automatic int ref_sbox(int s, int x);
    int row = ((x >> 8) & 2) | (x & 1);
    int col = (x >> 1) & 'hff;
    return gf_exp7(col ^ ref_xor(s, row), ref_mod(s, row));
  endfunction

  function automatic logic [31:0] ref_pbox(logic [31:0] x);
    logic [31:0] pb [32] = '{
      32'h00000001, 32'h00000080, 32'h00000400, 32'h00002000,
      32'h00080000, 32'h00200000, 32'h01000000, 32'h40000000,
      32'h00000008, 32'h00000020, 32'h00000100, 32'h00004000,
      32'h00010000, 32'h00800000, 32'h04000000, 32'h20000000,
      32'h00000004, 32'h00000010, 32'h00000200, 32'h00008000,
      32'h00020000, 32'h00400000, 32'h08000000, 32'h10000000,
      32'h00000002, 32'h00000040, 32'h00000800, 32'h00001000,
      32'h00040000, 32'h00100000, 32'h02000000, 32'h80000000};
    logic [31:0] r = '0;
    for (int i = 0; i < 32; i++) if (x[i]) r |= pb[i];
    return r;
  endfunction

  function automatic logic [31:0] ref_f(logic [31:0] p, ref_subkey_t sk);
    logic [31:0] tl, tr, al, ar;
    tl = ((p >> 16) & 32'h3ff) | (((p >> 14) | (p << 18)) & 32'hffc00);
    tr = (p & 32'h3ff) | ((p << 2) & 32'hffc00);
    al = {12'b0, sk.perm} & (tl ^ tr);
    ar = al ^ tr;
    al = al ^ tl;
    al = al ^ {12'b0, sk.k0};
    ar = ar ^ {12'b0, sk.k1};
    return ref_pbox({8'(ref_sbox(0, int'(al >> 10))), 8'(ref_sbox(1, int'(al & 32'h3ff))),
                     8'(ref_sbox(2, int'(ar >> 10))), 8'(ref_sbox(3, int'(ar & 32'h3ff)))});
  endfunction

  function automatic ref_sched_t ref_key_schedule(logic [63:0] key);
    int rot [16] = '{0, 1, 2, 3, 2, 1, 3, 0, 1, 3, 2, 0, 3, 1, 0, 2};
    logic [15:0] kb [4];
    logic [19:0] v [3];
    ref_sched_t ks;
    for (int i = 0; i < 4; i++) kb[3-i] = key[63-16*i -: 16];
    for (int i = 0; i < 16; i++) begin
      v[0] = '0; v[1] = '0; v[2] = '0;
      for (int j = 0; j < 15; j++)
        for (int k = 0; k < 4; k++) begin
          int w = (rot[i] + k) & 3;
          logic b = kb[w][0];
          v[j % 3] = {v[j % 3][18:0], b};
          kb[w] = {~b, kb[w][15:1]};
        end
      ks[i] = '{perm: v[2], k0: v[0], k1: v[1]};
    end
    return ks;
  endfunction

  function automatic logic [63:0] ref_cipher(logic [63:0] key, logic [63:0] din, bit dec);
    ref_sched_t ks = ref_key_schedule(key);
    logic [31:0] l = din[63:32], r = din[31:0];
    if (!dec)
      for (int i = 0; i < 16; i += 2) begin
        l ^= ref_f(r, ks[i]);
        r ^= ref_f(l, ks[i+1]);
      end
    else
      for (int i = 15; i > 0; i -= 2) begin
        l ^= ref_f(r, ks[i]);
        r ^= ref_f(l, ks[i-1]);
      end
    return {r, l};
  endfunction

endpackage
