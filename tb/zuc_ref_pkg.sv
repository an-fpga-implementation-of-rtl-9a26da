// zuc_ref_pkg -- software-style reference model of ZUC for the testbenches.
//
// Written the way the cipher is specified rather than the way the RTL builds
// it: LFSR arithmetic uses 64-bit products and the % operator modulo 2^31 - 1,
// rotations are written with shifts on 64-bit values, and S1 comes from a
// brute-force inverse search. Only the S0 table is shared with the RTL (from
// zuc_pkg); the published test vectors checked in tb_zuc_core cover it.
package zuc_ref_pkg;

  localparam longint unsigned P31 = 64'h7FFF_FFFF;

  localparam int unsigned D_REF [16] = '{
    'h44D7, 'h26BC, 'h626B, 'h135E, 'h5789, 'h35E2, 'h7135, 'h09AF,
    'h4D78, 'h2F13, 'h6BC4, 'h1AF1, 'h5E26, 'h3C4D, 'h789A, 'h47AC
  };

  function automatic int unsigned rot32(int unsigned x, int n);
    longint unsigned y;
    y = {32'h0, x} << n;
    return y[31:0] | y[63:32];
  endfunction

  function automatic int unsigned ref_l1(int unsigned x);
    return x ^ rot32(x, 2) ^ rot32(x, 10) ^ rot32(x, 18) ^ rot32(x, 24);
  endfunction

  function automatic int unsigned ref_l2(int unsigned x);
    return x ^ rot32(x, 8) ^ rot32(x, 14) ^ rot32(x, 22) ^ rot32(x, 30);
  endfunction

  // GF(2^8) product modulo 0x18B, written as polynomial multiply then reduce.
  function automatic int unsigned pmul(int unsigned a, int unsigned b);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 8; i++) if (b[i]) r ^= a << i;
    for (int i = 14; i >= 8; i--) if (r[i]) r ^= 'h18B << (i - 8);
    return r;
  endfunction

  function automatic int unsigned ref_s1(int unsigned x);
    int unsigned v, r;
    localparam int unsigned COL [8] = '{'h97, 'h3E, 'h6D, 'hCB, 'hEE, 'hDD, 'hBB, 'h77};
    v = 0;
    if (x != 0) for (int y = 1; y < 256; y++) if (pmul(x, y) == 1) v = y;
    r = 'h55;
    for (int i = 0; i < 8; i++) if (v[i]) r ^= COL[i];
    return r;
  endfunction

  function automatic int unsigned ref_s(int unsigned x);
    return {zuc_pkg::S0_TABLE[x[31:24]], 8'(ref_s1(x[23:16])),
            zuc_pkg::S0_TABLE[x[15:8]],  8'(ref_s1(x[7:0]))};
  endfunction

  class zuc_model;
    longint unsigned s[16];
    int unsigned r1, r2, x0, x1, x2, x3;

    function void load(bit [127:0] key, bit [127:0] iv);
      for (int i = 0; i < 16; i++)
        s[i] = (longint'(key[127-8*i -: 8]) << 23) | (longint'(D_REF[i]) << 8) | longint'(iv[127-8*i -: 8]);
      r1 = 0;
      r2 = 0;
    endfunction

    function void br();
      x0 = {s[15][30:15], s[14][15:0]};
      x1 = {s[11][15:0],  s[9][30:15]};
      x2 = {s[7][15:0],   s[5][30:15]};
      x3 = {s[2][15:0],   s[0][30:15]};
    endfunction

    function int unsigned f();
      int unsigned w, w1, w2;
      w  = (x0 ^ r1) + r2;
      w1 = r1 + x1;
      w2 = r2 ^ x2;
      r1 = ref_s(ref_l1({w1[15:0], w2[31:16]}));
      r2 = ref_s(ref_l2({w2[15:0], w1[31:16]}));
      return w;
    endfunction

    function longint unsigned feedback();
      return ((longint'(1) << 15) * s[15] + (longint'(1) << 17) * s[13] +
              (longint'(1) << 21) * s[10] + (longint'(1) << 20) * s[4] +
              (longint'(257)) * s[0]) % P31;
    endfunction

    function void shift(longint unsigned v);
      if (v == 0) v = P31;
      for (int i = 0; i < 15; i++) s[i] = s[i+1];
      s[15] = v;
    endfunction

    function void init(bit [127:0] key, bit [127:0] iv);
      int unsigned w;
      load(key, iv);
      for (int i = 0; i < 32; i++) begin
        br();
        w = f();
        shift((feedback() + (longint'(w) >> 1)) % P31);
      end
      br();
      void'(f());
      shift(feedback());
    endfunction

    function int unsigned next_word();
      int unsigned z;
      br();
      z = f() ^ x3;
      shift(feedback());
      return z;
    endfunction
  endclass

endpackage
