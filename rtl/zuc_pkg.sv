// zuc_pkg -- types, constants and helper functions shared by the ZUC keystream
// generator.
//
// Contents:
//   * cell_t / state_t   : one 31-bit LFSR cell and the 16-cell LFSR state.
//   * D_CONST            : the sixteen 15-bit constants that key loading places
//                          between each key byte and IV byte (ZUC specification).
//   * S0_TABLE           : the 8x8 S-box S0 (ZUC specification table).
//   * S1_TABLE           : the 8x8 S-box S1, computed at elaboration time from its
//                          algebraic definition, S1(x) = A * x^-1 xor 0x55 in
//                          GF(2^8) with modulus x^8+x^7+x^3+x+1, x^-1 of 0 taken as 0.
//                          A is the 8x8 bit matrix whose column i (the image of
//                          bit i) is S1_AFFINE_COL[i].
//   * add_mod31 / rol31  : addition modulo 2^31-1 (end-around carry) and
//                          multiplication by 2^k modulo 2^31-1 (31-bit rotation).
//   * rol32              : 32-bit left rotation used by the linear transforms.
//   * key_load           : key loading, s_i = k_i || d_i || iv_i (byte 0 of key
//                          and IV is bits 127:120).
// The document describing this design refers to the official cipher specification
// for S0, S1, L1, L2 and the key-loading constants; the values here are those of
// the specification.
package zuc_pkg;

  typedef logic [30:0] cell_t;
  typedef cell_t       state_t [16];
  typedef logic [31:0] word_t;
  typedef logic [7:0]  byte_t;

  localparam logic [14:0] D_CONST [16] = '{
    15'h44D7, 15'h26BC, 15'h626B, 15'h135E, 15'h5789, 15'h35E2, 15'h7135, 15'h09AF,
    15'h4D78, 15'h2F13, 15'h6BC4, 15'h1AF1, 15'h5E26, 15'h3C4D, 15'h789A, 15'h47AC
  };

  localparam byte_t S0_TABLE [256] = '{
    8'h3e, 8'h72, 8'h5b, 8'h47, 8'hca, 8'he0, 8'h00, 8'h33, 8'h04, 8'hd1, 8'h54, 8'h98, 8'h09, 8'hb9, 8'h6d, 8'hcb,
    8'h7b, 8'h1b, 8'hf9, 8'h32, 8'haf, 8'h9d, 8'h6a, 8'ha5, 8'hb8, 8'h2d, 8'hfc, 8'h1d, 8'h08, 8'h53, 8'h03, 8'h90,
    8'h4d, 8'h4e, 8'h84, 8'h99, 8'he4, 8'hce, 8'hd9, 8'h91, 8'hdd, 8'hb6, 8'h85, 8'h48, 8'h8b, 8'h29, 8'h6e, 8'hac,
    8'hcd, 8'hc1, 8'hf8, 8'h1e, 8'h73, 8'h43, 8'h69, 8'hc6, 8'hb5, 8'hbd, 8'hfd, 8'h39, 8'h63, 8'h20, 8'hd4, 8'h38,
    8'h76, 8'h7d, 8'hb2, 8'ha7, 8'hcf, 8'hed, 8'h57, 8'hc5, 8'hf3, 8'h2c, 8'hbb, 8'h14, 8'h21, 8'h06, 8'h55, 8'h9b,
    8'he3, 8'hef, 8'h5e, 8'h31, 8'h4f, 8'h7f, 8'h5a, 8'ha4, 8'h0d, 8'h82, 8'h51, 8'h49, 8'h5f, 8'hba, 8'h58, 8'h1c,
    8'h4a, 8'h16, 8'hd5, 8'h17, 8'ha8, 8'h92, 8'h24, 8'h1f, 8'h8c, 8'hff, 8'hd8, 8'hae, 8'h2e, 8'h01, 8'hd3, 8'had,
    8'h3b, 8'h4b, 8'hda, 8'h46, 8'heb, 8'hc9, 8'hde, 8'h9a, 8'h8f, 8'h87, 8'hd7, 8'h3a, 8'h80, 8'h6f, 8'h2f, 8'hc8,
    8'hb1, 8'hb4, 8'h37, 8'hf7, 8'h0a, 8'h22, 8'h13, 8'h28, 8'h7c, 8'hcc, 8'h3c, 8'h89, 8'hc7, 8'hc3, 8'h96, 8'h56,
    8'h07, 8'hbf, 8'h7e, 8'hf0, 8'h0b, 8'h2b, 8'h97, 8'h52, 8'h35, 8'h41, 8'h79, 8'h61, 8'ha6, 8'h4c, 8'h10, 8'hfe,
    8'hbc, 8'h26, 8'h95, 8'h88, 8'h8a, 8'hb0, 8'ha3, 8'hfb, 8'hc0, 8'h18, 8'h94, 8'hf2, 8'he1, 8'he5, 8'he9, 8'h5d,
    8'hd0, 8'hdc, 8'h11, 8'h66, 8'h64, 8'h5c, 8'hec, 8'h59, 8'h42, 8'h75, 8'h12, 8'hf5, 8'h74, 8'h9c, 8'haa, 8'h23,
    8'h0e, 8'h86, 8'hab, 8'hbe, 8'h2a, 8'h02, 8'he7, 8'h67, 8'he6, 8'h44, 8'ha2, 8'h6c, 8'hc2, 8'h93, 8'h9f, 8'hf1,
    8'hf6, 8'hfa, 8'h36, 8'hd2, 8'h50, 8'h68, 8'h9e, 8'h62, 8'h71, 8'h15, 8'h3d, 8'hd6, 8'h40, 8'hc4, 8'he2, 8'h0f,
    8'h8e, 8'h83, 8'h77, 8'h6b, 8'h25, 8'h05, 8'h3f, 8'h0c, 8'h30, 8'hea, 8'h70, 8'hb7, 8'ha1, 8'he8, 8'ha9, 8'h65,
    8'h8d, 8'h27, 8'h1a, 8'hdb, 8'h81, 8'hb3, 8'ha0, 8'hf4, 8'h45, 8'h7a, 8'h19, 8'hdf, 8'hee, 8'h78, 8'h34, 8'h60
  };

  // Multiplication in GF(2^8) modulo x^8+x^7+x^3+x+1 (0x18B).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    logic [8:0] aa;
    byte_t      r;
    aa = {1'b0, a};
    r  = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r = r ^ aa[7:0];
      aa = aa << 1;
      if (aa[8]) aa = aa ^ 9'h18B;
    end
    return r;
  endfunction

  // Multiplicative inverse as x^254 (x^-1 of 0 is 0).
  function automatic byte_t gf_inv(byte_t x);
    byte_t r, p;
    r = 8'h01;
    p = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, p);  // 254 = 0b11111110: bits 1..7 set
      p = gf_mul(p, p);
    end
    return r;
  endfunction

  localparam byte_t S1_AFFINE_COL [8] = '{8'h97, 8'h3E, 8'h6D, 8'hCB, 8'hEE, 8'hDD, 8'hBB, 8'h77};

  function automatic byte_t s1_value(byte_t x);
    byte_t v, r;
    v = gf_inv(x);
    r = 8'h55;
    for (int i = 0; i < 8; i++)
      if (v[i]) r = r ^ S1_AFFINE_COL[i];
    return r;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t gen_s1_table();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = s1_value(byte_t'(i));
    return t;
  endfunction

  localparam sbox_table_t S1_TABLE = gen_s1_table();

  // (a + b) mod (2^31 - 1) for a, b < 2^31.
  function automatic cell_t add_mod31(cell_t a, cell_t b);
    logic [31:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[30:0] + cell_t'(s[31]);
  endfunction

  // (2^k * a) mod (2^31 - 1) = 31-bit left rotation by k.
  function automatic cell_t rol31(cell_t a, int unsigned k);
    return (a << k) | (a >> (31 - k));
  endfunction

  function automatic word_t rol32(word_t a, int unsigned k);
    return (a << k) | (a >> (32 - k));
  endfunction

  // Key loading: expands key and IV into the 16 initial LFSR cells.
  function automatic state_t key_load(logic [127:0] key, logic [127:0] iv);
    state_t s;
    for (int i = 0; i < 16; i++)
      s[i] = {key[127 - 8*i -: 8], D_CONST[i], iv[127 - 8*i -: 8]};
    return s;
  endfunction

endpackage
