// zuc_sbox -- the 32x32 S-box S = (S0, S1, S0, S1) of ZUC.
//
// The input word is cut into four bytes; the most significant byte and the third
// byte go through S0, the second and the least significant byte through S1
// (the document: "S = (S0, S1, S2, S3), where S0 = S2, S1 = S3"). Each 8x8 box
// is a 256-entry constant table from zuc_pkg, a small ROM (LUTs on an FPGA).
// S0 is the specification's table; S1 is generated at elaboration time from its
// algebraic definition. Combinational.
module zuc_sbox
  import zuc_pkg::*;
(
  input  word_t x,
  output word_t y
);

  assign y = {S0_TABLE[x[31:24]], S1_TABLE[x[23:16]],
              S0_TABLE[x[15:8]],  S1_TABLE[x[7:0]]};

endmodule
