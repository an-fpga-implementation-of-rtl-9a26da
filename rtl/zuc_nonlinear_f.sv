// zuc_nonlinear_f -- bit reorganisation and the nonlinear function F of ZUC,
// with F's memory cells R1 and R2.
//
// Bit reorganisation is wiring from the LFSR cells (H = bits 30..15, L = bits
// 15..0 of a 31-bit cell):
//   X0 = s15H || s14L,  X1 = s11L || s9H,  X2 = s7L || s5H,  X3 = s2L || s0H
// F then computes (+ is addition modulo 2^32):
//   W  = (X0 ^ R1) + R2
//   W1 = R1 + X1,  W2 = R2 ^ X2
//   R1 <= S(L1(W1L || W2H)),  R2 <= S(L2(W2L || W1H))   on `step`
// and the keystream word is Z = W ^ X3. As the document proposes, the two
// layers are merged into one clock cycle: the longest path is a 32-bit adder,
// a linear transform and an S-box lookup, and W is the one of the two results
// that feeds the LFSR during initialisation.
//
// Interface: `state` is the LFSR; `w` and `z` are combinational from `state`,
// R1 and R2. `clear` (priority) zeroes R1 and R2 at key loading; `step` updates
// them at the rising clock edge.
module zuc_nonlinear_f
  import zuc_pkg::*;
(
  input  logic   clk,
  input  logic   clear,
  input  logic   step,
  input  state_t state,
  output word_t  w,
  output word_t  z
);

  word_t r1_q, r2_q;
  word_t x0, x1, x2, x3;
  word_t w1, w2, l1_out, l2_out, r1_d, r2_d;

  // bit reorganisation
  assign x0 = {state[15][30:15], state[14][15:0]};
  assign x1 = {state[11][15:0],  state[9][30:15]};
  assign x2 = {state[7][15:0],   state[5][30:15]};
  assign x3 = {state[2][15:0],   state[0][30:15]};

  // nonlinear function
  assign w  = (x0 ^ r1_q) + r2_q;
  assign z  = w ^ x3;
  assign w1 = r1_q + x1;
  assign w2 = r2_q ^ x2;

  zuc_linear #(.SEL(1)) u_l1 (.x({w1[15:0], w2[31:16]}), .y(l1_out));
  zuc_linear #(.SEL(2)) u_l2 (.x({w2[15:0], w1[31:16]}), .y(l2_out));
  zuc_sbox u_s1 (.x(l1_out), .y(r1_d));
  zuc_sbox u_s2 (.x(l2_out), .y(r2_d));

  always_ff @(posedge clk) begin
    if (clear) begin
      r1_q <= '0;
      r2_q <= '0;
    end else if (step) begin
      r1_q <= r1_d;
      r2_q <= r2_d;
    end
  end

endmodule
