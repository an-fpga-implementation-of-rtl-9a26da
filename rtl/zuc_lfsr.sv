// zuc_lfsr -- the 16-stage LFSR of ZUC over GF(2^31 - 1).
//
// Sixteen 31-bit cells s0..s15. Each step computes
//   v   = 2^15 s15 + 2^17 s13 + 2^21 s10 + 2^20 s4 + (1 + 2^8) s0  mod (2^31 - 1)
//   s16 = v + u mod (2^31 - 1)   in initialisation mode (u = W >> 1 from F)
//   s16 = v                      in working mode
// replaces s16 = 0 by 2^31 - 1, and shifts: s0 <- s1, ..., s15 <- s16.
// Multiplication by 2^k modulo 2^31 - 1 is a 31-bit rotation, and each modular
// addition is a 32-bit addition with its carry folded back into bit 0. The six
// terms are summed as a balanced tree (three levels), so a new s16 is produced
// and shifted in every clock cycle, as the document requires for one keystream
// word per cycle.
//
// Interface: `load` (priority over `step`) copies `load_state` into the cells;
// `step` advances one round at the rising clock edge. `state` shows the cells.
// No reset: the cells are always written by `load` before use.
module zuc_lfsr
  import zuc_pkg::*;
(
  input  logic   clk,
  input  logic   load,
  input  state_t load_state,
  input  logic   step,
  input  logic   init_mode,
  input  cell_t  u,
  output state_t state
);

  state_t s_q;
  cell_t  t0, t1, t2, t3, t4;
  cell_t  a0, a1, a2, b0, b1, v;
  cell_t  s16;

  always_comb begin
    t0 = rol31(s_q[15], 15);
    t1 = rol31(s_q[13], 17);
    t2 = rol31(s_q[10], 21);
    t3 = rol31(s_q[4],  20);
    t4 = rol31(s_q[0],  8);
    a0 = add_mod31(t0, t1);
    a1 = add_mod31(t2, t3);
    a2 = add_mod31(t4, s_q[0]);
    b0 = add_mod31(a0, a1);
    b1 = init_mode ? add_mod31(a2, u) : a2;  // u only in init mode
    v  = add_mod31(b0, b1);
    s16 = (v == '0) ? cell_t'('1) : v;
  end

  always_ff @(posedge clk) begin
    if (load) begin
      s_q <= load_state;
    end else if (step) begin
      for (int i = 0; i < 15; i++) s_q[i] <= s_q[i+1];
      s_q[15] <= s16;
    end
  end

  assign state = s_q;

endmodule
