// zuc_core -- ZUC keystream generator, one 32-bit word per clock cycle.
//
// The three layers of the cipher are all evaluated in one cycle: the LFSR
// (zuc_lfsr) holds the state; bit reorganisation and the nonlinear function
// (both in zuc_nonlinear_f) compute W and the keystream word Z = W ^ X3 from the
// cells and F's registers R1, R2. During initialisation W >> 1 is fed back into
// the LFSR. Key loading (zuc_pkg::key_load) forms the initial cells
// s_i = k_i || d_i || iv_i, written into the LFSR in the cycle after `start`.
// zuc_ctrl sequences key loading, 32 initialisation rounds and one discarded
// round.
//
// Interface: pulse `start` with `key` and `iv` stable in that cycle and the next
// (they are loaded one cycle later; byte 0 is bits 127:120). `busy` is high while
// initialising. Then `ks_word` is valid while `ks_valid` is high and advances on
// every cycle with `ks_ready` high: 32 bits per cycle, 2.08 Gbit/s at 65 MHz as
// in the document. First word: INIT_ROUNDS + 3 cycles after `start`.
// Bit 0 of W is unused by design: initialisation feeds back u = W >> 1.
module zuc_core
  import zuc_pkg::*;
#(
  parameter int unsigned INIT_ROUNDS = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  output logic         busy,
  output logic         ks_valid,
  input  logic         ks_ready,
  output word_t        ks_word
);

  state_t init_state, state;
  word_t  w;
  logic   load, step, init_mode;

  zuc_ctrl #(.INIT_ROUNDS(INIT_ROUNDS)) u_ctrl (
    .clk, .rst_n, .start, .ks_ready,
    .load, .step, .init_mode, .busy, .ks_valid
  );

  assign init_state = key_load(key, iv);

  zuc_lfsr u_lfsr (
    .clk, .load, .load_state(init_state), .step, .init_mode,
    .u(w[31:1]), .state
  );

  zuc_nonlinear_f u_f (.clk, .clear(load), .step, .state, .w, .z(ks_word));

  // Keystream must not change while it is offered and not taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (ks_valid && !ks_ready && !start) |=> (ks_valid && $stable(ks_word));
  endproperty
  assert property (p_hold);

endmodule
