// zuc_ctrl -- sequencer of the ZUC keystream generator.
//
// States:
//   IDLE  : waits for `start`.
//   LOAD  : one cycle; key loading writes the LFSR and clears R1, R2.
//   INIT  : INIT_ROUNDS cycles of initialisation mode (LFSR adds W >> 1).
//   DROP  : one working-mode round whose F output is discarded.
//   RUN   : working stage; `ks_valid` is high and the generator advances one
//           round in every cycle in which `ks_ready` is high. `ks_ready` low
//           stalls it (state held).
// `start` is accepted in any state and restarts the sequence, so a new key can
// be loaded at any time. Timing: `start` in cycle 0, LOAD in cycle 1, first
// valid keystream word in cycle INIT_ROUNDS + 3, then one word per cycle.
// The two stages follow the document; the 32 rounds and the discarded round are
// the ZUC specification's; the encoding and the valid/ready handshake are this
// design's own.
module zuc_ctrl #(
  parameter int unsigned INIT_ROUNDS = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic ks_ready,
  output logic load,
  output logic step,
  output logic init_mode,
  output logic busy,
  output logic ks_valid
);

  typedef enum logic [2:0] {IDLE, LOAD, INIT, DROP, RUN} state_e;

  localparam int CW = $clog2(INIT_ROUNDS + 1);

  state_e        st_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q  <= IDLE;
      cnt_q <= '0;
    end else if (start) begin
      st_q  <= LOAD;
      cnt_q <= '0;
    end else begin
      unique case (st_q)
        IDLE: ;
        LOAD: st_q <= INIT;
        INIT: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == CW'(INIT_ROUNDS - 1)) st_q <= DROP;
        end
        DROP: st_q <= RUN;
        RUN:  ;
        default: st_q <= IDLE;
      endcase
    end
  end

  always_comb begin
    load      = (st_q == LOAD);
    init_mode = (st_q == INIT);
    busy      = (st_q == LOAD) || (st_q == INIT) || (st_q == DROP);
    ks_valid  = (st_q == RUN);
    step      = !start && ((st_q == INIT) || (st_q == DROP) || ((st_q == RUN) && ks_ready));
  end

endmodule
