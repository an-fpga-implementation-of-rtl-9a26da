// tb_zuc_lfsr -- checks the LFSR against the reference model's modular
// arithmetic (64-bit sums and %): random states in both modes, a run of
// consecutive steps, a held state when `step` is low, and the s16 = 0 -> 2^31-1
// rule (an all-zero state with u = 0 in initialisation mode).
module tb_zuc_lfsr;
  import zuc_pkg::*;
  import zuc_ref_pkg::*;

  logic   clk = 0;
  logic   load = 0, step = 0, init_mode = 0;
  state_t load_state;
  cell_t  u = '0;
  state_t state;
  int     checks = 0, failures = 0;
  int     zero_hits = 0;

  zuc_lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(zuc_model m, string what);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (longint'(state[i]) != m.s[i]) begin
        failures++;
        $display("FAIL %s cell %0d: got %08h exp %08h", what, i, state[i], m.s[i]);
      end
    end
  endtask

  initial begin
    automatic zuc_model m = new();
    for (int r = 0; r < 300; r++) begin
      bit im;
      im = r[0];
      for (int i = 0; i < 16; i++) begin
        // include cells equal to 2^31-1 (zero modulo p) now and then
        load_state[i] = ($urandom_range(0, 15) == 0) ? '1 : cell_t'($urandom | 1);
        m.s[i] = longint'(load_state[i]);
      end
      @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      check_state(m, "load");
      // several consecutive steps
      for (int k = 0; k < 4; k++) begin
        u = cell_t'($urandom);
        init_mode = im;
        step = 1;
        if (im) m.shift((m.feedback() + longint'(u)) % P31);
        else    m.shift(m.feedback());
        @(negedge clk);
        step = 0;
        check_state(m, im ? "init step" : "work step");
      end
      // held without step
      @(negedge clk);
      check_state(m, "hold");
    end
    // zero state: s16 must become 2^31 - 1
    for (int i = 0; i < 16; i++) load_state[i] = '0;
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0; step = 1; init_mode = 1; u = '0;
    @(negedge clk);
    step = 0;
    checks++;
    if (state[15] !== 31'h7FFF_FFFF) begin
      failures++;
      $display("FAIL zero feedback gave %08h", state[15]);
    end else zero_hits++;
    $display("zero-feedback cases: %0d", zero_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
