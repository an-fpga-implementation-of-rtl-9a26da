// tb_zuc_nonlinear_f -- drives random LFSR states through bit reorganisation and
// F and compares W and Z = W ^ X3 with the reference model, cycle after cycle,
// so that wrong R1, R2 updates show up in the next W. Also checks that `clear`
// zeroes R1, R2 and that they hold when `step` is low.
module tb_zuc_nonlinear_f;
  import zuc_pkg::*;
  import zuc_ref_pkg::*;

  logic   clk = 0;
  logic   clear = 0, step = 0;
  state_t state;
  word_t  w, z;
  int     checks = 0, failures = 0;

  zuc_nonlinear_f dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic zuc_model m = new();
    int unsigned exp_w, exp_z;
    @(negedge clk);
    clear = 1;
    m.r1 = 0; m.r2 = 0;
    @(negedge clk);
    clear = 0;
    for (int r = 0; r < 2000; r++) begin
      for (int i = 0; i < 16; i++) begin
        state[i] = cell_t'($urandom);
        m.s[i] = longint'(state[i]);
      end
      step = ($urandom_range(0, 3) != 0);
      m.br();
      #1;
      if (step) exp_w = m.f();
      else      exp_w = (m.x0 ^ m.r1) + m.r2;
      exp_z = exp_w ^ m.x3;
      checks += 2;
      if (w !== exp_w) begin
        failures++;
        $display("FAIL cycle %0d: W %08h exp %08h", r, w, exp_w);
      end
      if (z !== exp_z) begin
        failures++;
        $display("FAIL cycle %0d: Z %08h exp %08h", r, z, exp_z);
      end
      @(negedge clk);
      if (r == 1000) begin
        clear = 1; m.r1 = 0; m.r2 = 0;
        @(negedge clk);
        clear = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
