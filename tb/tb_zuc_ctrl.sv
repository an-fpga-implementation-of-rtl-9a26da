// tb_zuc_ctrl -- checks the sequencer's timing: one load cycle, INIT_ROUNDS
// steps in initialisation mode, one discarded working step, then ks_valid with
// a step exactly on the cycles where ks_ready is high; restart while running;
// reset back to idle.
module tb_zuc_ctrl;
  logic clk = 0, rst_n = 0, start = 0, ks_ready = 0;
  logic load, step, init_mode, busy, ks_valid;
  int   checks = 0, failures = 0;

  zuc_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sequence();
    int inits = 0, loads = 0, drops = 0;
    @(negedge clk);
    start = 1;
    #1;
    check(!step, "no step in the start cycle");
    @(negedge clk);
    start = 0;
    // load cycle
    check(load && busy && !step && !ks_valid, "load cycle");
    @(negedge clk);
    for (int i = 0; i < 40 && !ks_valid; i++) begin
      if (init_mode) begin
        inits++;
        check(step && busy && !load, "init step");
      end else if (busy) begin
        drops++;
        check(step && !init_mode, "discarded working step");
      end
      @(negedge clk);
    end
    check(inits == 32, $sformatf("%0d init rounds", inits));
    check(drops == 1, $sformatf("%0d discarded rounds", drops));
    check(ks_valid && !busy, "keystream valid after initialisation");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!busy && !ks_valid && !step && !load, "idle after reset");
    rst_n = 1;
    @(negedge clk);
    check(!busy && !ks_valid && !step, "idle without start");
    run_sequence();
    for (int i = 0; i < 100; i++) begin
      ks_ready = 1'($urandom_range(0, 1));
      #1;
      check(ks_valid && (step == ks_ready), "step follows ks_ready");
      @(negedge clk);
    end
    ks_ready = 1;
    run_sequence();  // restart while running
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    #1;
    check(!ks_valid && !busy, "idle after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
