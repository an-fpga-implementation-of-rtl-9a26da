// tb_zuc_core -- self-checking testbench of the ZUC keystream generator.
//
// 1. Published ZUC test vectors (all-zero and all-one key/IV): first two words.
// 2. Random keys/IVs against the reference model in zuc_ref_pkg, 64 words each,
//    with ks_ready held high: checks that the first word comes INIT_ROUNDS + 3
//    cycles after start and that then one word arrives in every cycle
//    (32 bit/cycle, i.e. 2.08 Gbit/s at 65 MHz).
// 3. Random ks_ready (stalls) against the model.
// 4. Restart with a new key in the middle of keystream output.
module tb_zuc_core;
  import zuc_pkg::*;
  import zuc_ref_pkg::*;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         start = 0;
  logic [127:0] key = '0, iv = '0;
  logic         busy, ks_valid, ks_ready = 0;
  word_t        ks_word;
  int           checks = 0, failures = 0;
  int           cycle = 0;

  zuc_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_start(logic [127:0] k, logic [127:0] v);
    @(negedge clk);
    key = k; iv = v; start = 1;
    @(negedge clk);
    start = 0;
  endtask

  // Collect n words; when `rand_ready` is set, ks_ready toggles randomly.
  task automatic collect(int n, bit rand_ready, zuc_model m, string tag);
    int got = 0;
    while (got < n) begin
      @(negedge clk);
      ks_ready = rand_ready ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      if (ks_valid && ks_ready) begin
        int unsigned exp = m.next_word();
        check(ks_word == exp, $sformatf("%s word %0d: got %08h exp %08h", tag, got, ks_word, exp));
        got++;
      end
    end
    @(negedge clk);
    ks_ready = 0;
  endtask

  initial begin
    automatic zuc_model m = new();
    int t0, t_first, t_last;
    bit [127:0] k, v;

    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. Published test vectors.
    do_start('0, '0);
    wait (ks_valid);
    @(negedge clk);
    check(ks_word == 32'h27bede74, $sformatf("tv1 z1 %08h", ks_word));
    ks_ready = 1;
    @(negedge clk);
    check(ks_word == 32'h018082da, $sformatf("tv1 z2 %08h", ks_word));
    ks_ready = 0;

    do_start('1, '1);
    wait (ks_valid);
    @(negedge clk);
    check(ks_word == 32'h0657cfa0, $sformatf("tv2 z1 %08h", ks_word));
    ks_ready = 1;
    @(negedge clk);
    check(ks_word == 32'h7096398b, $sformatf("tv2 z2 %08h", ks_word));
    ks_ready = 0;

    // 2. Latency and throughput with random keys.
    for (int r = 0; r < 4; r++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      m.init(k, v);
      @(negedge clk);
      key = k; iv = v; start = 1; ks_ready = 1;
      t0 = cycle;
      @(negedge clk);
      start = 0;
      check(busy, "busy after start");
      while (!ks_valid) @(negedge clk);
      t_first = cycle;
      check(t_first - t0 == 35, $sformatf("first word after %0d cycles, expected 35", t_first - t0));
      for (int i = 0; i < 64; i++) begin
        check(ks_valid, "valid every cycle");
        check(ks_word == m.next_word(), $sformatf("run %0d word %0d", r, i));
        @(negedge clk);
      end
      t_last = cycle;
      check(t_last - t_first == 64, $sformatf("64 words in %0d cycles", t_last - t_first));
      ks_ready = 0;
    end

    // 3. Stalls.
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    m.init(k, v);
    do_start(k, v);
    collect(200, 1, m, "stall");

    // 4. Restart while running.
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    m.init(k, v);
    do_start(k, v);
    collect(20, 0, m, "restart");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
