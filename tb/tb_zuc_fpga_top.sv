// tb_zuc_fpga_top -- end-to-end test of the FPGA side at its default parameters
// (65 MHz clock, 115200 baud), with the testbench playing the PC: it drives the
// serial input with 8N1 frames and decodes the serial output.
//   1. Key = IV = 0: eight zero bytes must come back as the published keystream
//      27bede74 018082da, byte by byte.
//   2. Random key/IV and 48 random bytes: ciphertext checked against the
//      reference model.
//   3. Reset, same key/IV, the ciphertext sent back: the plaintext must return.
//   4. Frames sent slightly faster than the line rate (short stop bits): the
//      one-byte holding register must overflow and raise `overrun`.
// Mechanisms counted and required at least once: key/IV load, initialisation
// rounds, discarded round, keystream stall, keystream word taken, byte
// encrypted, overrun.
module tb_zuc_fpga_top;
  import zuc_pkg::*;
  import zuc_ref_pkg::*;
  import uart_line_pkg::*;

  localparam int unsigned CLK_HZ = 65_000_000;
  localparam int unsigned BAUD   = 115_200;
  localparam int          CPB    = (CLK_HZ + BAUD / 2) / BAUD;

  logic  clk = 0, rst_n = 0, uart_rxd = 1;
  logic  uart_txd, keyed, busy, overrun;
  int    checks = 0, failures = 0;
  byte_t rxq [$];   // bytes decoded from the FPGA's serial output

  // mechanism counters
  int n_load = 0, n_init = 0, n_drop = 0, n_stall = 0, n_words = 0, n_bytes = 0, n_overrun = 0;

  zuc_fpga_top dut (.*);

  always #7.692 clk = ~clk;   // about 65 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.start) n_load++;
    if (dut.u_core.init_mode && dut.u_core.step) n_init++;
    if (dut.u_core.busy && !dut.u_core.init_mode && dut.u_core.step) n_drop++;
    if (dut.u_core.ks_valid && !dut.u_core.ks_ready) n_stall++;
    if (dut.u_core.ks_valid && dut.u_core.ks_ready) n_words++;
    if (dut.u_xor.out_valid && dut.u_xor.out_ready) n_bytes++;
    if (dut.rx_valid && dut.keyed && dut.data_valid && !dut.data_ready) n_overrun++;
  end

  // PC side: send one frame; stop_clks shortens the stop bit.
  task automatic pc_send(byte_t b, int stop_clks = CPB);
    logic [9:0] f;
    f = frame_bits(b);
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (i == 9 ? stop_clks : CPB) @(negedge clk);
    end
    uart_rxd = 1;
  endtask

  // PC side: decode the FPGA's output line.
  initial begin
    byte_t b;
    forever begin
      @(negedge clk);
      if (rst_n && uart_txd == 0) begin
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(negedge clk);
          b[i] = uart_txd;
        end
        repeat (CPB) @(negedge clk);
        if (uart_txd != 1) begin
          failures++;
          $display("FAIL framing error on output");
        end
        rxq.push_back(b);
      end
    end
  end

  task automatic wait_rx(int n);
    int t = 0;
    while (rxq.size() < n && t < 30 * CPB) begin
      @(negedge clk);
      t++;
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (CPB) @(negedge clk);
    rxq.delete();
  endtask

  task automatic send_key(logic [127:0] k, logic [127:0] v);
    for (int i = 0; i < 16; i++) pc_send(k[127 - 8*i -: 8]);
    for (int i = 0; i < 16; i++) pc_send(v[127 - 8*i -: 8]);
  endtask

  initial begin
    automatic zuc_model m = new();
    logic [127:0] k, v;
    byte_t pt [48], ct [48], exp_b;
    int unsigned word;
    localparam logic [63:0] TV1 = 64'h27bede74_018082da;

    do_reset();

    // 1. published vector
    send_key('0, '0);
    check(keyed, "keyed after 32 bytes");
    for (int i = 0; i < 8; i++) pc_send(8'h00);
    wait_rx(8);
    check(rxq.size() == 8, $sformatf("%0d bytes back, expected 8", rxq.size()));
    for (int i = 0; i < 8 && rxq.size() > 0; i++) begin
      exp_b = TV1[63 - 8*i -: 8];
      check(rxq[0] == exp_b, $sformatf("tv1 byte %0d: %02h exp %02h", i, rxq[0], exp_b));
      void'(rxq.pop_front());
    end

    // 2. random key, 48 bytes
    do_reset();
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    m.init(k, v);
    send_key(k, v);
    for (int i = 0; i < 48; i++) begin
      pt[i] = 8'($urandom);
      pc_send(pt[i]);
    end
    wait_rx(48);
    check(rxq.size() == 48, $sformatf("%0d bytes back, expected 48", rxq.size()));
    for (int i = 0; i < 48; i++) begin
      if (i % 4 == 0) word = m.next_word();
      exp_b = pt[i] ^ word[31 - 8*(i % 4) -: 8];
      ct[i] = (rxq.size() > 0) ? rxq.pop_front() : 8'h00;
      check(ct[i] == exp_b, $sformatf("byte %0d: %02h exp %02h", i, ct[i], exp_b));
    end

    // 3. decryption with the same key and IV
    do_reset();
    send_key(k, v);
    for (int i = 0; i < 48; i++) pc_send(ct[i]);
    wait_rx(48);
    for (int i = 0; i < 48; i++) begin
      exp_b = (rxq.size() > 0) ? rxq.pop_front() : 8'h00;
      check(exp_b == pt[i], $sformatf("decrypted byte %0d: %02h exp %02h", i, exp_b, pt[i]));
    end
    check(!overrun, "no overrun at the line rate");

    // 4. overrun: stop bits of 0.55 bit time
    for (int i = 0; i < 40; i++) pc_send(8'($urandom), CPB * 55 / 100);
    wait_rx(40);
    check(overrun, "overrun raised by a too-fast sender");
    check(rxq.size() < 40, $sformatf("%0d of 40 bytes returned", rxq.size()));

    $display("mechanisms: loads=%0d init_rounds=%0d discarded=%0d stalls=%0d words=%0d bytes=%0d overruns=%0d",
             n_load, n_init, n_drop, n_stall, n_words, n_bytes, n_overrun);
    check(n_load == 3, "key/IV loads");
    check(n_init == 3 * 32, "initialisation rounds");
    check(n_drop == 3, "discarded working rounds");
    check(n_stall > 0, "keystream stalls");
    check(n_words > 0, "keystream words taken");
    check(n_bytes > 0, "bytes encrypted");
    check(n_overrun > 0, "overruns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
