// tb_zuc_host_ctrl -- sends 32 bytes and checks that they become key and IV
// (first byte in bits 127:120), that exactly one start pulse follows the last IV
// byte and `keyed` rises, that later bytes are passed on with data_valid and
// held until data_ready, and that a byte arriving while one is held is dropped
// and sets `overrun`.
module tb_zuc_host_ctrl;
  import zuc_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         rx_valid = 0;
  byte_t        rx_byte = '0;
  logic [127:0] key, iv;
  logic         start, keyed, data_valid, data_ready = 0, overrun;
  byte_t        data_byte;
  int           checks = 0, failures = 0;
  int           starts = 0;

  zuc_host_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && start) starts++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic rx(byte_t b);
    @(negedge clk);
    rx_valid = 1; rx_byte = b;
    @(negedge clk);
    rx_valid = 0; rx_byte = 8'($urandom);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, v;
    byte_t b;
    k = {$urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) rx(k[127 - 8*i -: 8]);
    check(!keyed && starts == 0, "not keyed after the key alone");
    for (int i = 0; i < 15; i++) rx(v[127 - 8*i -: 8]);
    check(!keyed && starts == 0, "not keyed before the last IV byte");
    rx(v[7:0]);
    @(negedge clk);
    check(keyed && starts == 1, $sformatf("keyed, %0d start pulses", starts));
    check(key == k && iv == v, "key and IV collected");
    check(!data_valid, "no data yet");
    for (int n = 0; n < 50; n++) begin
      b = 8'($urandom);
      rx(b);
      check(data_valid && data_byte == b, "data byte presented");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(data_valid && data_byte == b, "data byte held");
      end
      data_ready = 1;
      @(negedge clk);
      data_ready = 0;
      check(!data_valid, "data byte taken");
    end
    check(!overrun, "no overrun so far");
    rx(8'h11);
    rx(8'h22);  // arrives while 8'h11 is still held
    check(overrun && data_valid && data_byte == 8'h11, "overrun flagged, first byte kept");
    data_ready = 1;
    @(negedge clk);
    data_ready = 0;
    check(key == k && iv == v && starts == 1, "key and IV unchanged by data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
