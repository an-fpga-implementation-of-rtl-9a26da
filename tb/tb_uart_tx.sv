// tb_uart_tx -- offers random bytes to the transmitter at CLKS_PER_BIT = 16 and
// decodes the line by sampling each bit in its middle; checks the data, the
// start and stop levels, the frame length (10 bit times, ready low meanwhile)
// and that the line idles high.
module tb_uart_tx;
  localparam int CPB = 16;

  logic       clk = 0, rst_n = 0, valid = 0;
  logic       ready;
  logic [7:0] data = '0;
  logic       txd;
  int         checks = 0, failures = 0;
  int         cycle = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int t0, t1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(txd && ready, "idle line high and ready");
    for (int n = 0; n < 100; n++) begin
      b = 8'($urandom);
      while (!ready) @(negedge clk);
      valid = 1; data = b;
      @(negedge clk);
      valid = 0; data = 8'($urandom);
      t0 = cycle;
      // now in the start bit; sample mid-bit
      repeat (CPB / 2 - 1) @(negedge clk);
      check(txd == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      check(txd == 1, "stop bit");
      check(got == b, $sformatf("byte %02h sent as %02h", b, got));
      while (!ready) @(negedge clk);
      t1 = cycle;
      check(t1 - t0 == 10 * CPB - 1 || t1 - t0 == 10 * CPB, $sformatf("frame of %0d cycles", t1 - t0));
      check(txd == 1, "idle after frame");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
