// tb_uart_rx -- sends random bytes on the line at CLKS_PER_BIT = 16 and checks
// each received byte, one valid pulse per frame, a glitch shorter than half a
// bit that must not start a frame, and a frame with a bad stop bit that must be
// dropped.
module tb_uart_rx;
  import uart_line_pkg::*;

  localparam int CPB = 16;

  logic       clk = 0, rst_n = 0, rxd = 1;
  logic       valid;
  logic [7:0] data;
  int         checks = 0, failures = 0;
  logic [7:0] q [$];
  int         pulses = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b, bit good_stop, int stop_clks);
    logic [9:0] f;
    f = frame_bits(b);
    f[9] = good_stop;
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (i == 9 ? stop_clks : CPB) @(negedge clk);
    end
    rxd = 1;
  endtask

  always @(posedge clk) if (rst_n && valid) begin
    pulses++;
    checks++;
    if (q.size() == 0) begin
      failures++;
      $display("FAIL unexpected byte %02h", data);
    end else begin
      logic [7:0] e;
      e = q.pop_front();
      if (data !== e) begin
        failures++;
        $display("FAIL got %02h exp %02h", data, e);
      end
    end
  end

  initial begin
    logic [7:0] b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 100; i++) begin
      b = 8'($urandom);
      q.push_back(b);
      send(b, 1, CPB);
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    // glitch
    rxd = 0;
    repeat (CPB / 4) @(negedge clk);
    rxd = 1;
    repeat (3 * CPB) @(negedge clk);
    // bad stop bit: dropped
    send(8'hA5, 0, CPB);
    repeat (2 * CPB) @(negedge clk);
    b = 8'h3C;
    q.push_back(b);
    send(b, 1, CPB);
    repeat (3 * CPB) @(negedge clk);
    checks++;
    if (q.size() != 0 || pulses != 101) begin
      failures++;
      $display("FAIL %0d bytes missing, %0d pulses", q.size(), pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
