// uart_line_pkg -- helper for the testbenches: the serial-line timing of one
// 8N1 frame, used by the line driver and monitor tasks of each testbench.
package uart_line_pkg;
  // Frame as sent on the line, bit 0 first: start (0), data LSB first, stop (1).
  function automatic logic [9:0] frame_bits(logic [7:0] b);
    return {1'b1, b, 1'b0};
  endfunction
endpackage
