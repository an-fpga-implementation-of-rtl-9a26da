// uart_tx -- serial transmitter for the PC link, 8N1.
//
// When idle (`ready` high) a byte offered with `valid` is taken and sent as a
// start bit (0), eight data bits LSB first and a stop bit (1), each
// CLKS_PER_BIT clock cycles long. `ready` goes high again after the stop bit.
// The line idles high. Frame format and rate are this design's choice; the
// document only names the link back to the PC terminal.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 564   // 65 MHz / 115200 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  output logic       ready,
  input  logic [7:0] data,
  output logic       txd
);

  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [9:0]    frame_q;   // stop, data[7:0], start; bit 0 on the line
  logic [3:0]    nbits_q;   // bits left to send, 0 = idle
  logic [CW-1:0] cnt_q;

  assign ready = (nbits_q == 4'd0);
  assign txd   = ready ? 1'b1 : frame_q[0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      frame_q <= '1;
      nbits_q <= '0;
      cnt_q   <= '0;
    end else if (ready) begin
      if (valid) begin
        frame_q <= {1'b1, data, 1'b0};
        nbits_q <= 4'd10;
        cnt_q   <= '0;
      end
    end else if (cnt_q == CW'(CLKS_PER_BIT - 1)) begin
      cnt_q   <= '0;
      frame_q <= {1'b1, frame_q[9:1]};
      nbits_q <= nbits_q - 1'b1;
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
