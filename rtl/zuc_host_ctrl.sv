// zuc_host_ctrl -- byte protocol between the serial link and the cipher.
//
// After reset the first 16 received bytes form the key (first byte = k0, bits
// 127:120), the next 16 the IV. When the last IV byte arrives a one-cycle
// `start` pulse loads them into the keystream generator and `keyed` goes high.
// Every later byte is plaintext: it is held in a one-byte register
// (`data_valid`) until the combiner takes it (`data_ready`). A byte that arrives
// while the register is still full is dropped and sets the sticky `overrun`
// flag. A new key needs a reset.
// The document says only that key and data go from the PC to the board and the
// encrypted data back; this framing is this design's own.
module zuc_host_ctrl
  import zuc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx_valid,
  input  byte_t        rx_byte,
  output logic [127:0] key,
  output logic [127:0] iv,
  output logic         start,
  output logic         keyed,
  output logic         data_valid,
  input  logic         data_ready,
  output byte_t        data_byte,
  output logic         overrun
);

  logic [4:0] nbytes_q;   // key/IV bytes received, 0..31

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key        <= '0;
      iv         <= '0;
      nbytes_q   <= '0;
      start      <= 1'b0;
      keyed      <= 1'b0;
      data_valid <= 1'b0;
      data_byte  <= '0;
      overrun    <= 1'b0;
    end else begin
      start <= 1'b0;
      if (data_valid && data_ready) data_valid <= 1'b0;
      if (rx_valid) begin
        if (!keyed) begin
          if (!nbytes_q[4]) key <= {key[119:0], rx_byte};
          else              iv  <= {iv[119:0],  rx_byte};
          nbytes_q <= nbytes_q + 1'b1;
          if (nbytes_q == 5'd31) begin
            start <= 1'b1;
            keyed <= 1'b1;
          end
        end else if (data_valid && !data_ready) begin
          overrun <= 1'b1;
        end else begin
          data_valid <= 1'b1;
          data_byte  <= rx_byte;
        end
      end
    end
  end

endmodule
