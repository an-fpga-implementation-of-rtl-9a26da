// zuc_fpga_top -- FPGA side of a PC-to-board ZUC encryption system.
//
// A PC terminal sends, over an 8N1 serial line, 16 key bytes, 16 IV bytes and
// then plaintext bytes. uart_rx receives them, zuc_host_ctrl collects key and
// IV and starts zuc_core, which initialises in 35 cycles and then supplies a
// 32-bit keystream word per cycle on demand. zuc_stream_xor XORs each plaintext
// byte with the next keystream byte and uart_tx sends the ciphertext back, one
// byte out per byte in. Sending ciphertext with the same key and IV gives the
// plaintext back.
//
// The keystream generator is far faster than the serial line (2.08 Gbit/s at
// 65 MHz against 115200 baud), so it stalls almost all the time; its rate is
// exercised directly at the zuc_core interface.
// Parameters: CLK_HZ (65 MHz, the document's clock) and BAUD (this design's
// choice) set the bit period. Reset is synchronous and active low.
module zuc_fpga_top
  import zuc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 65_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd,
  output logic keyed,
  output logic busy,
  output logic overrun
);

  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;

  logic         rx_valid;
  byte_t        rx_byte;
  logic [127:0] key, iv;
  logic         start;
  logic         ks_valid, ks_ready;
  word_t        ks_word;
  logic         data_valid, data_ready;
  byte_t        data_byte;
  logic         tx_valid, tx_ready;
  byte_t        tx_byte;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_byte)
  );

  zuc_host_ctrl u_host (
    .clk, .rst_n, .rx_valid, .rx_byte, .key, .iv, .start, .keyed,
    .data_valid, .data_ready, .data_byte, .overrun
  );

  zuc_core u_core (
    .clk, .rst_n, .start, .key, .iv, .busy, .ks_valid, .ks_ready, .ks_word
  );

  zuc_stream_xor u_xor (
    .clk, .rst_n, .flush(start), .ks_valid, .ks_ready, .ks_word,
    .in_valid(data_valid), .in_ready(data_ready), .in_byte(data_byte),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_byte(tx_byte)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .ready(tx_ready), .data(tx_byte), .txd(uart_txd)
  );

endmodule
