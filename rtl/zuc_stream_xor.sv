// zuc_stream_xor -- stream-cipher combiner: ciphertext = plaintext ^ keystream.
//
// Takes one 32-bit keystream word at a time from the generator (valid/ready)
// into a word buffer, and XORs each incoming data byte with the next keystream
// byte, most significant byte of the word first (the byte order in which
// 128-EEA3 applies the ZUC keystream). A new word is requested only when the
// four bytes of the buffered one are used up, so the generator stalls between
// words. Decryption is the same operation.
//
// Interface: `in_*` data bytes and `out_*` result bytes, both valid/ready. A
// byte passes combinationally (same cycle) when a keystream byte is buffered
// and `out_ready` is high. `flush` empties the buffer when a new key is loaded.
module zuc_stream_xor
  import zuc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       ks_valid,
  output logic       ks_ready,
  input  word_t      ks_word,
  input  logic       in_valid,
  output logic       in_ready,
  input  byte_t      in_byte,
  output logic       out_valid,
  input  logic       out_ready,
  output byte_t      out_byte
);

  word_t      buf_q;
  logic [2:0] left_q;    // keystream bytes left in buf_q, 0..4
  logic       fire;

  assign ks_ready  = (left_q == 3'd0) && !flush;
  assign out_valid = in_valid && (left_q != 3'd0);
  assign in_ready  = out_ready && (left_q != 3'd0);
  assign out_byte  = in_byte ^ buf_q[31:24];
  assign fire      = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      buf_q  <= '0;
      left_q <= '0;
    end else if (ks_valid && ks_ready) begin
      buf_q  <= ks_word;
      left_q <= 3'd4;
    end else if (fire) begin
      buf_q  <= {buf_q[23:0], 8'h00};
      left_q <= left_q - 1'b1;
    end
  end

endmodule
