// tb_zuc_stream_xor -- feeds keystream words (random valid) and data bytes
// (random valid, random out_ready) and checks that each output byte is the
// input byte XOR the next keystream byte, most significant byte first; that a
// word is requested only after four bytes; and that flush discards the buffer.
module tb_zuc_stream_xor;
  import zuc_pkg::*;

  logic  clk = 0, rst_n = 0, flush = 0;
  logic  ks_valid = 0, ks_ready;
  word_t ks_word = '0;
  logic  in_valid = 0, in_ready;
  byte_t in_byte = '0;
  logic  out_valid, out_ready = 0;
  byte_t out_byte;
  int    checks = 0, failures = 0;
  byte_t ks_bytes [$];
  int    words = 0, bytes = 0;

  zuc_stream_xor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Keystream source: a new random word whenever the previous one was taken.
  always @(posedge clk) begin
    if (rst_n && ks_valid && ks_ready) begin
      words++;
      for (int i = 3; i >= 0; i--) ks_bytes.push_back(ks_word[8*i +: 8]);
    end
  end

  always @(negedge clk) begin
    if (!ks_valid || ks_ready) ks_word <= $urandom;  // new offer after a take
    ks_valid  <= rst_n && ($urandom_range(0, 3) != 0);
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      byte_t k;
      checks++;
      bytes++;
      k = ks_bytes.pop_front();
      if (out_byte !== (in_byte ^ k)) begin
        failures++;
        $display("FAIL byte %0d: %02h ^ %02h gave %02h", bytes, in_byte, k, out_byte);
      end
      if (!in_ready) begin
        failures++;
        $display("FAIL in_ready low on a transfer");
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      in_valid = 1;
      in_byte  = 8'($urandom);
      do @(posedge clk); while (!(in_ready && out_valid));
      @(negedge clk);
      in_valid = ($urandom_range(0, 1) == 1);
      in_byte  = 8'($urandom);
      if (n == 201) begin
        // flush: drop the buffered keystream bytes in the model too
        flush = 1;
        @(posedge clk);
        #1;
        ks_bytes.delete();
        @(negedge clk);
        flush = 0;
      end
    end
    in_valid = 0;
    checks++;
    if (words * 4 - bytes > 4 + 4) begin  // at most one partly used word and one flushed
      failures++;
      $display("FAIL %0d words taken for %0d bytes", words, bytes);
    end
    $display("words %0d bytes %0d", words, bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
