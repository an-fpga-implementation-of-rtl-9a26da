// tb_zuc_linear -- checks L1 and L2 (both settings of SEL) bit by bit: output
// bit i is the XOR of input bits (i - r) mod 32 over the rotation amounts r.
module tb_zuc_linear;
  import zuc_pkg::*;

  word_t x, y1, y2;
  int    checks = 0, failures = 0;

  zuc_linear #(.SEL(1)) dut_l1 (.x, .y(y1));
  zuc_linear #(.SEL(2)) dut_l2 (.x, .y(y2));

  function automatic word_t by_bits(word_t v, int r1, int r2, int r3, int r4);
    word_t o;
    for (int i = 0; i < 32; i++)
      o[i] = v[i] ^ v[(i - r1 + 32) % 32] ^ v[(i - r2 + 32) % 32] ^
             v[(i - r3 + 32) % 32] ^ v[(i - r4 + 32) % 32];
    return o;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 500; r++) begin
      x = (r < 32) ? word_t'(1) << r : $urandom;
      #1;
      checks += 2;
      if (y1 !== by_bits(x, 2, 10, 18, 24)) begin
        failures++;
        $display("FAIL L1(%08h) = %08h", x, y1);
      end
      if (y2 !== by_bits(x, 8, 14, 22, 30)) begin
        failures++;
        $display("FAIL L2(%08h) = %08h", x, y2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
