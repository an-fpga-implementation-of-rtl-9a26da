// tb_zuc_sbox -- checks the 32-bit S-box: spot values of S0 and S1 from the
// specification tables in each byte lane, that every lane is a permutation of
// 0..255, and all 256 S1 values against the algebraic reference in zuc_ref_pkg.
module tb_zuc_sbox;
  import zuc_pkg::*;
  import zuc_ref_pkg::*;

  word_t x, y;
  int    checks = 0, failures = 0;
  logic [255:0] seen [4];

  // (input, S0, S1) rows taken from the specification tables.
  localparam logic [7:0] SPOT [8][3] = '{
    '{8'h00, 8'h3e, 8'h55}, '{8'h01, 8'h72, 8'hc2}, '{8'h10, 8'h7b, 8'h8c},
    '{8'h5a, 8'h51, 8'hdf}, '{8'h80, 8'hb1, 8'had}, '{8'hc3, 8'hbe, 8'h51},
    '{8'hf0, 8'h8d, 8'h64}, '{8'hff, 8'h60, 8'hf2}
  };

  zuc_sbox dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      x = {4{SPOT[i][0]}};
      #1;
      check(y == {SPOT[i][1], SPOT[i][2], SPOT[i][1], SPOT[i][2]},
            $sformatf("S(%08h) = %08h", x, y));
    end
    for (int l = 0; l < 4; l++) seen[l] = '0;
    for (int v = 0; v < 256; v++) begin
      x = {4{8'(v)}};
      #1;
      seen[0][y[7:0]]   = 1'b1;
      seen[1][y[15:8]]  = 1'b1;
      seen[2][y[23:16]] = 1'b1;
      seen[3][y[31:24]] = 1'b1;
      check(y[23:16] == 8'(ref_s1(v)), $sformatf("S1 lane 2 of %02h", v));
      check(y[7:0]   == 8'(ref_s1(v)), $sformatf("S1 lane 0 of %02h", v));
    end
    for (int l = 0; l < 4; l++) begin
      int n;
      n = $countones(seen[l]);
      check(n == 256, $sformatf("lane %0d hits %0d distinct values", l, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
