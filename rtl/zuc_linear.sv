// zuc_linear -- the linear transforms L1 and L2 of ZUC's nonlinear function.
//
//   SEL = 1: L1(X) = X ^ (X <<< 2)  ^ (X <<< 10) ^ (X <<< 18) ^ (X <<< 24)
//   SEL = 2: L2(X) = X ^ (X <<< 8)  ^ (X <<< 14) ^ (X <<< 22) ^ (X <<< 30)
// with <<< a 32-bit left rotation. Combinational, five-input XOR per bit.
// The document names L1 and L2; their definitions are those of the ZUC
// specification. Any SEL other than 2 gives L1.
module zuc_linear
  import zuc_pkg::*;
#(
  parameter int unsigned SEL = 1
) (
  input  word_t x,
  output word_t y
);

  if (SEL == 2) begin : g_l2
    assign y = x ^ rol32(x, 8) ^ rol32(x, 14) ^ rol32(x, 22) ^ rol32(x, 30);
  end else begin : g_l1
    assign y = x ^ rol32(x, 2) ^ rol32(x, 10) ^ rol32(x, 18) ^ rol32(x, 24);
  end

endmodule
