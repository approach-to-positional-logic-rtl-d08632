// lambda_xform: the one-parameter equivalent transformation lambda_W of
// positional logic algebra. It inverts each digit of the argument vector whose
// position holds a 1 in the binary code of W; the leftmost written variable is
// the most significant bit. Realised as XOR with the constant W. Combinational.
module lambda_xform #(
  parameter int unsigned K = 5,
  parameter logic [K-1:0] W = 16
) (
  input  logic [K-1:0] x,
  output logic [K-1:0] y
);
  assign y = x ^ W;
endmodule
