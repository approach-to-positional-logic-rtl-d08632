// corr_merge: logic group 2 of a functional block. It corrects the prototype
// value proto = S_j^k[X_k] with the outputs of the correction blocks:
//   f = f_cor1 | (proto & f_cor0),  f_cor1 = |cb1,  f_cor0 = ~|cb0
// A CB "1" output forces the fragment to 1 on a vector where the prototype is 0;
// a CB "0" output forces it to 0 where the prototype is 1. The formula is the
// fragment record of positional logic algebra; writing f_cor0 as the complement
// of an OR of recognised vectors is this design's reading of "a function that
// is 0 on the vectors to clear". L0 or L1 may be 0: the cb0/cb1 port then keeps
// one bit, which is ignored. Combinational.
module corr_merge #(
  parameter int unsigned L0 = 1,  // number of CB "0" blocks
  parameter int unsigned L1 = 1,  // number of CB "1" blocks
  localparam int unsigned L0P = (L0 == 0) ? 1 : L0,
  localparam int unsigned L1P = (L1 == 0) ? 1 : L1
) (
  input  logic           proto,
  input  logic [L0P-1:0] cb0,
  input  logic [L1P-1:0] cb1,
  output logic           f
);
  logic f_cor0, f_cor1;

  assign f_cor0 = (L0 == 0) ? 1'b1 : ~|cb0;
  assign f_cor1 = (L1 == 0) ? 1'b0 : |cb1;
  assign f      = f_cor1 | (proto & f_cor0);
endmodule
