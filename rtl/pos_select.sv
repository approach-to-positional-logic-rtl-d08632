// pos_select: logic group 1 of a functional block. Together with a ones_counter
// it realises the simple positional operator S_j^k[X_k]: the value is bit j_m of
// the operator vector s, where m is the number of ones in X_k. Each s[m] is ANDed
// with count line m and the products are ORed. The AND-OR form is the simplest
// select for the one-hot count chosen in ones_counter. Combinational.
module pos_select #(
  parameter int unsigned K = 3
) (
  input  logic [K:0] s,         // operator vector j, s[m] = j_m
  input  logic [K:0] count_oh,  // one-hot number of ones in X_k
  output logic       y          // S_j^k[X_k]
);
  assign y = |(s & count_oh);
endmodule
