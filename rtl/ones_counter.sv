// ones_counter: the "block for determining the number of 1s" of the positional
// logic circuit. It counts the ones in the K-bit argument vector x and presents
// the count as K+1 one-hot lines: count_oh[m] is 1 exactly when x holds m ones.
// The count is formed by adding the bits and then decoding the sum; the one-hot
// output lets the positional-operator select (pos_select) be a plain AND-OR.
// The circuit only states that the block determines the number of ones; the
// adder-plus-decoder form and the one-hot output coding are this design's choice.
// Purely combinational, no clock.
module ones_counter #(
  parameter int unsigned K = 3
) (
  input  logic [K-1:0] x,
  output logic [K:0]   count_oh
);
  localparam int unsigned CW = $clog2(K + 1);

  logic [CW-1:0] count;

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < K; i++) count = count + CW'(x[i]);
  end

  always_comb begin
    for (int unsigned m = 0; m <= K; m++) count_oh[m] = (count == CW'(m));
  end
endmodule
