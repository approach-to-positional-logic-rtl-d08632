// pos_op: a fixed simple positional operator S_J^K[x]. Its value is bit m of
// the constant J, where m is the number of ones in the K-bit argument x; so
// J = 2^K gives the AND of all inputs, J = 2^(K+1)-2 the OR, J = 5 with K = 2
// the XNOR. Built as a population count and a constant lookup. Used by the
// flow-graph evaluator pla_flow_z. Combinational.
module pos_op #(
  parameter int unsigned   K = 3,
  parameter logic [K:0]    J = 5
) (
  input  logic [K-1:0] x,
  output logic         y
);
  localparam int unsigned CW = $clog2(K + 1);

  logic [CW-1:0] count;

  always_comb begin
    count = '0;
    for (int unsigned i = 0; i < K; i++) count = count + CW'(x[i]);
  end

  assign y = J[count];
endmodule
