// frag_and: block 3 of a functional block. An AND element whose first input is
// the corrected fragment value f and whose remaining H = n-k inputs are the
// conjunction variables, each through a controlled inverter (ninv bit 1 =
// invert). It selects the part of the input space the fragment covers, giving
// the fragment term of the record f_i = (conjunction) & (corrected prototype).
// Structure as described for the circuit; inverters are XOR gates. Combinational.
module frag_and #(
  parameter int unsigned H = 2
) (
  input  logic         f,
  input  logic [H-1:0] xh,
  input  logic [H-1:0] ninv,
  output logic         y
);
  assign y = f & (&(xh ^ ninv));
endmodule
