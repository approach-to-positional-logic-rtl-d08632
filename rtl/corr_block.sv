// corr_block: a correction block (CB "0" or CB "1"). It is a K-input AND whose
// inputs pass through controlled inverters, so it recognises the single input
// vector x == m ^ '1 and thereby realises one conjunction of a correction
// function written in disjunctive normal form. A control bit of 1 inverts its
// input. The AND with controlled inverters follows the circuit description; the
// inverters are realised as XOR gates. Feeding zeros with m = 0 disables the
// block (output 0). Combinational.
module corr_block #(
  parameter int unsigned K = 3
) (
  input  logic [K-1:0] x,  // information inputs
  input  logic [K-1:0] m,  // inverter controls, 1 = invert
  output logic         y
);
  assign y = &(x ^ m);
endmodule
