// Feynman (controlled-NOT) gate: 2 inputs, 2 outputs, quantum cost 1.
//   P = A
//   Q = A xor B
// With B = 0 it copies A (reversible fan-out); otherwise it is the XOR used
// for the LFSR feedback. Purely combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
