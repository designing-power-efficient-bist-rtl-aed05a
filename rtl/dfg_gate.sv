// Double Feynman gate: 3 inputs, 3 outputs.
//   P = A
//   Q = A xor B
//   R = A xor C
// With B = 1 and C = 0 it turns one stored bit into Q, Q' and a second
// copy of Q for the feedback path of the reversible flip-flop.
// The equations are the standard double Feynman gate; the gate is only
// named in the source description of the flip-flop. Combinational.
module dfg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
