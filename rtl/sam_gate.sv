// Sam gate: a 3-input, 3-output reversible gate (quantum cost 4).
//   P = A'
//   Q = A'B xor AC
//   R = A'C xor AB
// For A = 0 it passes (B, C) to (Q, R); for A = 1 it passes them crossed,
// so it is a controlled swap with an inverted copy of the control.
// In the reversible flip-flop the A input decides whether the stored
// value is replaced by new data. Purely combinational.
module sam_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = ~a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
