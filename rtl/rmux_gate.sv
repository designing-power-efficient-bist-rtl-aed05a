// RMUX gate: a 3-input, 3-output reversible multiplexer (quantum cost 4).
//   P = A
//   Q = A'B + AC
//   R = A'C + AB'
// Q is a 2:1 multiplexer selected by A (B when A = 0, C when A = 1).
// The BS-LFSR uses Q for its bit swap and for loading the seed; P and R
// are the garbage outputs that keep the gate reversible. Combinational.
module rmux_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) | (a & c);
  assign r = (~a & c) | (a & ~b);
endmodule
