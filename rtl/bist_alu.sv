// K-bit ALU: the circuit under test, and its fault-free reference copy.
//
// The N-bit input (N = 2K + 4) carries all operands:
//   A   = din[K-1:0]        B  = din[2K-1:K]
//   op  = din[2K+2:2K]      cin = din[2K+3]
// Operations (bist_pkg::alu_op_e): ADD A+B+cin, SUB A+~B+cin, AND, OR, XOR,
// XNOR, INC A+cin, SHL {A,cin} (A shifted left, cin enters bit 0, the
// MSB of A leaves as carry_out).
// Arithmetic operations return their carry in carry_out; logic operations
// return carry_out = 0. The operation set and the field layout are this
// design's choice; the source only fixes the widths (N, K). Combinational.
module bist_alu
  import bist_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = alu_width(N)
) (
  input  logic [N-1:0] din,
  output logic [K-1:0] alu_out,
  output logic         carry_out
);
  logic [K-1:0] a, b;
  logic         cin;
  alu_op_e      op;
  logic [K:0]   wide;

  assign a   = din[K-1:0];
  assign b   = din[2*K-1:K];
  assign op  = alu_op_e'(din[2*K+2:2*K]);
  assign cin = din[2*K+3];

  always_comb begin
    wide = '0;
    unique case (op)
      OP_ADD:  wide = {1'b0, a} + {1'b0, b} + (K+1)'(cin);
      OP_SUB:  wide = {1'b0, a} + {1'b0, ~b} + (K+1)'(cin);
      OP_AND:  wide = {1'b0, a & b};
      OP_OR:   wide = {1'b0, a | b};
      OP_XOR:  wide = {1'b0, a ^ b};
      OP_XNOR: wide = {1'b0, ~(a ^ b)};
      OP_INC:  wide = {1'b0, a} + (K+1)'(cin);
      OP_SHL:  wide = {a, cin};
    endcase
  end

  assign alu_out   = wide[K-1:0];
  assign carry_out = wide[K];
endmodule
