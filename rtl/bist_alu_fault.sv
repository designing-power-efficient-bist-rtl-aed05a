// ALU_FAULT: the circuit under test with fault injection on its inputs.
//
// The N input lines first pass a fault layer and then drive a bist_alu:
//   stuck-at-1: every line with s_a_1[i] = 1 reads 1;
//   stuck-at-0: every line with s_a_0[i] = 1 reads 0 (wins over s_a_1);
//   bridging:   with bridge_fault = 1, line 0 and line K (the LSBs of the
//               two operands A and B) are shorted as a wired AND, so both
//               read the AND of their values.
// With all fault controls at 0 the block behaves exactly like bist_alu.
// Mask widths follow the source; the priority of the two stuck-at masks
// and the choice of bridged lines are this design's. Combinational.
module bist_alu_fault
  import bist_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned K = alu_width(N)
) (
  input  logic [N-1:0] din,
  input  logic [N-1:0] s_a_0,
  input  logic [N-1:0] s_a_1,
  input  logic         bridge_fault,
  output logic [K-1:0] alu_out,
  output logic         carry_out
);
  logic [N-1:0] stuck, faulty;

  always_comb begin
    stuck  = (din | s_a_1) & ~s_a_0;
    faulty = stuck;
    if (bridge_fault) begin
      faulty[0] = stuck[0] & stuck[K];
      faulty[K] = stuck[0] & stuck[K];
    end
  end

  bist_alu #(.N(N), .K(K)) u_alu (.din(faulty), .alu_out(alu_out), .carry_out(carry_out));
endmodule
