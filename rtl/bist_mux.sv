// 2:1 multiplexer used three times in the BIST datapath:
//   MUX1 (W = N) chooses the CUT input: d0 = e_input (normal mode),
//                d1 = test pattern from the demultiplexer (test mode);
//   MUX2 (W = K) chooses the ALU result and MUX3 (W = 1) the carry:
//                d0 = fault-free ALU, d1 = circuit under test.
// Combinational; sel = 1 selects d1.
module bist_mux #(
  parameter int unsigned W = 8
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
