// Response analyzer: chooses which ALU answers and compresses the answers.
//
// MUX2 (K bits) and MUX3 (carry) select the fault-free ALU (route_cut = 0,
// used while the golden signature is built) or the circuit under test
// (route_cut = 1, used in the test periods and in normal operation). The
// selected {carry, result}, L = K + 1 bits, feeds the MISR. The selected
// result is also the ALU output of the whole design in normal operation.
// sig is registered; alu_out and carry_out are combinational.
module bist_response_analyzer #(
  parameter int unsigned K = 2,
  parameter int unsigned L = K + 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         route_cut,
  input  logic         misr_en,
  input  logic         misr_restart,
  input  logic [K-1:0] ref_out,
  input  logic         ref_carry,
  input  logic [K-1:0] cut_out,
  input  logic         cut_carry,
  output logic [K-1:0] alu_out,
  output logic         carry_out,
  output logic [L-1:0] sig
);
  bist_mux #(.W(K)) u_mux2 (.sel(route_cut), .d0(ref_out),   .d1(cut_out),   .y(alu_out));
  bist_mux #(.W(1)) u_mux3 (.sel(route_cut), .d0(ref_carry), .d1(cut_carry), .y(carry_out));

  bist_misr #(.L(L)) u_misr (
    .clk(clk), .rst(rst), .en(misr_en), .restart(misr_restart),
    .din({carry_out, alu_out}), .sig(sig)
  );

  initial assert (L == K + 1) else $error("signature width must be K+1");
endmodule
