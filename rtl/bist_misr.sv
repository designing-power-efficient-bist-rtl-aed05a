// Multiple-input signature register (MISR), L bits.
//
// Each enabled clock the register shifts towards the MSB, bit 0 takes the
// XOR of the tap bits (bist_pkg::misr_taps: Q2^Q0 for L = 3,
// Q6^Q5 for 7, Q14^Q13 for 15, all maximal length), and the L-bit response is XORed
// into all stages:
//   sig <= {sig[L-2:0], ^(sig & taps)} ^ din
// With restart = 1 the old signature is dropped and the step starts from
// zero, so the first response of a new period is absorbed in the same clock
// that ends the previous one. Polynomials are this design's choice.
// Asynchronous active-high reset to 0.
module bist_misr
  import bist_pkg::*;
#(
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         restart,
  input  logic [L-1:0] din,
  output logic [L-1:0] sig
);
  localparam logic [L-1:0] TAPS = L'(misr_taps(L));

  logic [L-1:0] base;

  assign base = restart ? '0 : sig;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     sig <= '0;
    else if (en) sig <= {base[L-2:0], ^(base & TAPS)} ^ din;
  end
endmodule
