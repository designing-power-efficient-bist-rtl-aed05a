// Comparator: checks the test signature against the golden signature.
//
// When en = 1 the comparator registers comp_out = 1 if sig equals golden
// (and a golden signature is stored), 0 otherwise; between comparisons
// comp_out holds its last value. A low comp_out means the circuit under
// test produced a different response stream, i.e. a fault was detected.
// comp_out resets to 1 (no fault seen). Result appears one clock after en.
module bist_comparator #(
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [L-1:0] sig,
  input  logic [L-1:0] golden,
  input  logic         golden_valid,
  output logic         comp_out
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     comp_out <= 1'b1;
    else if (en) comp_out <= golden_valid && (sig == golden);
  end
endmodule
