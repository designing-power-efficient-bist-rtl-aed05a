// Golden-signature memory (the "ROM" of the block diagram).
//
// The signature collected from the fault-free ALU at the end of the golden
// period is written with we = 1 and read back continuously as r_data.
// valid says that a signature has been stored since reset; it is cleared
// only by reset, and a new write (a restarted session) replaces the word.
// One word is kept because the comparison is made once per LFSR period.
// Asynchronous active-high reset.
module bist_golden_mem #(
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [L-1:0] wdata,
  output logic [L-1:0] r_data,
  output logic         valid
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      r_data <= '0;
      valid  <= 1'b0;
    end else if (we) begin
      r_data <= wdata;
      valid  <= 1'b1;
    end
  end
endmodule
