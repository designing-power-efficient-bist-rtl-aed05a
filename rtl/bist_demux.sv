// 1:2 demultiplexer for the test pattern. sel = 0 routes the pattern to
// y_out1, which feeds the fault-free ALU while the golden signature is
// built; sel = 1 routes it to y_out2, which goes through MUX1 to the
// circuit under test. The output not selected is held at 0, so the idle
// branch does not toggle. Combinational.
module bist_demux #(
  parameter int unsigned W = 8
) (
  input  logic         sel,
  input  logic [W-1:0] din,
  output logic [W-1:0] y_out1,
  output logic [W-1:0] y_out2
);
  always_comb begin
    y_out1 = sel ? '0  : din;
    y_out2 = sel ? din : '0;
  end
endmodule
