// Reversible D flip-flop built from a Sam gate and a double Feynman gate.
//
// The Sam gate gets the capture enable on A, new data on B and the fed-back
// state on C; its R output is therefore D when en = 1 and the held state
// when en = 0. That value is stored on the rising clock edge. The double
// Feynman gate (inputs: state, 1, 0) then produces Q, Q' and the feedback
// copy of Q that returns to the Sam gate. The Sam gate's Q output is the
// unused garbage output g1.
//
// The source drawing feeds the clock itself into the Sam gate, which is a
// level-sensitive loop; here the clock drives a real edge-triggered register
// and the Sam gate's A input is a capture enable, giving the rising-edge
// behaviour the description asks for. The asynchronous active-high reset
// to 0 is this design's addition.
//
// Timing: q changes one clock after en = 1 with the value of d.
// The Sam gate's P and Q outputs are garbage outputs and drive nothing;
// lint reports them as unused.
module rev_dff (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic d,
  output logic q,
  output logic qn
);
  logic state, q_fb, next, g1, en_n, fb_copy;

  sam_gate u_sam (.a(en), .b(d), .c(q_fb), .p(en_n), .q(g1), .r(next));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= 1'b0;
    else     state <= next;
  end

  dfg_gate u_dfg (.a(state), .b(1'b1), .c(1'b0), .p(q), .q(qn), .r(fb_copy));

  assign q_fb = fb_copy;
endmodule
