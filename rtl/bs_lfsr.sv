// Reversible bit-swapping LFSR (BS-LFSR): the test pattern generator.
//
// N reversible D flip-flops form a shift register that moves towards the
// MSB each enabled clock. Stage 0 receives the XOR of the tap stages,
// formed by a chain of Feynman gates (taps from bist_pkg::lfsr_taps; for
// N = 8 this is Q7^Q5^Q4^Q3, the polynomial x^8+x^6+x^5+x^4+1).
// In front of every flip-flop an RMUX gate selects the seed bit while
// load = 1.
//
// The pattern leaving the block is bit-swapped to cut switching activity:
// RMUX gates controlled by the MSB exchange the adjacent pairs
// (Q0,Q1), (Q2,Q3), ... up to bit N-3 when the MSB is 0 and pass them
// unchanged when it is 1; bit N-2 and the MSB are never swapped. With the
// all-ones seed the 8-bit block produces ff, fe, fc, f8, f0, e1, c2, 85,
// 07, 2b, 1f, ... and returns to ff after 2^N - 1 clocks.
//
// Interface: load has priority over en. o_lfsr_done is high while the
// register holds the seed, which marks the boundary between two periods.
// Outputs depend only on the registers and the seed input.
// The garbage outputs of the reversible gates (RMUX P/R, Feynman P, Q') are
// kept as named nets but drive nothing; lint reports them as unused.
module bs_lfsr #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         en,
  input  logic [N-1:0] seed,
  output logic [N-1:0] o_lfsr_data,
  output logic [N-1:0] o_lfsr_state,
  output logic         o_lfsr_done
);
  localparam logic [63:0] TAPS = bist_pkg::lfsr_taps(N);

  logic [N-1:0] q, qn, d, shift_in, p_ld, r_ld;
  logic [N:0]   fb_chain;   // running XOR through the Feynman chain
  logic [N-1:0] fb_copy;    // pass-through outputs of the Feynman gates
  logic         cap;

  assign cap = load | en;

  // feedback: a Feynman gate per tap accumulates the XOR
  assign fb_chain[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_fb
    if (TAPS[i]) begin : g_tap
      feynman_gate u_fg (.a(q[i]), .b(fb_chain[i]), .p(fb_copy[i]), .q(fb_chain[i+1]));
    end else begin : g_notap
      assign fb_copy[i]    = q[i];
      assign fb_chain[i+1] = fb_chain[i];
    end
  end

  assign shift_in = {q[N-2:0], fb_chain[N]};

  for (genvar i = 0; i < N; i++) begin : g_stage
    rmux_gate u_ld (.a(load), .b(shift_in[i]), .c(seed[i]), .p(p_ld[i]), .q(d[i]), .r(r_ld[i]));
    rev_dff   u_ff (.clk(clk), .rst(rst), .en(cap), .d(d[i]), .q(q[i]), .qn(qn[i]));
  end

  // bit swapping of the output pattern, controlled by the MSB
  localparam int unsigned NSWAP  = (N >= 4) ? (N - 2) / 2 : 0;
  logic [N-1:0] sw_p, sw_r;

  for (genvar i = 0; i < N; i++) begin : g_swap
    if (i < 2 * NSWAP) begin : g_pair
      // partner of bit i in its pair
      localparam int unsigned J = (i % 2 == 0) ? i + 1 : i - 1;
      rmux_gate u_sw (.a(q[N-1]), .b(q[J]), .c(q[i]), .p(sw_p[i]), .q(o_lfsr_data[i]), .r(sw_r[i]));
    end else begin : g_pass
      assign sw_p[i] = 1'b0;
      assign sw_r[i] = 1'b0;
      assign o_lfsr_data[i] = q[i];
    end
  end

  assign o_lfsr_state = q;
  assign o_lfsr_done  = (q == seed);
endmodule
