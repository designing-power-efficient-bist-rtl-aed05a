// Scalable low-power BIST with a reversible bit-swapping LFSR.
//
// A BS-LFSR made of reversible gates generates pseudo-random N-bit patterns
// whose adjacent bit pairs are swapped under control of the MSB. The
// controller first applies one full LFSR period to a fault-free copy of the
// ALU and stores the resulting MISR signature in the golden memory; it then
// applies the same period to the circuit under test (ALU_FAULT, which can
// be given stuck-at and bridging faults) again and again, and at the end of
// each period the comparator checks the signature against the stored one.
// comp_out / pass_fail = 1 means the signatures matched. With tm = 0 the CUT
// simply computes on e_input and its result appears on alu_out/carry_out.
//
// Datapath, as in the block diagram:
//   BS-LFSR -> DEMUX -> y_out1 -> ALU ---------------> MUX2/MUX3 -> MISR
//                    -> y_out2 -> MUX1 -> ALU_FAULT -> MUX2/MUX3 -> MISR
//   e_input -----------------------^
//   MISR -> golden memory (ROM) -> COMP <- MISR;  COMP -> controller
// Sizes: N pattern bits, K = N/2 - 2 ALU bits, L = K + 1 signature bits
// (published configurations N = 8, 16, 32). SEED is the LFSR start value
// (all ones, as in the published waveforms).
// Timing: see bist_controller; one period is 2^N - 1 clocks.
// The raw LFSR state is not needed at this level and is left unconnected.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter logic [N-1:0] SEED = '1,
  parameter int unsigned K    = alu_width(N),
  parameter int unsigned L    = sig_width(N)
) (
  input  logic          i_clk,
  input  logic          i_rst,
  input  logic          set,
  input  logic          tm,
  input  logic [N-1:0]  e_input,
  input  logic          bridge_fault,
  input  logic [N-1:0]  s_a_0,
  input  logic [N-1:0]  s_a_1,
  output logic          pass_fail,
  output logic          comp_out,
  output logic [N-1:0]  o_lfsr_data,
  output logic          o_lfsr_done,
  output logic [L-1:0]  data,
  output logic [L-1:0]  r_data,
  output logic [K-1:0]  alu_out,
  output logic          carry_out,
  output logic [10:0]   cycle_cnt,
  output phase_e        phase
);
  logic         lfsr_load, lfsr_en, route_cut, misr_en, misr_restart, mem_we, cmp_en;
  logic         golden_valid;
  logic [N-1:0] lfsr_state, y_out1, y_out2, cut_inp;
  logic [K-1:0] alu_ref_out, alu_cut_out;
  logic         carry_ref, carry_cut;

  bist_controller #(.CNT_W(11)) u_ctrl (
    .clk(i_clk), .rst(i_rst), .set(set), .tm(tm),
    .lfsr_done(o_lfsr_done), .comp_out(comp_out),
    .lfsr_load(lfsr_load), .lfsr_en(lfsr_en), .route_cut(route_cut),
    .misr_en(misr_en), .misr_restart(misr_restart), .mem_we(mem_we), .cmp_en(cmp_en),
    .pass_fail(pass_fail), .cycle_cnt(cycle_cnt), .phase(phase)
  );

  bs_lfsr #(.N(N)) u_lfsr (
    .clk(i_clk), .rst(i_rst), .load(lfsr_load), .en(lfsr_en), .seed(SEED),
    .o_lfsr_data(o_lfsr_data), .o_lfsr_state(lfsr_state), .o_lfsr_done(o_lfsr_done)
  );

  bist_demux #(.W(N)) u_demux (.sel(route_cut), .din(o_lfsr_data), .y_out1(y_out1), .y_out2(y_out2));

  bist_mux #(.W(N)) u_mux1 (.sel(tm), .d0(e_input), .d1(y_out2), .y(cut_inp));

  bist_alu #(.N(N), .K(K)) u_alu (.din(y_out1), .alu_out(alu_ref_out), .carry_out(carry_ref));

  bist_alu_fault #(.N(N), .K(K)) u_alu_fault (
    .din(cut_inp), .s_a_0(s_a_0), .s_a_1(s_a_1), .bridge_fault(bridge_fault),
    .alu_out(alu_cut_out), .carry_out(carry_cut)
  );

  bist_response_analyzer #(.K(K), .L(L)) u_ra (
    .clk(i_clk), .rst(i_rst), .route_cut(route_cut), .misr_en(misr_en), .misr_restart(misr_restart),
    .ref_out(alu_ref_out), .ref_carry(carry_ref), .cut_out(alu_cut_out), .cut_carry(carry_cut),
    .alu_out(alu_out), .carry_out(carry_out), .sig(data)
  );

  bist_golden_mem #(.L(L)) u_mem (
    .clk(i_clk), .rst(i_rst), .we(mem_we), .wdata(data), .r_data(r_data), .valid(golden_valid)
  );

  bist_comparator #(.L(L)) u_comp (
    .clk(i_clk), .rst(i_rst), .en(cmp_en), .sig(data), .golden(r_data),
    .golden_valid(golden_valid), .comp_out(comp_out)
  );
endmodule
