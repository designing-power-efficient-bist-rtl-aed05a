// BIST controller: sequences normal operation, golden run and test runs.
//
// PH_IDLE   test mode off: the LFSR and MISR stand still and the CUT works
//           on e_input. When tm rises the seed is loaded (lfsr_load) and
//           the controller enters PH_GOLDEN.
// PH_GOLDEN one full LFSR period is routed through the fault-free ALU. The
//           LFSR reports the seed (lfsr_done) at the start of the period
//           and again when the period is complete; at that second report
//           the MISR signature is written to the golden memory (mem_we)
//           and the controller enters PH_TEST.
// PH_TEST   the same period is applied again and again to the circuit under
//           test. Each time the LFSR returns to the seed the signature is
//           compared (cmp_en), cycle_cnt counts the compared periods and,
//           one clock after the comparator has updated, pass_fail takes
//           the comparator result.
// At every period boundary the MISR restarts, absorbing the first pattern
// of the next period in the same clock. route_cut switches to the CUT in
// the very clock that ends the golden period, so that the first pattern of
// the first test period already reaches the CUT. set restarts the session
// (reload seed, new golden run); dropping tm returns to PH_IDLE.
//
// Timing with P = 2^N - 1 patterns per period: the golden signature is
// written P+1 clocks after tm is seen high, the first comparison is made
// P clocks later and pass_fail follows 2 clocks after that comparison.
// The sequencing is this design's reading of the described flow; the
// 11-bit period counter width follows the published waveforms.
// Asynchronous active-high reset; pass_fail resets to 0 (no verdict).
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned CNT_W = 11
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             set,
  input  logic             tm,
  input  logic             lfsr_done,
  input  logic             comp_out,
  output logic             lfsr_load,
  output logic             lfsr_en,
  output logic             route_cut,
  output logic             misr_en,
  output logic             misr_restart,
  output logic             mem_we,
  output logic             cmp_en,
  output logic             pass_fail,
  output logic [CNT_W-1:0] cycle_cnt,
  output phase_e           phase
);
  logic started, cmp_d, running, period_end;

  assign running      = (phase != PH_IDLE);
  assign period_end   = running && lfsr_done && started;
  assign lfsr_load    = (phase == PH_IDLE) && tm;
  assign lfsr_en      = running;
  assign misr_en      = running;
  assign misr_restart = running && lfsr_done;
  assign mem_we       = period_end && (phase == PH_GOLDEN);
  assign cmp_en       = period_end && (phase == PH_TEST);
  assign route_cut    = (phase != PH_GOLDEN) || mem_we;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase     <= PH_IDLE;
      started   <= 1'b0;
      cycle_cnt <= '0;
      cmp_d     <= 1'b0;
      pass_fail <= 1'b0;
    end else begin
      cmp_d <= cmp_en;
      if (cmp_d) pass_fail <= comp_out;

      if (!tm || set) begin
        phase   <= PH_IDLE;
        started <= 1'b0;
      end else begin
        unique case (phase)
          PH_IDLE: begin
            phase     <= PH_GOLDEN;
            started   <= 1'b0;
            cycle_cnt <= '0;
          end
          PH_GOLDEN: begin
            if (lfsr_done) started <= 1'b1;
            if (mem_we)    phase   <= PH_TEST;
          end
          PH_TEST: begin
            if (cmp_en) cycle_cnt <= cycle_cnt + 1'b1;
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // the memory is never written while a comparison is made
  assert property (@(posedge clk) !(mem_we && cmp_en));
  // the phase register only takes its three defined values
  assert property (@(posedge clk) phase inside {PH_IDLE, PH_GOLDEN, PH_TEST});
endmodule
