// Controller test with a stand-in pattern generator of period P = 7: a
// counter that is reset by lfsr_load, advances on lfsr_en and reports
// lfsr_done when it is at 0 (the "seed").
// Checks, clock by clock after tm rises:
//   clock 0 load; mem_we exactly at clock P+1 with route_cut already 1;
//   cmp_en at clocks 2P+1, 3P+1, ...; cycle_cnt counts them; route_cut is
//   0 during the golden period only; misr_restart at every done;
//   pass_fail = comp_out two clocks after each cmp_en; set restarts the
//   golden run; tm = 0 returns to idle with the generator stopped.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int P = 7;
  logic clk = 0, rst, set, tm, done, comp_out;
  logic lfsr_load, lfsr_en, route_cut, misr_en, misr_restart, mem_we, cmp_en, pass_fail;
  logic [10:0] cycle_cnt;
  phase_e phase;
  int cnt;
  int checks = 0, failures = 0;

  bist_controller dut (.clk(clk), .rst(rst), .set(set), .tm(tm), .lfsr_done(done), .comp_out(comp_out),
    .lfsr_load(lfsr_load), .lfsr_en(lfsr_en), .route_cut(route_cut), .misr_en(misr_en),
    .misr_restart(misr_restart), .mem_we(mem_we), .cmp_en(cmp_en), .pass_fail(pass_fail),
    .cycle_cnt(cycle_cnt), .phase(phase));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (lfsr_load)    cnt <= 0;
    else if (lfsr_en) cnt <= (cnt + 1) % P;
  end
  assign done = (cnt == 0);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // run n clocks after tm rose at clock t0 = 0 and check the schedule
  task automatic run_session(int nper, logic [31:0] comp_pattern);
    int t, k;
    logic cmp_seen_d1, cmp_seen_d2, exp_pf;
    cmp_seen_d1 = 0; cmp_seen_d2 = 0;
    exp_pf = pass_fail;
    for (t = 0; t <= (nper + 1) * P + 3; t++) begin
      // inputs settle on the negative edge; sample controller outputs
      #1;
      if (t == 0) check("load at tm", lfsr_load && !lfsr_en);
      else begin
        check("running", lfsr_en && misr_en && !lfsr_load);
        check("restart at done", misr_restart == done);
        check($sformatf("mem_we t=%0d", t), mem_we == (t == P + 1));
        check($sformatf("cmp_en t=%0d", t), cmp_en == (t > P + 1 && (t - 1) % P == 0));
        check($sformatf("route t=%0d", t), route_cut == (t >= P + 1));
      end
      k = (t > P + 1) ? (t - 1) / P - 1 - (((t - 1) % P == 0) ? 1 : 0) : 0;
      if (t > 1) check($sformatf("cycle_cnt t=%0d got %0d exp %0d", t, cycle_cnt, k), cycle_cnt == 11'(k));
      if (cmp_seen_d2) exp_pf = comp_out;
      check("pass_fail", pass_fail == exp_pf);
      cmp_seen_d2 = cmp_seen_d1;
      cmp_seen_d1 = cmp_en;
      comp_out = comp_pattern[t % 32];
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; set = 0; tm = 0; comp_out = 1;
    #12 rst = 0;
    @(negedge clk);
    check("idle", phase == PH_IDLE && !lfsr_en && !misr_en && route_cut && pass_fail == 0);
    // session 1: comparator result changes over time
    tm = 1;
    run_session(5, 32'hF0F0_3C3C);
    // set restarts the session
    set = 1;
    @(negedge clk);
    set = 0;
    #1 check("idle after set", phase == PH_IDLE);
    run_session(3, 32'h0000_FFFF);
    // test mode off
    tm = 0;
    @(negedge clk);
    #1 check("idle after tm low", phase == PH_IDLE && !lfsr_en && !lfsr_load && route_cut);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
