// End-to-end test of the 8-bit BIST at its default parameters.
//
// A reference model in this file (LFSR x^8+x^6+x^5+x^4+1 with MSB-controlled
// pair swap, ALU, fault forcing, 3-bit MISR, feedback Q2^Q0) predicts the golden
// signature and the signature of every test period. The test walks through:
//   normal mode   tm = 0, e_input drives the CUT, alu_out/carry_out checked;
//   golden run    tm = 1, patterns checked against the model every clock,
//                 golden signature checked, P+1 = 256 clocks to PH_TEST;
//   test periods  fault-free: comp_out = pass_fail = 1, one comparison
//                 every P = 255 clocks;
//   faults        stuck-at-0 (mask 40), stuck-at-1 (mask 04), the bridging
//                 fault and the published mask pair 40/02, each detected
//                 (comp_out and then pass_fail low) and then removed (pass
//                 again); stuck-at-0 mask 02, whose 3-bit signature
//                 aliases with the golden one, must pass as the model says;
//   set           restart of the session and a new golden run;
//   tm low        return to normal mode.
// Every mechanism is counted and one that never happened is a failure.
module tb_bist_top;
  import bist_pkg::*;
  localparam int P = 255;

  logic        clk = 0, rst, set, tm, br;
  logic [7:0]  e_input, sa0, sa1, o_lfsr_data;
  logic        pass_fail, comp_out, o_lfsr_done, carry_out;
  logic [2:0]  data, r_data;
  logic [1:0]  alu_out;
  logic [10:0] cycle_cnt;
  phase_e      phase;
  int checks = 0, failures = 0;
  int n_normal = 0, n_swap = 0, n_golden = 0, n_pass = 0, n_sa0 = 0, n_sa1 = 0, n_bridge = 0,
      n_set = 0, n_recover = 0, n_alias = 0;

  bist_top dut (
    .i_clk(clk), .i_rst(rst), .set(set), .tm(tm), .e_input(e_input), .bridge_fault(br),
    .s_a_0(sa0), .s_a_1(sa1), .pass_fail(pass_fail), .comp_out(comp_out),
    .o_lfsr_data(o_lfsr_data), .o_lfsr_done(o_lfsr_done), .data(data), .r_data(r_data),
    .alu_out(alu_out), .carry_out(carry_out), .cycle_cnt(cycle_cnt), .phase(phase));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  function automatic logic [7:0] step8(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [7:0] swap8(logic [7:0] s);
    if (s[7]) return s;
    return {s[7], s[6], s[4], s[5], s[2], s[3], s[0], s[1]};
  endfunction
  function automatic logic [7:0] force8(logic [7:0] x, logic [7:0] s0, logic [7:0] s1, logic b);
    logic [7:0] y;
    y = (x | s1) & ~s0;
    if (b) begin y[0] = y[0] & y[2]; y[2] = y[0]; end
    return y;
  endfunction
  function automatic logic [2:0] alu8(logic [7:0] x);   // {carry, result}
    int unsigned a, b, c, r;
    a = x[1:0]; b = x[3:2]; c = x[7];
    case (x[6:4])
      0: r = a + b + c;
      1: r = a + (3 - b) + c;
      2: r = a & b;
      3: r = a | b;
      4: r = a ^ b;
      5: r = 3 - (a ^ b);
      6: r = a + c;
      default: r = (a << 1) | c;
    endcase
    return 3'(r);
  endfunction
  function automatic logic [2:0] misr3(logic [2:0] s, logic [2:0] d);
    return {s[1:0], s[2] ^ s[0]} ^ d;
  endfunction
  // signature of one period; pattern 0 (the seed) without faults when clean0
  function automatic logic [2:0] period_sig(logic [7:0] s0, logic [7:0] s1, logic b, logic clean0);
    logic [7:0] st;
    logic [2:0] sig;
    st = 8'hFF;
    sig = 3'd0;
    for (int i = 0; i < P; i++) begin
      if (i == 0 && clean0) sig = misr3(sig, alu8(swap8(st)));
      else                  sig = misr3(sig, alu8(force8(swap8(st), s0, s1, b)));
      st = step8(st);
    end
    return sig;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [2:0] golden;

  // run the golden period from tm rising; checks patterns and timing
  task automatic golden_run();
    logic [7:0] st;
    int t;
    st = 8'hFF;
    // clock 0: seed load
    @(negedge clk);
    for (t = 1; t <= P; t++) begin
      check($sformatf("pattern %0d: %h expected %h", t, o_lfsr_data, swap8(st)), o_lfsr_data == swap8(st));
      check("golden phase", phase == PH_GOLDEN);
      if (swap8(st) != st) n_swap++;
      st = step8(st);
      @(negedge clk);
    end
    // clock P+1: seed again, signature written at the coming edge
    check("done at period end", o_lfsr_done && phase == PH_GOLDEN);
    @(negedge clk);
    check("test phase after P+1 clocks", phase == PH_TEST);
    check($sformatf("golden signature %0d expected %0d", r_data, golden), r_data == golden);
    n_golden++;
  endtask

  // wait for the next comparison (cycle_cnt advances), return clocks waited
  task automatic next_compare(output int waited);
    logic [10:0] c0;
    c0 = cycle_cnt;
    waited = 0;
    while (cycle_cnt == c0 && waited < 2 * P) begin
      @(negedge clk);
      waited++;
    end
  endtask

  // apply a fault right after a comparison and check detection and recovery
  task automatic fault_case(logic [7:0] s0, logic [7:0] s1, logic b, logic want_detect,
                           ref int counter, input string name);
    int w;
    logic exp1, exp2;
    next_compare(w);
    sa0 = s0; sa1 = s1; br = b;
    exp1 = (period_sig(s0, s1, b, 1) == golden);
    exp2 = (period_sig(s0, s1, b, 0) == golden);
    next_compare(w);
    check($sformatf("%s first period comp_out", name), comp_out == exp1);
    check($sformatf("compare interval %0d", w), w == P);
    @(negedge clk);
    check($sformatf("%s pass_fail follows", name), pass_fail == exp1);
    next_compare(w);
    check($sformatf("%s full period comp_out", name), comp_out == exp2);
    @(negedge clk);
    check($sformatf("%s pass_fail", name), pass_fail == exp2);
    check($sformatf("%s model outcome as intended", name), exp2 == !want_detect);
    if (comp_out == !want_detect && pass_fail == !want_detect) counter++;
    // remove the fault: the period after the removal is clean again
    sa0 = 0; sa1 = 0; br = 0;
    next_compare(w);
    next_compare(w);
    check($sformatf("%s removed comp_out", name), comp_out == 1'b1);
    @(negedge clk);
    check($sformatf("%s removed pass_fail", name), pass_fail == 1'b1);
    if (comp_out && pass_fail) n_recover++;
  endtask

  initial begin
    int w;
    golden = period_sig(8'h00, 8'h00, 1'b0, 1'b0);
    rst = 1; set = 0; tm = 0; br = 0; sa0 = 0; sa1 = 0; e_input = 0;
    #12 rst = 0;
    // normal mode, with and without faults on the CUT
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      e_input = 8'($urandom);
      if (i >= 50) begin sa0 = 8'h40; sa1 = 8'h02; br = 1'($urandom); end
      #1;
      check("normal mode output", {carry_out, alu_out} == alu8(force8(e_input, sa0, sa1, br)));
      check("normal mode phase", phase == PH_IDLE);
      n_normal++;
    end
    sa0 = 0; sa1 = 0; br = 0;
    // golden run
    @(negedge clk);
    tm = 1;
    golden_run();
    // first comparison P clocks after the golden write
    next_compare(w);
    check($sformatf("first compare after %0d clocks", w), w == P);
    check("fault-free comp_out", comp_out);
    @(negedge clk);
    check("fault-free pass_fail", pass_fail);
    next_compare(w);
    check("fault-free second period", comp_out && w == P - 1);
    if (comp_out) n_pass++;
    // faults (published example masks first)
    fault_case(8'h40, 8'h00, 1'b0, 1'b1, n_sa0, "stuck-at-0 mask 40");
    fault_case(8'h00, 8'h04, 1'b0, 1'b1, n_sa1, "stuck-at-1 mask 04");
    // a fault whose signature aliases with the 3-bit golden one: the model
    // predicts a pass and the design must agree
    fault_case(8'h02, 8'h00, 1'b0, 1'b0, n_alias, "stuck-at-0 mask 02 (aliased)");
    fault_case(8'h00, 8'h00, 1'b1, 1'b1, n_bridge, "bridge");
    fault_case(8'h40, 8'h02, 1'b0, 1'b1, n_sa0, "stuck-at masks 40/02");
    // set: restart, new golden run
    @(negedge clk);
    set = 1;
    @(negedge clk);
    set = 0;
    golden_run();
    check("cycle_cnt cleared by set", cycle_cnt == 0);
    next_compare(w);
    check("compare after set", comp_out && w == P);
    n_set++;
    // back to normal mode
    tm = 0;
    @(negedge clk);
    e_input = 8'h5A;
    #1;
    check("idle after tm low", phase == PH_IDLE && {carry_out, alu_out} == alu8(8'h5A));

    check("mechanism: normal mode", n_normal > 0);
    check("mechanism: bit swap", n_swap > 0);
    check("mechanism: golden run", n_golden == 2);
    check("mechanism: fault-free pass", n_pass > 0);
    check("mechanism: stuck-at-0 detected", n_sa0 > 0);
    check("mechanism: stuck-at-1 detected", n_sa1 > 0);
    check("mechanism: bridge detected", n_bridge > 0);
    check("mechanism: fault removed, pass again", n_recover > 0);
    check("mechanism: set restart", n_set > 0);
    check("mechanism: aliased fault passes as predicted", n_alias > 0);
    $display("mechanisms: normal=%0d swap=%0d golden=%0d pass=%0d sa0=%0d sa1=%0d bridge=%0d recover=%0d set=%0d alias=%0d",
             n_normal, n_swap, n_golden, n_pass, n_sa0, n_sa1, n_bridge, n_recover, n_set, n_alias);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
