// The published larger configurations of the BIST.
//
// 16-bit (K = 6, L = 7): a complete session, golden run of 65535 patterns
// and test periods, first fault-free, then with a stuck-at-1 fault, then
// with the bridging fault. A reference model (LFSR x^16+x^15+x^13+x^4+1 with
// the MSB-controlled pair swap, ALU, 7-bit MISR with feedback Q6^Q5)
// predicts every signature; comp_out must agree and the period must be
// 65535 clocks.
// 32-bit (K = 14, L = 15): a period of 2^32 - 1 clocks cannot be simulated,
// so only normal mode and the first 3000 test patterns are checked against
// the model.
module tb_bist_scaled;
  import bist_pkg::*;

  logic clk = 0, rst, set, tm, br;
  int checks = 0, failures = 0;

  // 16-bit instance
  logic [15:0] e16, sa0_16, sa1_16, pat16;
  logic        pf16, co16, done16, c16;
  logic [6:0]  data16, rdata16;
  logic [5:0]  out16;
  logic [10:0] cnt16;
  phase_e      ph16;

  bist_top #(.N(16)) dut16 (
    .i_clk(clk), .i_rst(rst), .set(set), .tm(tm), .e_input(e16), .bridge_fault(br),
    .s_a_0(sa0_16), .s_a_1(sa1_16), .pass_fail(pf16), .comp_out(co16),
    .o_lfsr_data(pat16), .o_lfsr_done(done16), .data(data16), .r_data(rdata16),
    .alu_out(out16), .carry_out(c16), .cycle_cnt(cnt16), .phase(ph16));

  // 32-bit instance
  logic        tm32;
  logic [31:0] e32, pat32;
  logic        pf32, co32, done32, c32;
  logic [14:0] data32, rdata32;
  logic [13:0] out32;
  logic [10:0] cnt32;
  phase_e      ph32;

  bist_top #(.N(32)) dut32 (
    .i_clk(clk), .i_rst(rst), .set(1'b0), .tm(tm32), .e_input(e32), .bridge_fault(1'b0),
    .s_a_0(32'd0), .s_a_1(32'd0), .pass_fail(pf32), .comp_out(co32),
    .o_lfsr_data(pat32), .o_lfsr_done(done32), .data(data32), .r_data(rdata32),
    .alu_out(out32), .carry_out(c32), .cycle_cnt(cnt32), .phase(ph32));

  always #5 clk = ~clk;

  // ---------------- reference model, any N ----------------
  function automatic logic [31:0] step(logic [31:0] s, int n);
    logic fb;
    if (n == 16) fb = s[15] ^ s[14] ^ s[12] ^ s[3];
    else         fb = s[31] ^ s[21] ^ s[1] ^ s[0];
    return ((s << 1) | 32'(fb)) & ((n == 32) ? 32'hFFFF_FFFF : ((32'd1 << n) - 1));
  endfunction
  function automatic logic [31:0] swap(logic [31:0] s, int n);
    logic [31:0] o;
    o = s;
    if (!s[n-1]) for (int k = 0; k < (n - 2) / 2; k++) begin
      o[2*k] = s[2*k+1];
      o[2*k+1] = s[2*k];
    end
    return o;
  endfunction
  function automatic logic [31:0] force_in(logic [31:0] x, logic [31:0] s0, logic [31:0] s1, logic b, int k);
    logic [31:0] y;
    logic w;
    y = (x | s1) & ~s0;
    if (b) begin w = y[0] & y[k]; y[0] = w; y[k] = w; end
    return y;
  endfunction
  function automatic logic [31:0] alu(logic [31:0] x, int k);  // {carry, result}
    longint unsigned a, b, c, m, r;
    m = (64'd1 << k) - 1;
    a = x & m; b = (x >> k) & m; c = (x >> (2 * k + 3)) & 1;
    case ((x >> (2 * k)) & 7)
      0: r = a + b + c;
      1: r = a + (~b & m) + c;
      2: r = a & b;
      3: r = a | b;
      4: r = a ^ b;
      5: r = ~(a ^ b) & m;
      6: r = a + c;
      default: r = (a << 1) | c;
    endcase
    return 32'(r & ((64'd1 << (k + 1)) - 1));
  endfunction
  function automatic logic [6:0] misr7(logic [6:0] s, logic [6:0] d);
    return {s[5:0], s[6] ^ s[5]} ^ d;
  endfunction
  function automatic logic [6:0] sig16(logic [15:0] s0, logic [15:0] s1, logic b, logic clean0);
    logic [31:0] st;
    logic [6:0] sg;
    st = 32'hFFFF;
    sg = 0;
    for (int i = 0; i < 65535; i++) begin
      if (i == 0 && clean0) sg = misr7(sg, 7'(alu(swap(st, 16), 6)));
      else                  sg = misr7(sg, 7'(alu(force_in(swap(st, 16), 32'(s0), 32'(s1), b, 6), 6)));
      st = step(st, 16);
    end
    return sg;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic next_compare16(output int waited);
    logic [10:0] c0;
    c0 = cnt16;
    waited = 0;
    while (cnt16 == c0 && waited < 140000) begin
      @(negedge clk);
      waited++;
    end
  endtask

  logic [6:0] golden16;
  int n_detect = 0;

  initial begin
    int w;
    logic [31:0] st;
    logic e1, e2;
    rst = 1; set = 0; tm = 0; tm32 = 0; br = 0; e16 = 0; e32 = 0; sa0_16 = 0; sa1_16 = 0;
    golden16 = sig16(0, 0, 0, 0);
    #12 rst = 0;
    // normal mode on both sizes
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      e16 = 16'($urandom); e32 = $urandom;
      #1;
      check("16-bit normal mode", {c16, out16} == 7'(alu(32'(e16), 6)));
      check("32-bit normal mode", {c32, out32} == 15'(alu(e32, 14)));
    end
    // 32-bit: first patterns of the test run
    tm32 = 1;
    @(negedge clk);
    st = 32'hFFFF_FFFF;
    for (int i = 0; i < 3000; i++) begin
      check("32-bit pattern", pat32 == swap(st, 32) && ph32 == PH_GOLDEN);
      st = step(st, 32);
      @(negedge clk);
    end
    tm32 = 0;
    // 16-bit session
    tm = 1;
    @(negedge clk);
    for (w = 0; ph16 != PH_TEST && w < 70000; w++) @(negedge clk);
    check($sformatf("16-bit golden run length %0d", w), w == 65536);
    check("16-bit golden signature", rdata16 == golden16);
    next_compare16(w);
    check($sformatf("16-bit period %0d", w), w == 65535);
    check("16-bit fault-free pass", co16);
    // stuck-at-1 on the top bit of operand A, applied right after a compare
    sa1_16 = 16'h0020;
    e1 = sig16(0, 16'h0020, 0, 1) == golden16;
    e2 = sig16(0, 16'h0020, 0, 0) == golden16;
    next_compare16(w);
    check("16-bit stuck-at-1, first period", co16 == e1);
    next_compare16(w);
    check("16-bit stuck-at-1, full period", co16 == e2);
    @(negedge clk);
    check("16-bit stuck-at-1 pass_fail", pf16 == e2);
    if (!co16) n_detect++;
    // bridging fault
    sa1_16 = 0;
    br = 1;
    e1 = sig16(0, 0, 1, 1) == golden16;
    e2 = sig16(0, 0, 1, 0) == golden16;
    next_compare16(w);
    check("16-bit bridge, first period", co16 == e1);
    next_compare16(w);
    check("16-bit bridge, full period", co16 == e2);
    if (!co16) n_detect++;
    check("16-bit faults detected", n_detect == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
