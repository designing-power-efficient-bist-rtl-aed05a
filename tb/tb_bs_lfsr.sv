// BS-LFSR test.
// 8-bit instance, seed ff: the first patterns must be the published
// sequence ff fe fc f8 f0 e1 c2 85 07 2b 1f; every pattern is compared with
// a reference model (shift left, new bit 0 = Q7^Q5^Q4^Q3, pairs (0,1),
// (2,3), (4,5) swapped when the MSB is 0); done must come back after
// exactly 255 clocks with 255 distinct states in between; en = 0 must hold
// the state. Over the 8-bit period the number of bit toggles of the swapped
// output must be lower than that of the raw register (the point of the bit
// swap; about a fifth fewer for this sequence). 16-bit instance:
// reference model for the whole period and a period of exactly 65535 clocks.
// 4-bit instance (the size of the gate-level drawing of the BS-LFSR): new
// bit 0 = Q3^Q2, pair (Q0,Q1) swapped while Q3 = 0, period 15.
module tb_bs_lfsr;
  logic clk = 0, rst;
  logic load8, en8, load16, en16;
  logic [7:0]  data8, state8;
  logic [15:0] data16, state16;
  logic        done8, done16, done4, load4, en4;
  logic [3:0]  data4, state4, m4;
  int          tog_raw, tog_swap;
  logic [7:0]  prev_raw, prev_swap;
  int checks = 0, failures = 0;

  bs_lfsr #(.N(8)) dut8 (.clk(clk), .rst(rst), .load(load8), .en(en8), .seed(8'hFF),
    .o_lfsr_data(data8), .o_lfsr_state(state8), .o_lfsr_done(done8));
  bs_lfsr #(.N(16)) dut16 (.clk(clk), .rst(rst), .load(load16), .en(en16), .seed(16'hACE1),
    .o_lfsr_data(data16), .o_lfsr_state(state16), .o_lfsr_done(done16));

  bs_lfsr #(.N(4)) dut4 (.clk(clk), .rst(rst), .load(load4), .en(en4), .seed(4'h1),
    .o_lfsr_data(data4), .o_lfsr_state(state4), .o_lfsr_done(done4));

  always #5 clk = ~clk;

  function automatic logic [7:0] step8(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  function automatic logic [7:0] swap8(logic [7:0] s);
    if (s[7]) return s;
    return {s[7], s[6], s[4], s[5], s[2], s[3], s[0], s[1]};
  endfunction
  function automatic logic [15:0] step16(logic [15:0] s);
    return {s[14:0], s[15] ^ s[14] ^ s[12] ^ s[3]};
  endfunction
  function automatic logic [15:0] swap16(logic [15:0] s);
    logic [15:0] o;
    o = s;
    if (!s[15]) for (int k = 0; k < 7; k++) begin
      o[2*k]   = s[2*k+1];
      o[2*k+1] = s[2*k];
    end
    return o;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [7:0] expect8 [11] = '{8'hff, 8'hfe, 8'hfc, 8'hf8, 8'hf0, 8'he1, 8'hc2, 8'h85, 8'h07, 8'h2b, 8'h1f};
  logic [7:0]  m8;
  logic [15:0] m16;
  logic [255:0] seen;
  int period;

  initial begin
    rst = 1; load8 = 0; en8 = 0; load16 = 0; en16 = 0; load4 = 0; en4 = 0;
    #12 rst = 0;
    @(negedge clk) begin load8 = 1; load16 = 1; end
    @(negedge clk) begin load8 = 0; load16 = 0; en8 = 1; en16 = 1; end
    check("load8", state8 == 8'hFF && done8);
    check("load16", state16 == 16'hACE1 && done16);
    // published sequence
    for (int i = 0; i < 11; i++) begin
      check($sformatf("published pattern %0d = %h got %h", i, expect8[i], data8), data8 == expect8[i]);
      @(negedge clk);
    end
    // hold
    en8 = 0;
    m8 = state8;
    repeat (3) @(negedge clk);
    check("hold", state8 == m8);
    en8 = 1;
    // full 8-bit period against the model
    seen = '0;
    period = 0;
    tog_raw = 0; tog_swap = 0;
    prev_raw = state8; prev_swap = data8;
    do begin
      tog_raw  += $countones(state8 ^ prev_raw);
      tog_swap += $countones(data8 ^ prev_swap);
      prev_raw = state8; prev_swap = data8;
      check("swap model 8", data8 == swap8(m8));
      check("distinct 8", !seen[m8]);
      seen[m8] = 1'b1;
      @(negedge clk);
      m8 = step8(m8);
      check("step model 8", state8 == m8);
      period++;
    end while (!done8 && period < 300);
    check($sformatf("8-bit period %0d", period + 11), period + 11 == 255);
    $display("8-bit toggles over %0d patterns: raw %0d, bit-swapped %0d", period, tog_raw, tog_swap);
    check("bit swap lowers toggles", tog_swap < tog_raw && tog_raw > 0);
    // 4-bit instance
    @(negedge clk) load4 = 1;
    @(negedge clk) begin load4 = 0; en4 = 1; end
    m4 = 4'h1;
    period = 0;
    do begin
      check("swap model 4", data4 == (m4[3] ? m4 : {m4[3:2], m4[0], m4[1]}));
      @(negedge clk);
      m4 = {m4[2:0], m4[3] ^ m4[2]};
      check("step model 4", state4 == m4);
      period++;
    end while (!done4 && period < 40);
    check($sformatf("4-bit period %0d", period), period == 15);
    en4 = 0;
    // 16-bit period
    m16 = 16'hACE1;
    for (int i = 0; i < 300; i++) @(negedge clk);
    en16 = 0;
    load16 = 1;
    @(negedge clk);
    load16 = 0; en16 = 1;
    period = 0;
    do begin
      if (period < 2000) check("swap model 16", data16 == swap16(m16));
      @(negedge clk);
      m16 = step16(m16);
      if (period < 2000) check("step model 16", state16 == m16);
      period++;
    end while (!done16 && period < 70000);
    check($sformatf("16-bit period %0d", period), period == 65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
