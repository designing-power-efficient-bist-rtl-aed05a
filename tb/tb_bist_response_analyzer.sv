// Response analyzer test (K = 2, L = 3): random reference and CUT responses
// and random route/enable/restart for 400 clocks. alu_out/carry_out must
// follow the selected source at once, and the signature must match a MISR
// model fed with the selected {carry, result}.
module tb_bist_response_analyzer;
  logic clk = 0, rst, route, en, restart;
  logic [1:0] ref_out, cut_out, alu_out;
  logic       ref_c, cut_c, carry_out;
  logic [2:0] sig, m, sel, b;
  int checks = 0, failures = 0;

  bist_response_analyzer #(.K(2), .L(3)) dut (
    .clk(clk), .rst(rst), .route_cut(route), .misr_en(en), .misr_restart(restart),
    .ref_out(ref_out), .ref_carry(ref_c), .cut_out(cut_out), .cut_carry(cut_c),
    .alu_out(alu_out), .carry_out(carry_out), .sig(sig));

  always #5 clk = ~clk;

  initial begin
    rst = 1; route = 0; en = 0; restart = 0; ref_out = 0; cut_out = 0; ref_c = 0; cut_c = 0; m = 0;
    #12 rst = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      route = 1'($urandom); en = ($urandom % 4) != 0; restart = ($urandom % 10) == 0;
      ref_out = 2'($urandom); cut_out = 2'($urandom); ref_c = 1'($urandom); cut_c = 1'($urandom);
      #1;
      sel = route ? {cut_c, cut_out} : {ref_c, ref_out};
      checks++;
      if ({carry_out, alu_out} !== sel) begin failures++; $display("FAIL mux cycle %0d", i); end
      @(posedge clk);
      if (en) begin
        b = restart ? 3'd0 : m;
        m = {b[1:0], b[2] ^ b[0]} ^ sel;
      end
      #1;
      checks++;
      if (sig !== m) begin failures++; $display("FAIL sig cycle %0d %b expected %b", i, sig, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
