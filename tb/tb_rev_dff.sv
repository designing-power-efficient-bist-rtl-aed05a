// Reversible D flip-flop test: after reset q = 0; then 200 clocks of random
// en and d, comparing q and qn with a reference register that loads d on
// every rising edge with en = 1 and holds otherwise.
module tb_rev_dff;
  logic clk = 0, rst, en, d, q, qn, model;
  int checks = 0, failures = 0;

  rev_dff dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q), .qn(qn));

  always #5 clk = ~clk;

  initial begin
    rst = 1; en = 0; d = 0; model = 0;
    #12 rst = 0;
    checks++;
    if (q !== 1'b0 || qn !== 1'b1) failures++;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = 1'($urandom);
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model || qn !== !model) begin
        failures++;
        $display("FAIL cycle %0d en=%b d=%b q=%b expected %b", i, en, d, q, model);
      end
    end
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
