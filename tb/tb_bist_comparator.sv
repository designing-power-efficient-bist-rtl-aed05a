// Comparator test: comp_out is 1 after reset, updates only when en = 1,
// one clock later, to (golden stored and sig == golden), and holds
// otherwise. Half of the comparisons use equal words.
module tb_bist_comparator;
  logic clk = 0, rst, en, gv, comp_out, model;
  logic [2:0] sig, golden;
  int checks = 0, failures = 0;

  bist_comparator #(.L(3)) dut (.clk(clk), .rst(rst), .en(en), .sig(sig), .golden(golden),
    .golden_valid(gv), .comp_out(comp_out));

  always #5 clk = ~clk;

  initial begin
    rst = 1; en = 0; sig = 0; golden = 0; gv = 0; model = 1;
    #12 rst = 0;
    checks++;
    if (comp_out !== 1'b1) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en     = 1'($urandom);
      gv     = ($urandom % 8) != 0;
      golden = 3'($urandom);
      sig    = ($urandom % 2) ? golden : 3'($urandom);
      @(posedge clk);
      if (en) model = gv && (sig == golden);
      #1;
      checks++;
      if (comp_out !== model) begin
        failures++;
        $display("FAIL cycle %0d comp_out=%b expected %b", i, comp_out, model);
      end
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
