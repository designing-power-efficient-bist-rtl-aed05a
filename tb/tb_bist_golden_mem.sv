// Golden memory test: valid is 0 after reset; a write stores the word and
// sets valid; without we the word holds; a later write replaces it.
module tb_bist_golden_mem;
  logic clk = 0, rst, we, valid;
  logic [6:0] wdata, r_data, model;
  logic       mvalid;
  int checks = 0, failures = 0;

  bist_golden_mem #(.L(7)) dut (.clk(clk), .rst(rst), .we(we), .wdata(wdata), .r_data(r_data), .valid(valid));

  always #5 clk = ~clk;

  initial begin
    rst = 1; we = 0; wdata = 0; model = 0; mvalid = 0;
    #12 rst = 0;
    checks++;
    if (valid !== 1'b0) failures++;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we    = ($urandom % 5) == 0;
      wdata = 7'($urandom);
      @(posedge clk);
      if (we) begin model = wdata; mvalid = 1; end
      #1;
      checks++;
      if (valid !== mvalid || (mvalid && r_data !== model)) begin
        failures++;
        $display("FAIL cycle %0d r_data=%h expected %h valid=%b", i, r_data, model, valid);
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
