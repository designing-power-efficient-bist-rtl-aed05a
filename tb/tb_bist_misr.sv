// MISR test at L = 3 and L = 7: random responses, enable and restart for
// 500 clocks, compared with a reference model
//   sig = {base[L-2:0], xor of tap bits of base} ^ din, base = restart ? 0 : sig
// with feedback Q2^Q0 (L = 3) and Q6^Q5 (L = 7).
module tb_bist_misr;
  logic clk = 0, rst, en, restart;
  logic [2:0] din3, sig3, m3;
  logic [6:0] din7, sig7, m7;
  int checks = 0, failures = 0;

  bist_misr #(.L(3)) dut3 (.clk(clk), .rst(rst), .en(en), .restart(restart), .din(din3), .sig(sig3));
  bist_misr #(.L(7)) dut7 (.clk(clk), .rst(rst), .en(en), .restart(restart), .din(din7), .sig(sig7));

  always #5 clk = ~clk;

  initial begin
    rst = 1; en = 0; restart = 0; din3 = 0; din7 = 0; m3 = 0; m7 = 0;
    #12 rst = 0;
    checks++;
    if (sig3 !== 0 || sig7 !== 0) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en      = ($urandom % 8) != 0;
      restart = ($urandom % 16) == 0;
      din3 = 3'($urandom);
      din7 = 7'($urandom);
      @(posedge clk);
      if (en) begin
        logic [2:0] b3;
        logic [6:0] b7;
        b3 = restart ? 3'd0 : m3;
        b7 = restart ? 7'd0 : m7;
        m3 = {b3[1:0], b3[2] ^ b3[0]} ^ din3;
        m7 = {b7[5:0], b7[6] ^ b7[5]} ^ din7;
      end
      #1;
      checks++;
      if (sig3 !== m3 || sig7 !== m7) begin
        failures++;
        $display("FAIL cycle %0d sig3=%b/%b sig7=%b/%b", i, sig3, m3, sig7, m7);
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
