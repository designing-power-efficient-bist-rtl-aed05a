// Exhaustive test of the Feynman gate: P = A, Q = A xor B, and the four
// output pairs are all different (reversibility).
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  logic [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL in=%b%b out=%b%b", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen !== 4'hF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
