// Exhaustive test of the double Feynman gate: P = A, Q = A xor B,
// R = A xor C; with B = 1, C = 0 the outputs are A, A', A.
module tb_dfg_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  dfg_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== (a != c)) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b", a, b, c, p, q, r);
      end
    end
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
