// Exhaustive test of the Sam gate: all 8 input combinations against the
// controlled-swap behaviour (A=0: Q=B, R=C; A=1: Q=C, R=B; P=A'), plus a
// check that the 8 output triples are all different (reversibility).
module tb_sam_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [7:0] seen;

  sam_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== !a || q !== (a ? c : b) || r !== (a ? b : c)) begin
        failures++;
        $display("FAIL in=%b%b%b out=%b%b%b", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin failures++; $display("FAIL not reversible %b", seen); end
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
