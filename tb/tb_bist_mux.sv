// 2:1 multiplexer test: random data at widths 8, 2 and 1 (the three uses
// in the design), both select values, compared with the selected input.
module tb_bist_mux;
  logic       sel;
  logic [7:0] a8, b8, y8;
  logic [1:0] a2, b2, y2;
  logic       a1, b1, y1;
  int checks = 0, failures = 0;

  bist_mux #(.W(8)) m8 (.sel(sel), .d0(a8), .d1(b8), .y(y8));
  bist_mux #(.W(2)) m2 (.sel(sel), .d0(a2), .d1(b2), .y(y2));
  bist_mux #(.W(1)) m1 (.sel(sel), .d0(a1), .d1(b1), .y(y1));

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'(i);
      a8 = 8'($urandom); b8 = 8'($urandom);
      a2 = 2'($urandom); b2 = 2'($urandom);
      a1 = 1'($urandom); b1 = 1'($urandom);
      #1;
      checks++;
      if (y8 !== (sel ? b8 : a8) || y2 !== (sel ? b2 : a2) || y1 !== (sel ? b1 : a1)) begin
        failures++;
        $display("FAIL sel=%b %h/%h->%h", sel, a8, b8, y8);
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
