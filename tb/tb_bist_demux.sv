// Demultiplexer test: random 8-bit patterns, both selects; the selected
// output must carry the pattern and the other must be 0.
module tb_bist_demux;
  logic       sel;
  logic [7:0] din, y1, y2;
  int checks = 0, failures = 0;

  bist_demux #(.W(8)) dut (.sel(sel), .din(din), .y_out1(y1), .y_out2(y2));

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = 1'(i >> 1);
      din = 8'($urandom) | 8'h01;
      #1;
      checks++;
      if (sel ? (y2 !== din || y1 !== 8'h00) : (y1 !== din || y2 !== 8'h00)) begin
        failures++;
        $display("FAIL sel=%b din=%h y1=%h y2=%h", sel, din, y1, y2);
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
