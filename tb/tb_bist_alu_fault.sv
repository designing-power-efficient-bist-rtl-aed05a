// ALU_FAULT test (8-bit pattern). With no faults the output must equal a
// fault-free bist_alu on all 256 inputs. Then random stuck-at-0/1 masks and
// the bridging fault are applied; the reference first forces the lines
// (stuck-at-0 over stuck-at-1, then wired-AND of lines 0 and 2) and feeds
// the result to the fault-free ALU. Finally the published example masks
// s_a_0 = 40, s_a_1 = 02 must change the output for at least one input.
module tb_bist_alu_fault;
  logic [7:0] din, sa0, sa1, forced;
  logic       br;
  logic [1:0] out, ref_out;
  logic       co, ref_co;
  logic [2:0] clean;
  int checks = 0, failures = 0, differ;

  bist_alu_fault #(.N(8)) dut (.din(din), .s_a_0(sa0), .s_a_1(sa1), .bridge_fault(br),
    .alu_out(out), .carry_out(co));
  bist_alu #(.N(8)) ref_alu (.din(forced), .alu_out(ref_out), .carry_out(ref_co));

  always_comb begin
    forced = din;
    for (int i = 0; i < 8; i++) begin
      if (sa1[i]) forced[i] = 1'b1;
      if (sa0[i]) forced[i] = 1'b0;
    end
    if (br) begin
      logic w;
      w = forced[0] && forced[2];
      forced[0] = w;
      forced[2] = w;
    end
  end

  initial begin
    sa0 = 0; sa1 = 0; br = 0;
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      checks++;
      if (out !== ref_out || co !== ref_co) begin failures++; $display("FAIL fault-free din=%h", din); end
    end
    for (int i = 0; i < 2000; i++) begin
      din = 8'($urandom);
      sa0 = 8'($urandom) & 8'($urandom);
      sa1 = 8'($urandom) & 8'($urandom);
      br  = 1'($urandom);
      #1;
      checks++;
      if (out !== ref_out || co !== ref_co) begin
        failures++;
        $display("FAIL din=%h sa0=%h sa1=%h br=%b got %b%b expected %b%b", din, sa0, sa1, br, co, out, ref_co, ref_out);
      end
    end
    // published masks must be observable
    differ = 0;
    br = 0;
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      sa0 = 0; sa1 = 0;
      #1;
      clean = {co, out};
      sa0 = 8'h40; sa1 = 8'h02;
      #1;
      if ({co, out} != clean) differ++;
    end
    checks++;
    if (differ == 0) begin failures++; $display("FAIL published masks not observable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
