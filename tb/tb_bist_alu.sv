// ALU test. 8-bit pattern (K = 2): all 256 inputs; 16-bit pattern (K = 6):
// 3000 random inputs. The reference decodes the fields and computes each
// operation with integer arithmetic.
module tb_bist_alu;
  logic [7:0]  din8;
  logic [1:0]  out8;
  logic        co8;
  logic [15:0] din16;
  logic [5:0]  out16;
  logic        co16;
  int checks = 0, failures = 0;

  bist_alu #(.N(8))  dut8  (.din(din8),  .alu_out(out8),  .carry_out(co8));
  bist_alu #(.N(16)) dut16 (.din(din16), .alu_out(out16), .carry_out(co16));

  // reference: returns {carry, result} in the low k+1 bits
  function automatic int unsigned ref_alu(int unsigned din, int unsigned k);
    int unsigned a, b, op, cin, m, r;
    m   = (1 << k) - 1;
    a   = din & m;
    b   = (din >> k) & m;
    op  = (din >> (2 * k)) & 7;
    cin = (din >> (2 * k + 3)) & 1;
    case (op)
      0: r = a + b + cin;
      1: r = a + (~b & m) + cin;
      2: r = a & b;
      3: r = a | b;
      4: r = a ^ b;
      5: r = ~(a ^ b) & m;
      6: r = a + cin;
      default: r = (a << 1) | cin;
    endcase
    return r & ((1 << (k + 1)) - 1);
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      din8 = 8'(i);
      #1;
      checks++;
      if ({co8, out8} !== 3'(ref_alu(i, 2))) begin
        failures++;
        $display("FAIL 8-bit din=%h got %b expected %b", din8, {co8, out8}, 3'(ref_alu(i, 2)));
      end
    end
    for (int i = 0; i < 3000; i++) begin
      din16 = 16'($urandom);
      #1;
      checks++;
      if ({co16, out16} !== 7'(ref_alu(din16, 6))) begin
        failures++;
        $display("FAIL 16-bit din=%h", din16);
      end
    end
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
