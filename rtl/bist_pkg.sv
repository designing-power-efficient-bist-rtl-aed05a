// Shared types and constants of the scalable reversible-logic BIST.
//
// The architecture is sized by one number, N, the width of the test pattern.
// The circuit under test is a K-bit ALU with K = N/2 - 2, so the pattern
// holds two K-bit operands, a 3-bit operation code and a carry-in
// (N = 2K + 4). The signature register is L = K + 1 bits wide, one bit per
// ALU output plus the carry. The published configurations are
// N = 8, 16, 32 with K = 2, 6, 14 and L = 3, 7, 15.
//
// The 8-bit LFSR feedback (x^8+x^6+x^5+x^4+1) reproduces the published
// 8-bit pattern sequence. The 16- and 32-bit LFSR taps and all MISR
// polynomials are common maximal-length choices made by this design; of the
// two maximal 3-bit MISRs the one that detects the published example fault
// (stuck-at-0 mask 40 with stuck-at-1 mask 02) was taken.
package bist_pkg;

  // ALU operand width for a pattern of n bits
  function automatic int unsigned alu_width(int unsigned n);
    return n / 2 - 2;
  endfunction

  // Signature width for a pattern of n bits
  function automatic int unsigned sig_width(int unsigned n);
    return n / 2 - 1;
  endfunction

  // LFSR feedback taps: bit i set means stage i enters the feedback XOR.
  function automatic logic [63:0] lfsr_taps(int unsigned n);
    case (n)
      4:       return 64'h0000_0000_0000_000C; // x^4+x^3+1
      8:       return 64'h0000_0000_0000_00B8; // x^8+x^6+x^5+x^4+1
      16:      return 64'h0000_0000_0000_D008; // x^16+x^15+x^13+x^4+1
      32:      return 64'h0000_0000_8020_0003; // x^32+x^22+x^2+x+1
      default: return (64'd1 << (n - 1)) | (64'd1 << (n - 2));
    endcase
  endfunction

  // MISR feedback taps, same convention.
  function automatic logic [63:0] misr_taps(int unsigned l);
    case (l)
      3:       return 64'h5;    // new bit 0 = Q2 ^ Q0 (x^3+x+1 family)
      7:       return 64'h60;   // x^7+x^6+1
      15:      return 64'h6000; // x^15+x^14+1
      default: return (64'd1 << (l - 1)) | (64'd1 << (l - 2));
    endcase
  endfunction

  // ALU operations selected by pattern bits [2K+2:2K]
  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,  // A + B + cin
    OP_SUB  = 3'd1,  // A + ~B + cin (A - B when cin = 1)
    OP_AND  = 3'd2,
    OP_OR   = 3'd3,
    OP_XOR  = 3'd4,
    OP_XNOR = 3'd5,
    OP_INC  = 3'd6,  // A + cin
    OP_SHL  = 3'd7   // {A, cin} shifted left, MSB of A to carry
  } alu_op_e;

  // Controller phases
  typedef enum logic [1:0] {
    PH_IDLE   = 2'd0,  // normal operation, CUT fed from e_input
    PH_GOLDEN = 2'd1,  // one LFSR period through the fault-free ALU
    PH_TEST   = 2'd2   // repeated LFSR periods through the CUT
  } phase_e;

endpackage
