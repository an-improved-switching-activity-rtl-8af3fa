// bist_pkg: constants, types and functions shared by the BIST blocks.
//
// The default register width is 8 bits, the width of the LFSR, the MISR and
// the BILBO of this design. Feedback polynomials are given as tap masks: bit i
// set means stage i is XORed into the feedback that enters stage 0, and the
// register shifts from stage 0 towards stage N-1.
//
// lfsr_taps(n) returns a primitive (maximal-length, period 2^n - 1) tap mask
// for any width from 3 to 32, so that a generator can be sized to the circuit
// under test by a parameter alone. For 8 bits it is stages 7, 3, 2, 1
// (x^8 + x^4 + x^3 + x^2 + 1), the taps of the design's 8-bit LFSR. The other
// widths use well-known primitive trinomials and pentanomials; a width
// outside 3..32 returns 0, and such a register would not advance usefully.
//
// The BILBO mode encoding follows the B1/B2 control table of the design:
// 00 serial scan, 01 LFSR pattern generator, 10 normal register, 11 MISR.
package bist_pkg;

  parameter int unsigned N_DEFAULT = 8;

  function automatic logic [31:0] lfsr_taps(int unsigned n);
    case (n)
       3: return 32'h00000006;
       4: return 32'h0000000C;
       5: return 32'h00000014;
       6: return 32'h00000030;
       7: return 32'h00000060;
       8: return 32'h0000008E;
       9: return 32'h00000110;
      10: return 32'h00000240;
      11: return 32'h00000500;
      12: return 32'h00000829;
      13: return 32'h0000100D;
      14: return 32'h00002015;
      15: return 32'h00006000;
      16: return 32'h0000D008;
      17: return 32'h00012000;
      18: return 32'h00020400;
      19: return 32'h00040023;
      20: return 32'h00090000;
      21: return 32'h00140000;
      22: return 32'h00300000;
      23: return 32'h00420000;
      24: return 32'h00E10000;
      25: return 32'h01200000;
      26: return 32'h02000023;
      27: return 32'h04000013;
      28: return 32'h09000000;
      29: return 32'h14000000;
      30: return 32'h20000029;
      31: return 32'h48000000;
      32: return 32'h80200003;
      default: return 32'h0;
    endcase
  endfunction

  // {B1, B2}
  typedef enum logic [1:0] {
    BILBO_SCAN   = 2'b00,
    BILBO_LFSR   = 2'b01,
    BILBO_NORMAL = 2'b10,
    BILBO_MISR   = 2'b11
  } bilbo_mode_e;

endpackage
