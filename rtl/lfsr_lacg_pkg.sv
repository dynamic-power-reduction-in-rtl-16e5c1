// Shared constants for the look-ahead clock-gated LFSR.
//
// The LFSR is a Fibonacci shift register: stage 1 (bit 0) receives the XOR of
// the tapped stages and every other stage takes the value of the stage below
// it, so the register shifts towards its most significant bit. A tap "after
// stage t" reads bit t-1. lfsr_taps() returns the tap mask for a register
// length; bit t-1 set means stage t is tapped.
//
// Tap sets per length:
//   4  bits: stages 4, 3          (characteristic polynomial 1 + x^3 + x^4)
//   16 bits: stages 16, 15, 13, 4 (1 + x^4 + x^13 + x^15 + x^16)
// The two above are those of the source design. The 8, 32 and 64-bit sets are
// standard maximal-length tap sets chosen for this implementation:
//   8  bits: stages 8, 6, 5, 4
//   32 bits: stages 32, 22, 2, 1
//   64 bits: stages 64, 63, 61, 60
// They reproduce the register values the source design shows in its
// simulation traces for 8 and 32 bits. Any other length returns 0, which the
// LFSR rejects at elaboration.
package lfsr_lacg_pkg;

  localparam int unsigned MaxLen = 64;

  typedef logic [MaxLen-1:0] tap_mask_t;

  function automatic tap_mask_t lfsr_taps(input int unsigned len);
    tap_mask_t m;
    m = '0;
    case (len)
      4:  begin m[3]  = 1'b1; m[2]  = 1'b1; end
      8:  begin m[7]  = 1'b1; m[5]  = 1'b1; m[4]  = 1'b1; m[3]  = 1'b1; end
      16: begin m[15] = 1'b1; m[14] = 1'b1; m[12] = 1'b1; m[3]  = 1'b1; end
      32: begin m[31] = 1'b1; m[21] = 1'b1; m[1]  = 1'b1; m[0]  = 1'b1; end
      64: begin m[63] = 1'b1; m[62] = 1'b1; m[60] = 1'b1; m[59] = 1'b1; end
      default: m = '0;
    endcase
    return m;
  endfunction

endpackage
