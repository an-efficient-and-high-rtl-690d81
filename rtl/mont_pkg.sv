// mont_pkg: shared types of the radix-2 Montgomery multipliers.
//
// The processing elements of the systolic array pick one of four addends
// for R + a_i*B + q_i*M from the two control bits {a_i, q_i}. The encoding
// below is that bit pair read as a 2-bit number (a_i is the upper bit),
// exactly as the addend table of the algorithm lists it:
//   00 -> 0, 01 -> M, 10 -> B, 11 -> M+B.
package mont_pkg;

  typedef enum logic [1:0] {
    ADD_ZERO = 2'b00,  // a_i = 0, q_i = 0 : R
    ADD_M    = 2'b01,  // a_i = 0, q_i = 1 : R + M
    ADD_B    = 2'b10,  // a_i = 1, q_i = 0 : R + B
    ADD_MB   = 2'b11   // a_i = 1, q_i = 1 : R + (M+B)
  } addend_sel_t;

  // One bit of the 4:1 addend multiplexer inside every processing element.
  function automatic logic select_addend_bit(input logic a, input logic q,
                                             input logic b, input logic m,
                                             input logic mb);
    unique case (addend_sel_t'({a, q}))
      ADD_ZERO: return 1'b0;
      ADD_M:    return m;
      ADD_B:    return b;
      ADD_MB:   return mb;
      default:  return 1'b0;
    endcase
  endfunction

endpackage
