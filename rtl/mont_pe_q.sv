// mont_pe_q: quotient processing element (column 0) of the systolic
// Montgomery array.
//
// Besides choosing the addend bit like every cell, the first cell of a row
// decides the quotient bit
//   q_i = r_0(i) xor (a_i and b_0),
// which makes R + a_i*B + q_i*M even, so the row can divide it by two by
// simply dropping bit 0. The quotient bit is broadcast along the row to the
// general cells. With q_i chosen this way, bit 0 of the column sum
// r_0 + x_0 is always 0 and its carry into column 1 is r_0 and x_0;
// no carry enters column 0, so the full adder of the general cell reduces
// to one AND gate here.
//
// The XOR/AND quotient logic and the 4:1 multiplexer follow the document's
// quotient-PE figure. That figure draws a full adder fed with r_1(i); in
// this design bit r_1(i) is added in the general cell of column 1 instead,
// which is the same sum arranged one column later. Purely combinational.
// The modulus must be odd (m_0 = 1).
module mont_pe_q
  import mont_pkg::*;
(
  input  logic a_i,    // multiplier bit of this row
  input  logic b_0,    // bit 0 of B
  input  logic m_0,    // bit 0 of M (1 for an odd modulus)
  input  logic mb_0,   // bit 0 of M+B
  input  logic r_0,    // r_0(i), bit 0 of the incoming partial result
  output logic q_i,    // quotient bit of this row
  output logic c_out   // carry into column 1
);

  logic x_0;

  always_comb begin
    q_i   = r_0 ^ (a_i & b_0);
    x_0   = select_addend_bit(a_i, q_i, b_0, m_0, mb_0);
    c_out = r_0 & x_0;
  end

endmodule
