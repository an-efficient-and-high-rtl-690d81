// mont_pe: general processing element (cell i,j with j >= 1) of the
// systolic Montgomery array.
//
// Each cell handles one bit column j of one iteration i of
//   R(i+1) = (R(i) + a_i*B + q_i*M) / 2.
// A 4:1 multiplexer, steered by the row's control bits a_i and q_i,
// chooses the addend bit x_j from 0, m_j, b_j or mb_j (mb = M+B,
// precomputed once per multiplication). A full adder sums x_j, the current
// partial-result bit r_j(i) and the carry coming from column j-1. Because
// the row divides by two, the sum bit is column j-1 of the next partial
// result, r_(j-1)(i+1); the carry goes on to column j+1.
//
// This is the cell of the document's general-PE figure: one multiplexer and
// one full adder. The operand bits b_j, m_j, mb_j and the control bits
// a_i, q_i pass through the cell unchanged in that figure; here they are
// simply shared wires in the row and column, so the cell has no outputs
// for them. Purely combinational.
module mont_pe
  import mont_pkg::*;
(
  input  logic a_i,     // multiplier bit of this row
  input  logic q_i,     // quotient bit of this row (from the quotient PE)
  input  logic b_j,     // bit j of B
  input  logic m_j,     // bit j of the modulus M
  input  logic mb_j,    // bit j of M+B
  input  logic r_in,    // r_j(i), bit j of the incoming partial result
  input  logic c_in,    // carry from column j-1
  output logic r_out,   // r_(j-1)(i+1), bit j-1 of the next partial result
  output logic c_out    // carry to column j+1
);

  logic x_j;

  always_comb begin
    x_j   = select_addend_bit(a_i, q_i, b_j, m_j, mb_j);
    r_out = r_in ^ x_j ^ c_in;
    c_out = (r_in & x_j) | (r_in & c_in) | (x_j & c_in);
  end

endmodule
