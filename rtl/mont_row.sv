// mont_row: one row of the systolic Montgomery array, i.e. one iteration
//   R_out = (R_in + a_i*B + q_i*M) / 2
// of the bit-serial Montgomery algorithm.
//
// Column 0 is a quotient PE (mont_pe_q), which decides q_i; columns 1..N_BITS
// are general PEs (mont_pe). Carries ripple from column 0 towards column
// N_BITS and the carry out of the last column becomes the top bit of R_out.
// R is N_BITS+1 bits wide: with B < M and R_in < 2M the row keeps
// R_out < 2M. M+B (mb) is N_BITS+1 bits; bit N_BITS of B and M is 0.
// Purely combinational; the array registers the row outputs.
module mont_row #(
  parameter int unsigned N_BITS = 32
) (
  input  logic              a_i,    // multiplier bit of this iteration
  input  logic [N_BITS-1:0] b,      // multiplicand B (B < M)
  input  logic [N_BITS-1:0] m,      // odd modulus M
  input  logic [N_BITS:0]   mb,     // M + B
  input  logic [N_BITS:0]   r_in,   // R(i)
  output logic [N_BITS:0]   r_out,  // R(i+1)
  output logic              q_i     // quotient bit chosen by this row
);

  logic [N_BITS:0]   carry;   // carry[j] leaves column j
  logic [N_BITS:0]   b_ext, m_ext;

  assign b_ext = {1'b0, b};
  assign m_ext = {1'b0, m};

  mont_pe_q u_pe_q (
    .a_i  (a_i),
    .b_0  (b_ext[0]),
    .m_0  (m_ext[0]),
    .mb_0 (mb[0]),
    .r_0  (r_in[0]),
    .q_i  (q_i),
    .c_out(carry[0])
  );

  for (genvar j = 1; j <= N_BITS; j++) begin : g_col
    mont_pe u_pe (
      .a_i  (a_i),
      .q_i  (q_i),
      .b_j  (b_ext[j]),
      .m_j  (m_ext[j]),
      .mb_j (mb[j]),
      .r_in (r_in[j]),
      .c_in (carry[j-1]),
      .r_out(r_out[j-1]),
      .c_out(carry[j])
    );
  end

  assign r_out[N_BITS] = carry[N_BITS];

endmodule
