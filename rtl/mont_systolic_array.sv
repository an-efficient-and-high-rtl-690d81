// mont_systolic_array: N_BITS rows of processing elements that together
// compute the Montgomery product A*B*2^-N_BITS mod M, left in [0, 2M).
//
// Row i takes multiplier bit a_i and the partial result of row i-1, and
// adds 0, B, M or M+B to it before halving. As in the document's array
// figure, B, M and M+B run vertically through every row and bit a_i enters
// row i from the side. Each row's result is captured in a register (the
// systolic pipeline step), so the product at r_out is valid N_BITS clock
// cycles after a, b, m and mb last changed; the operands must be held
// stable for that time (mont_mult does this). Row 0 starts from R = 0.
//
// The row registers are this design's choice: the document does not say
// where the array is clocked. Registers clear on the synchronous reset.
module mont_systolic_array #(
  parameter int unsigned N_BITS = 32
) (
  input  logic              clk,
  input  logic              rst,    // synchronous, active high
  input  logic [N_BITS-1:0] a,      // multiplier A (any N_BITS-bit value)
  input  logic [N_BITS-1:0] b,      // multiplicand B, B < M
  input  logic [N_BITS-1:0] m,      // odd modulus M
  input  logic [N_BITS:0]   mb,     // M + B
  output logic [N_BITS:0]   r_out   // A*B*2^-N_BITS mod M, possibly + M
);

  logic [N_BITS:0] row_in  [N_BITS];
  logic [N_BITS:0] row_out [N_BITS];
  logic [N_BITS:0] row_reg [N_BITS];

  for (genvar i = 0; i < N_BITS; i++) begin : g_row
    if (i == 0) begin : g_first
      assign row_in[i] = '0;
    end else begin : g_next
      assign row_in[i] = row_reg[i-1];
    end

    mont_row #(.N_BITS(N_BITS)) u_row (
      .a_i  (a[i]),
      .b    (b),
      .m    (m),
      .mb   (mb),
      .r_in (row_in[i]),
      .r_out(row_out[i]),
      .q_i  ()
    );

    always_ff @(posedge clk) begin
      if (rst) row_reg[i] <= '0;
      else     row_reg[i] <= row_out[i];
    end
  end

  assign r_out = row_reg[N_BITS-1];

endmodule
