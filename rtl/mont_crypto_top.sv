// mont_crypto_top: top level of the Montgomery arithmetic design.
//
// Three engines stand side by side, sharing only clock and reset:
//   * mont_modmul  - the systolic modular multiplier Result = X*Y mod N,
//                    with the port names of the document's top symbol;
//   * mont_modexp  - square-and-multiply exponentiation base^exp mod m on
//                    its own systolic Montgomery multiplier, the operation
//                    RSA encryption and decryption (c = m^e mod n,
//                    m = c^d mod n) are built from;
//   * mont_iterative - the bit-serial Montgomery multiplier, the compact
//                    three-cycles-per-bit alternative to the systolic array.
// The engines are independent; each has its own start and completion
// signals (see the module headers for operand rules and timing). Keys,
// the constants 2^2n mod N and the exponent come from outside: key
// generation is not part of this design.
module mont_crypto_top #(
  parameter int unsigned N_BITS = 32,
  parameter int unsigned E_BITS = N_BITS,
  localparam int unsigned CW    = (N_BITS > 1) ? $clog2(N_BITS) : 1,
  localparam int unsigned EW    = (E_BITS > 1) ? $clog2(E_BITS) : 1
) (
  input  logic              clk,
  input  logic              reset,          // synchronous, active high
  // systolic modular multiplier
  input  logic              start,
  input  logic [N_BITS-1:0] X,
  input  logic [N_BITS-1:0] Y,
  input  logic [N_BITS-1:0] N,
  input  logic [N_BITS-1:0] constant,       // 2^(2*N_BITS) mod N
  input  logic [CW-1:0]     count,          // N_BITS-1
  output logic [N_BITS-1:0] Result,
  output logic              state,          // 1: Result valid
  // modular exponentiation
  input  logic              exp_start,
  input  logic [N_BITS-1:0] exp_base,
  input  logic [E_BITS-1:0] exp_exponent,
  input  logic [N_BITS-1:0] exp_modulus,
  input  logic [N_BITS-1:0] exp_r2,         // 2^(2*N_BITS) mod exp_modulus
  output logic              exp_busy,
  output logic              exp_done,
  output logic [N_BITS-1:0] exp_result,
  output logic [EW:0]       exp_n_squares,
  output logic [EW:0]       exp_n_multiplies,
  // iterative Montgomery multiplier
  input  logic              it_start,
  input  logic [N_BITS-1:0] it_A,
  input  logic [N_BITS-1:0] it_B,
  input  logic [N_BITS-1:0] it_M,
  output logic              it_done,
  output logic [N_BITS:0]   it_R
);

  mont_modmul #(.N_BITS(N_BITS)) u_modmul (
    .clk     (clk),
    .reset   (reset),
    .start   (start),
    .X       (X),
    .Y       (Y),
    .N       (N),
    .constant(constant),
    .count   (count),
    .Result  (Result),
    .state   (state)
  );

  mont_modexp #(.N_BITS(N_BITS), .E_BITS(E_BITS)) u_modexp (
    .clk         (clk),
    .rst         (reset),
    .start       (exp_start),
    .base        (exp_base),
    .exponent    (exp_exponent),
    .m           (exp_modulus),
    .r2          (exp_r2),
    .count       (count),
    .busy        (exp_busy),
    .done        (exp_done),
    .result      (exp_result),
    .n_squares   (exp_n_squares),
    .n_multiplies(exp_n_multiplies)
  );

  mont_iterative #(.N_BITS(N_BITS)) u_iterative (
    .clk  (clk),
    .rst  (reset),
    .start(it_start),
    .A    (it_A),
    .B    (it_B),
    .M    (it_M),
    .done (it_done),
    .R    (it_R)
  );

endmodule
