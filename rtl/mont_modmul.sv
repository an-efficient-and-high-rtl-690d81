// mont_modmul: modular multiplier Result = X * Y mod N built from two
// Montgomery multiplications on one systolic Montgomery multiplier.
//
//   pass 1: R1     = Mont(X, Y)        = X*Y*2^-n mod N
//   pass 2: Result = Mont(R1, constant) = X*Y mod N  when constant = 2^2n mod N
//
// The ports are those of the document's top-level symbol (X, Y, N,
// constant, count, start, clk, reset in; Result, state out). `constant` is
// supplied from outside: it must be 2^(2*N_BITS) mod N for the product to
// come out in the ordinary (non-Montgomery) representation; `count` must be
// N_BITS-1 and is passed to the multiplier's down counter. X and Y must be
// below N, and N must be odd.
//
// `state` is high while Result holds a finished product: it drops on
// start and rises when pass 2 completes, 2*N_BITS+6 cycles after the
// start cycle. The meaning of `state` is this design's choice; the
// document only shows the pin. A start while a product is being formed is
// ignored.
module mont_modmul #(
  parameter int unsigned N_BITS = 32,
  localparam int unsigned CW    = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic              clk,
  input  logic              reset,     // synchronous, active high
  input  logic              start,
  input  logic [N_BITS-1:0] X,
  input  logic [N_BITS-1:0] Y,
  input  logic [N_BITS-1:0] N,         // odd modulus
  input  logic [N_BITS-1:0] constant,  // 2^(2*N_BITS) mod N
  input  logic [CW-1:0]     count,     // N_BITS-1
  output logic [N_BITS-1:0] Result,
  output logic              state      // 1: Result valid
);

  typedef enum logic [2:0] {IDLE, START1, PASS1, START2, PASS2} phase_t;

  phase_t            phase;
  logic              mm_start, mm_done;
  logic [N_BITS-1:0] mm_a, mm_b, mm_r;
  logic [N_BITS-1:0] x_q, y_q, n_q, c_q;
  logic [CW-1:0]     count_q;

  mont_mult #(.N_BITS(N_BITS)) u_mont (
    .clk  (clk),
    .rst  (reset),
    .start(mm_start),
    .a    (mm_a),
    .b    (mm_b),
    .m    (n_q),
    .count(count_q),
    .busy (),
    .done (mm_done),
    .r    (mm_r)
  );

  // Pass 1 multiplies X by Y, pass 2 multiplies the Montgomery result R1
  // (held in the multiplier's output register) by the constant.
  always_comb begin
    mm_start = (phase == START1) || (phase == START2);
    if (phase == START2 || phase == PASS2) begin
      mm_a = mm_r;
      mm_b = c_q;
    end else begin
      mm_a = x_q;
      mm_b = y_q;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      phase   <= IDLE;
      x_q     <= '0;
      y_q     <= '0;
      n_q     <= '0;
      c_q     <= '0;
      count_q <= '0;
      Result  <= '0;
      state   <= 1'b0;
    end else begin
      unique case (phase)
        IDLE: if (start) begin
          x_q     <= X;
          y_q     <= Y;
          n_q     <= N;
          c_q     <= constant;
          count_q <= count;
          state   <= 1'b0;
          phase   <= START1;
        end
        START1: phase <= PASS1;
        PASS1:  if (mm_done) phase <= START2;
        START2: phase <= PASS2;
        PASS2:  if (mm_done) begin
          Result <= mm_r;
          state  <= 1'b1;
          phase  <= IDLE;
        end
        default: phase <= IDLE;
      endcase
    end
  end

endmodule
