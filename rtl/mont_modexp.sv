// mont_modexp: modular exponentiation result = base^exponent mod m by
// left-to-right square-and-multiply, with every product formed by the
// systolic Montgomery multiplier (mont_mult).
//
// All work is done in the Montgomery representation x' = x*2^n mod m
// (n = N_BITS):
//   1. a' = Mont(base, r2)        pre-multiply the base by 2^2n
//   2. s' = Mont(1, r2)           s = 1 in Montgomery form, 2^n mod m
//   3. for each exponent bit from the top (E_BITS-1) down to 0:
//        s' = Mont(s', s')        square
//        s' = Mont(s', a')        multiply, only where the bit is 1
//   4. result = Mont(s', 1)       post-multiply by one to leave the domain
// r2 = 2^(2n) mod m is an input, computed off-chip like the constant of
// the modular multiplier. base must be below m and m must be odd.
//
// Timing: each Montgomery product takes N_BITS+3 cycles including the
// hand-over, so one exponentiation with an E_BITS-bit exponent of weight w
// takes about (E_BITS + w + 3) * (N_BITS+3) cycles. done pulses for one
// cycle with result valid until the next start. The counters n_squares
// and n_multiplies report how many of each the last run performed.
//
// The square-and-multiply order and the pre/post multiplication follow the
// document; the sequencing, ports and counters are this design's own.
module mont_modexp #(
  parameter int unsigned N_BITS = 32,
  parameter int unsigned E_BITS = N_BITS,
  localparam int unsigned CW    = (N_BITS > 1) ? $clog2(N_BITS) : 1,
  localparam int unsigned EW    = (E_BITS > 1) ? $clog2(E_BITS) : 1
) (
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              start,
  input  logic [N_BITS-1:0] base,       // base < m
  input  logic [E_BITS-1:0] exponent,
  input  logic [N_BITS-1:0] m,          // odd modulus
  input  logic [N_BITS-1:0] r2,         // 2^(2*N_BITS) mod m
  input  logic [CW-1:0]     count,      // N_BITS-1, for the multiplier
  output logic              busy,
  output logic              done,
  output logic [N_BITS-1:0] result,
  output logic [EW:0]       n_squares,    // squarings in the last run
  output logic [EW:0]       n_multiplies  // multiplications by the base
);

  typedef enum logic [2:0] {
    IDLE, TO_MONT_A, TO_MONT_S, SQUARE, MULTIPLY, FROM_MONT
  } step_t;

  step_t             step;
  logic              issued;      // product of this step has been started
  logic              mm_start, mm_done;
  logic [N_BITS-1:0] mm_a, mm_b, mm_r;
  logic [N_BITS-1:0] base_q, m_q, r2_q, a_mont, s_mont;
  logic [E_BITS-1:0] exp_q;
  logic [EW-1:0]     bit_idx;
  logic [CW-1:0]     count_q;

  mont_mult #(.N_BITS(N_BITS)) u_mont (
    .clk  (clk),
    .rst  (rst),
    .start(mm_start),
    .a    (mm_a),
    .b    (mm_b),
    .m    (m_q),
    .count(count_q),
    .busy (),
    .done (mm_done),
    .r    (mm_r)
  );

  // Operands of the product belonging to the current step. The second
  // operand (b) is always reduced below m, as the multiplier requires.
  always_comb begin
    unique case (step)
      TO_MONT_A: begin mm_a = base_q;              mm_b = r2_q;   end
      TO_MONT_S: begin mm_a = N_BITS'(1);          mm_b = r2_q;   end
      SQUARE:    begin mm_a = s_mont;              mm_b = s_mont; end
      MULTIPLY:  begin mm_a = s_mont;              mm_b = a_mont; end
      FROM_MONT: begin mm_a = N_BITS'(1);          mm_b = s_mont; end
      default:   begin mm_a = '0;                  mm_b = '0;     end
    endcase
    mm_start = (step != IDLE) && !issued;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      step         <= IDLE;
      issued       <= 1'b0;
      base_q       <= '0;
      m_q          <= '0;
      r2_q         <= '0;
      exp_q        <= '0;
      count_q      <= '0;
      a_mont       <= '0;
      s_mont       <= '0;
      bit_idx      <= '0;
      done         <= 1'b0;
      result       <= '0;
      n_squares    <= '0;
      n_multiplies <= '0;
    end else begin
      done <= 1'b0;
      if (mm_start) issued <= 1'b1;
      unique case (step)
        IDLE: if (start) begin
          base_q       <= base;
          m_q          <= m;
          r2_q         <= r2;
          exp_q        <= exponent;
          count_q      <= count;
          bit_idx      <= EW'(E_BITS - 1);
          n_squares    <= '0;
          n_multiplies <= '0;
          issued       <= 1'b0;
          step         <= TO_MONT_A;
        end
        TO_MONT_A: if (mm_done) begin
          a_mont <= mm_r;
          issued <= 1'b0;
          step   <= TO_MONT_S;
        end
        TO_MONT_S: if (mm_done) begin
          s_mont <= mm_r;
          issued <= 1'b0;
          step   <= SQUARE;
        end
        SQUARE: if (mm_done) begin
          s_mont    <= mm_r;
          n_squares <= n_squares + 1'b1;
          issued    <= 1'b0;
          if (exp_q[bit_idx])  step <= MULTIPLY;
          else if (bit_idx == '0) step <= FROM_MONT;
          else begin
            bit_idx <= bit_idx - 1'b1;
            step    <= SQUARE;
          end
        end
        MULTIPLY: if (mm_done) begin
          s_mont       <= mm_r;
          n_multiplies <= n_multiplies + 1'b1;
          issued       <= 1'b0;
          if (bit_idx == '0) step <= FROM_MONT;
          else begin
            bit_idx <= bit_idx - 1'b1;
            step    <= SQUARE;
          end
        end
        FROM_MONT: if (mm_done) begin
          result <= mm_r;
          done   <= 1'b1;
          issued <= 1'b0;
          step   <= IDLE;
        end
        default: step <= IDLE;
      endcase
    end
  end

  assign busy = (step != IDLE);

endmodule
