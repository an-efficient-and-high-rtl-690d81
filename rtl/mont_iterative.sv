// mont_iterative: iterative (bit-serial) Montgomery multiplier,
//   R = A * B * 2^-N_BITS mod M, returned in [0, 2M).
//
// Datapath, as in the document's iterative-multiplier figure:
//   SHIFT REGISTER 1 holds A and is shifted right once per iteration, so
//     its bit 0 is a_i;
//   MUX2_1 gives B when a_i = 1, else 0;
//   ADDER1 forms R + a_i*B;
//   MUX2_2 gives M when bit 0 of ADDER1's sum (r_0) is 1, else 0;
//   ADDER2 forms (R + a_i*B) + r_0*M, which is even;
//   SHIFT REGISTER 2 is loaded with ADDER2's sum and then shifted right
//     once (the division by two); its contents are R, fed back to ADDER1.
// After N_BITS iterations R holds the result. Like the document's
// algorithm there is no final subtraction, so R can exceed M by less than
// M; it is one bit wider than the operands for that reason (the figure
// draws it N_BITS wide).
//
// Controller: the document's six states with a down counter.
//   S0 idle (reset state) - wait for start
//   S1 load A into shift register 1, B and M into their registers, clear
//      R and load the counter with N_BITS
//   S2 adders settle; load shift register 2 with ADDER2; count down
//   S3 shift both shift registers right
//   S4 if the counter is zero go to S5, else back to S2
//   S5 stop: done is high and R is valid; a new start goes to S1
// One multiplication takes 3*N_BITS+1 cycles from the start cycle to done.
// Waiting in S0 for start, and start in S5, are this design's additions.
module mont_iterative #(
  parameter int unsigned N_BITS = 32,
  localparam int unsigned CW    = $clog2(N_BITS + 1)
) (
  input  logic              clk,
  input  logic              rst,    // synchronous, active high
  input  logic              start,
  input  logic [N_BITS-1:0] A,      // multiplier
  input  logic [N_BITS-1:0] B,      // multiplicand, B < M
  input  logic [N_BITS-1:0] M,      // odd modulus
  output logic              done,   // high in S5
  output logic [N_BITS:0]   R       // A*B*2^-N_BITS mod M, possibly + M
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4, S5} ctrl_state_t;

  ctrl_state_t       st;
  logic [N_BITS-1:0] shift_reg1;   // A, shifted right each iteration
  logic [N_BITS-1:0] b_reg, m_reg;
  logic [N_BITS+1:0] shift_reg2;   // R, one guard bit above the result
  logic [CW-1:0]     counter;

  logic [N_BITS+1:0] mux1_out, mux2_out, adder1_out, adder2_out;

  always_comb begin
    mux1_out   = shift_reg1[0] ? {2'b00, b_reg} : '0;
    adder1_out = shift_reg2 + mux1_out;
    mux2_out   = adder1_out[0] ? {2'b00, m_reg} : '0;
    adder2_out = adder1_out + mux2_out;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S0;
      shift_reg1 <= '0;
      b_reg      <= '0;
      m_reg      <= '0;
      shift_reg2 <= '0;
      counter    <= '0;
    end else begin
      unique case (st)
        S0: if (start) st <= S1;
        S1: begin
          shift_reg1 <= A;
          b_reg      <= B;
          m_reg      <= M;
          shift_reg2 <= '0;
          counter    <= CW'(N_BITS);
          st         <= S2;
        end
        S2: begin
          shift_reg2 <= adder2_out;
          counter    <= counter - 1'b1;
          st         <= S3;
        end
        S3: begin
          shift_reg1 <= shift_reg1 >> 1;
          shift_reg2 <= shift_reg2 >> 1;
          st         <= S4;
        end
        S4: st <= (counter == '0) ? S5 : S2;
        S5: if (start) st <= S1;
        default: st <= S0;
      endcase
    end
  end

  assign done = (st == S5);
  assign R    = shift_reg2[N_BITS:0];

  // The algorithm needs an odd modulus.
  a_odd_modulus: assert property (@(posedge clk) disable iff (rst)
    (st == S1) |-> M[0]);

endmodule
