// mont_mult: systolic Montgomery multiplier with its controller.
//
// Computes r = a * b * 2^-N_BITS mod m for an odd modulus m, b < m and any
// N_BITS-bit a. On a start pulse the operands are latched and the sum
// M+B, which the processing elements select when a_i = q_i = 1, is
// formed once. The latched operands then drive mont_systolic_array for as
// many cycles as the array has rows. A down counter, loaded from the
// `count` input, times this: `count` must be N_BITS-1, the value the
// document's testbenches apply (3'h7, 4'hF, 5'h1F for 8, 16 and 32 bits).
// When the counter has passed zero the array output, which lies in
// [0, 2M), goes through one conditional subtraction of M and is latched
// in r.
//
// Timing: start is sampled while not busy. done pulses for one cycle
// count+2 cycles after the start cycle (N_BITS+1 cycles for the correct
// count), with r valid from then until the next start. busy is high from
// the cycle after start until done.
//
// The down counter and the final "if R >= M then R = R - M" step come from
// the document; the start/busy/done handshake is this design's own.
module mont_mult #(
  parameter int unsigned N_BITS = 32,
  localparam int unsigned CW    = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic              clk,
  input  logic              rst,     // synchronous, active high
  input  logic              start,   // begin a multiplication
  input  logic [N_BITS-1:0] a,       // multiplier
  input  logic [N_BITS-1:0] b,       // multiplicand, b < m
  input  logic [N_BITS-1:0] m,       // odd modulus
  input  logic [CW-1:0]     count,   // array cycles minus one: N_BITS-1
  output logic              busy,
  output logic              done,    // one-cycle pulse, r valid
  output logic [N_BITS-1:0] r        // a*b*2^-N_BITS mod m
);

  typedef enum logic [1:0] {IDLE, RUN, FINISH} state_t;

  state_t            state;
  logic [N_BITS-1:0] a_q, b_q, m_q;
  logic [N_BITS:0]   mb_q;
  logic [CW-1:0]     down_count;
  logic [N_BITS:0]   arr_r;
  logic [N_BITS+1:0] diff;     // arr_r - m, top bit is the borrow

  mont_systolic_array #(.N_BITS(N_BITS)) u_array (
    .clk  (clk),
    .rst  (rst),
    .a    (a_q),
    .b    (b_q),
    .m    (m_q),
    .mb   (mb_q),
    .r_out(arr_r)
  );

  // Final reduction: the array result is below 2M, one subtraction suffices.
  assign diff = {1'b0, arr_r} - {2'b00, m_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      a_q        <= '0;
      b_q        <= '0;
      m_q        <= '0;
      mb_q       <= '0;
      down_count <= '0;
      done       <= 1'b0;
      r          <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          a_q        <= a;
          b_q        <= b;
          m_q        <= m;
          mb_q       <= {1'b0, m} + {1'b0, b};
          down_count <= count;
          state      <= RUN;
        end
        RUN: begin
          down_count <= down_count - 1'b1;
          if (down_count == '0) state <= FINISH;
        end
        FINISH: begin
          r     <= diff[N_BITS+1] ? arr_r[N_BITS-1:0] : diff[N_BITS-1:0];
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  // The array needs an odd modulus and a reduced multiplicand.
  a_odd_modulus: assert property (@(posedge clk) disable iff (rst)
    (state == IDLE && start) |-> m[0]);
  a_reduced_b: assert property (@(posedge clk) disable iff (rst)
    (state == IDLE && start) |-> (b < m));

endmodule
