// tb_workload_wide_operands: the modular multiplier on wide operands, the
// step towards the 1024-bit operands RSA needs. It runs at 128 bits: the
// array has N_BITS*(N_BITS+1) cells, and a 1024-bit instance (about a
// million cells) is far beyond what a cycle-based simulation can build in
// reasonable time and memory. One multiplication per operand set; the
// operands, the odd modulus and the constant 2^(2*N_BITS) mod N are made
// here with wide-vector arithmetic, the result is compared with
// (X*Y) mod N and the latency with 2*N_BITS+6 cycles.
module tb_workload_wide_operands;
  localparam int N = 128;
  localparam int RUNS = 2;
  typedef logic [2*N+1:0] wide_t;

  logic clk = 1'b0, reset = 1'b1, start = 1'b0, state;
  logic [N-1:0] X, Y, Nm, C, Result;
  int checks = 0, failures = 0;

  mont_modmul #(.N_BITS(N)) dut (.clk(clk), .reset(reset), .start(start), .X(X), .Y(Y),
                                 .N(Nm), .constant(C), .count($clog2(N)'(N - 1)),
                                 .Result(Result), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (RUNS * (2 * N + 20) + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_word();
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    X = '0; Y = '0; Nm = '1; C = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    for (int t = 0; t < RUNS; t++) begin
      wide_t nn, xx, yy, e, r2;
      int cycles;
      cycles = 0;
      nn = wide_t'(rand_word());
      nn[N-1] = 1'b1;
      nn[0]   = 1'b1;
      xx = wide_t'(rand_word()) % nn;
      yy = wide_t'(rand_word()) % nn;
      r2 = (wide_t'(1) << (2 * N)) % nn;
      e  = (xx * yy) % nn;
      @(negedge clk);
      X = N'(xx); Y = N'(yy); Nm = N'(nn); C = N'(r2);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!state) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (wide_t'(Result) != e) begin
        failures++;
        $display("FAIL 1024-bit product %0d differs", t);
      end
      checks++;
      if (cycles != 2 * N + 6) begin
        failures++;
        $display("FAIL latency %0d", cycles);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
