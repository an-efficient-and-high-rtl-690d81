// tb_mont_modmul: the two-pass modular multiplier at 16 bits.
// Includes the operand set X=11, Y=7, N=13 and random full-width and
// short moduli. constant = 2^32 mod N is computed here. Checks
// Result = X*Y mod N, that `state` drops on start and rises exactly
// 2*N_BITS+6 cycles after the start cycle, and stays high afterwards.
module tb_mont_modmul;
  import tb_mont_ref_pkg::*;
  localparam int N = 16;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0;
  logic [N-1:0] X, Y, Nm, constant, Result;
  logic [3:0]   count = 4'hF;
  logic state;
  int checks = 0, failures = 0;

  mont_modmul #(.N_BITS(N)) dut (.clk(clk), .reset(reset), .start(start), .X(X), .Y(Y),
                                 .N(Nm), .constant(constant), .count(count),
                                 .Result(Result), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(big_t xx, big_t yy, big_t nn);
    int cycles;
    big_t e;
    @(negedge clk);
    X = N'(xx); Y = N'(yy); Nm = N'(nn); constant = N'(r2_ref(nn, N));
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    checks++;
    if (state) begin
      failures++;
      $display("FAIL state still high after start");
    end
    while (!state) begin
      @(negedge clk);
      cycles++;
    end
    e = mod_mul(xx, yy, nn);
    checks++;
    if (big_t'(Result) != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL X=%0d Y=%0d N=%0d: got %0d expected %0d", xx, yy, nn, Result, e);
    end
    checks++;
    if (cycles != 2 * N + 6) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycles, 2 * N + 6);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (!state || big_t'(Result) != e) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    X = '0; Y = '0; Nm = 16'd3; constant = '0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    run(11, 7, 13);
    run(0, 9, 13);
    run(65520, 65520, 65521);
    for (int t = 0; t < 200; t++) begin
      big_t nn = rand_modulus(2 + (t % 15), t[0]);
      run(rand_below(nn), rand_below(nn), nn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
